// pb_timer: periodic timer of the top level processor module.
//
// A 16-bit down counter clocked by a PRESCALE divider of the system clock.
// When enabled it counts down from the reload value; on reaching zero it
// reloads and pulses tick for one clock (an interrupt source).  Ports:
// BASE+0 reload low byte, BASE+1 reload high byte, BASE+2 control (bit 0
// enable; writing restarts the count from the reload value), BASE+3 reads
// the tick count modulo 256.  With the default PRESCALE of 20000 and a
// 20 MHz clock one count is 1 ms.  The document only names the timer; its
// function and registers here are this design's choice.
module pb_timer
  import vw_pkg::*;
#(
  parameter logic [7:0]  BASE     = PB_TIMER,
  parameter int unsigned PRESCALE = 20000
) (
  input  logic       clk,
  input  logic       rst,
  input  pb_port_t   pb,
  output logic [7:0] rdata,
  output logic       tick
);
  localparam int unsigned PSW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [15:0]    reload, cnt;
  logic [PSW-1:0] ps;
  logic           en;
  logic [7:0]     ticks;
  logic           sel;

  assign sel = pb.id[7:2] == BASE[7:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      reload <= '0;
      cnt    <= '0;
      ps     <= '0;
      en     <= 1'b0;
      ticks  <= '0;
      tick   <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (pb.wr && sel) begin
        unique case (pb.id[1:0])
          2'd0: reload[7:0]  <= pb.dout;
          2'd1: reload[15:8] <= pb.dout;
          2'd2: begin
            en  <= pb.dout[0];
            cnt <= reload;
            ps  <= '0;
          end
          default: ;
        endcase
      end else if (en) begin
        if (ps == PSW'(PRESCALE - 1)) begin
          ps <= '0;
          if (cnt == 0 || cnt == 1) begin
            cnt   <= reload;
            tick  <= 1'b1;
            ticks <= ticks + 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end else begin
          ps <= ps + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    rdata <= 8'h00;
    if (sel) begin
      unique case (pb.id[1:0])
        2'd0: rdata <= reload[7:0];
        2'd1: rdata <= reload[15:8];
        2'd2: rdata <= {7'd0, en};
        default: rdata <= ticks;
      endcase
    end
  end

endmodule
