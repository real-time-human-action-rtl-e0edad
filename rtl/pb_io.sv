// pb_io: input and output ports of the top level processor module.
//
// Input port: BASE+0 reads the de-bounced push buttons (low NBTN bits),
// BASE+1 reads the DIP switch bank that selects which configuration data
// the firmware uses.  Both are synchronised with two flip-flops.  Output
// port: BASE+2 is an 8-bit output register (for LEDs), readable back.
// Reads return data one clock after the port number.  change pulses for
// one clock when a synchronised button or switch input changes (an
// interrupt source).  The buttons and the
// DIP switch follow the document; port numbers are this design's choice.
module pb_io
  import vw_pkg::*;
#(
  parameter logic [7:0]  BASE = PB_IO,
  parameter int unsigned NBTN = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  pb_port_t        pb,
  output logic [7:0]      rdata,
  input  logic [NBTN-1:0] buttons,
  input  logic [7:0]      dip,
  output logic [7:0]      out_port,
  output logic            change
);
  logic [7:0] dip_s1, dip_s2;
  logic [NBTN-1:0] btn_s1, btn_s;
  logic sel;

  assign sel = pb.id[7:2] == BASE[7:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      dip_s1   <= '0;
      dip_s2   <= '0;
      btn_s1   <= '0;
      btn_s    <= '0;
      out_port <= '0;
      change   <= 1'b0;
    end else begin
      change <= (dip_s1 != dip_s2) || (btn_s1 != btn_s);
      dip_s1 <= dip;
      dip_s2 <= dip_s1;
      btn_s1 <= buttons;
      btn_s  <= btn_s1;
      if (pb.wr && sel && pb.id[1:0] == 2'd2) out_port <= pb.dout;
    end
  end

  always_ff @(posedge clk) begin
    rdata <= 8'h00;
    if (sel) begin
      unique case (pb.id[1:0])
        2'd0: rdata <= 8'(btn_s);
        2'd1: rdata <= dip_s2;
        2'd2: rdata <= out_port;
        default: rdata <= 8'h00;
      endcase
    end
  end

endmodule
