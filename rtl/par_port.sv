// par_port: PC download parallel port.
//
// Sends bytes to the host PC, mainly image data for SVM training and
// debugging.  Bytes enter a DEPTH-entry FIFO either from a Wishbone write to
// offset 0x00 or from the in_* stream (for example the DMA engine in memory
// to FIFO mode; a bus write takes priority in the same clock) and leave on
// the pp_* side with a valid/ready handshake driven by the PC side.  Offset
// 0x01 reads the number of bytes waiting.  When the FIFO is full in_ready
// is low and further bus writes are dropped.  The port's purpose follows
// the document; the FIFO and handshake are this design's choices.
module par_port
  import vw_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  wb_m2s_t    s_i,
  output wb_s2m_t    s_o,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       pp_valid,
  input  logic       pp_ready,
  output logic [7:0] pp_data
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [7:0]  q [DEPTH];
  logic [PW:0] cnt;
  logic [PW-1:0] rp, wp;
  logic        ack, push, pop, bus_wr;
  logic [7:0]  din;
  logic [7:0]  rdat;

  assign bus_wr   = s_i.cyc & s_i.stb & s_i.we & ~ack & (s_i.adr[7:0] == 8'h00);
  assign in_ready = (cnt != (PW+1)'(DEPTH)) & ~bus_wr;
  assign push     = (bus_wr | in_valid) & (cnt != (PW+1)'(DEPTH));
  assign din      = bus_wr ? s_i.dat : in_data;
  assign pp_valid = (cnt != 0);
  assign pp_data  = q[rp];
  assign pop      = pp_valid & pp_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      rp  <= '0;
      wp  <= '0;
      ack <= 1'b0;
    end else begin
      ack <= s_i.cyc & s_i.stb & ~ack;
      if (push) begin
        q[wp] <= din;
        wp    <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) rdat <= (s_i.adr[7:0] == 8'h01) ? 8'(cnt) : 8'h00;

  assign s_o.ack = ack;
  assign s_o.dat = rdat;

endmodule
