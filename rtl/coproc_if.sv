// coproc_if: generic co-processor register interface of a processing core.
//
// Every processing core carries the same register window, reached over a
// Wishbone slave port: eight 32-bit parameter registers (byte offsets
// 0x00-0x1F, little endian), four 32-bit result registers (0x20-0x2F, read
// only), a control register (0x30, writing bit 0 = 1 starts the core) and a
// status register (0x31: bit 0 busy, bit 1 done; done is set when the core
// finishes and cleared by the next start).  irq is the done flag, for the
// interrupt handler.  Accesses are acknowledged one clock after STB.
// The register counts are the document's; widths, offsets and the status
// encoding are this design's choice.
module coproc_if
  import vw_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  wb_m2s_t     s_i,
  output wb_s2m_t     s_o,
  output logic [31:0] param_o  [8],
  output logic        start_o,
  input  logic [31:0] result_i [4],
  input  logic        busy_i,
  input  logic        done_i,
  output logic        irq_o
);
  logic       ack;
  logic [7:0] rdat;
  logic       done_q;
  logic [7:0] off;
  logic       wr;

  assign off = s_i.adr[7:0];
  assign wr  = s_i.cyc & s_i.stb & s_i.we & ~ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack     <= 1'b0;
      start_o <= 1'b0;
      done_q  <= 1'b0;
      for (int i = 0; i < 8; i++) param_o[i] <= '0;
    end else begin
      ack     <= s_i.cyc & s_i.stb & ~ack;
      start_o <= 1'b0;
      if (wr && off < 8'h20) param_o[off[4:2]][8*off[1:0] +: 8] <= s_i.dat;
      if (wr && off == 8'(CR_CTRL) && s_i.dat[0] && !busy_i) begin
        start_o <= 1'b1;
        done_q  <= 1'b0;
      end else if (done_i) begin
        done_q <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (off < 8'h20)                 rdat <= param_o[off[4:2]][8*off[1:0] +: 8];
    else if (off < 8'h30)            rdat <= result_i[off[3:2]][8*off[1:0] +: 8];
    else if (off == 8'(CR_STATUS))   rdat <= {6'd0, done_q, busy_i | start_o};
    else                             rdat <= 8'h00;
  end

  assign s_o.ack = ack;
  assign s_o.dat = rdat;
  assign irq_o   = done_q;

endmodule
