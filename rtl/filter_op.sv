// filter_op: filter processing core (Gaussian or mean smoothing).
//
// Smooths a grey image with a 3x3 kernel.  mode 0: mean, the rounded
// average (s + 4) / 9 of the nine pixels; mode 1: Gaussian, the binomial
// kernel [1 2 1; 2 4 2; 1 2 1] / 16 with rounding, (s + 8) >> 4.  The
// image walking, registers and timing are those of win3_core: p0 source,
// p1 destination, p2 width, p3 height, p4 line stride, p5 mode; interior
// pixels only, three bus reads and one write per pixel.
// The two smoothing kinds follow the document; the kernel size and
// weights, rounding and border handling are this design's choices.
module filter_op
  import vw_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t s_i,
  output wb_s2m_t s_o,
  output wb_m2s_t m_o,
  input  wb_s2m_t m_i,
  output logic    irq
);
  logic [7:0]  win [3][3];
  logic [7:0]  mode, pix;
  logic [11:0] s_mean, s_gauss;

  win3_core u_core (.clk, .rst, .s_i, .s_o, .m_o, .m_i, .irq, .win, .mode, .pix);

  always_comb begin
    s_mean  = '0;
    s_gauss = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        s_mean  = s_mean + 12'(win[r][c]);
        s_gauss = s_gauss + (12'(win[r][c]) << ((r == 1 ? 1 : 0) + (c == 1 ? 1 : 0)));
      end
    pix = mode[0] ? 8'((s_gauss + 12'd8) >> 4) : 8'((s_mean + 12'd4) / 12'd9);
  end

endmodule
