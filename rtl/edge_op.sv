// edge_op: edge detector processing core (Roberts cross or Sobel).
//
// Computes an edge magnitude for every interior pixel of a grey image,
// as |gx| + |gy| saturated to 255.  mode 0: Roberts cross on the centre
// pixel and its right, lower and lower-right neighbours,
// gx = p(x,y) - p(x+1,y+1), gy = p(x+1,y) - p(x,y+1); mode 1: Sobel,
// gx = [-1 0 1; -2 0 2; -1 0 1] and gy = [-1 -2 -1; 0 0 0; 1 2 1] over
// the 3x3 neighbourhood.  The image walking, registers and timing are
// those of win3_core (p0 source, p1 destination, p2 width, p3 height, p4
// line stride, p5 mode; interior pixels only).
// The two operators follow the document; the |gx| + |gy| magnitude, the
// saturation and border handling are this design's choices.
module edge_op
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
  logic [7:0]         win [3][3];
  logic [7:0]         mode, pix;
  logic signed [11:0] gx, gy;
  logic [11:0]        mag;

  win3_core u_core (.clk, .rst, .s_i, .s_o, .m_o, .m_i, .irq, .win, .mode, .pix);

  function automatic logic signed [11:0] sx(input logic [7:0] v);
    return 12'(v);
  endfunction

  always_comb begin
    if (mode[0]) begin
      gx = sx(win[0][2]) + 2 * sx(win[1][2]) + sx(win[2][2])
         - sx(win[0][0]) - 2 * sx(win[1][0]) - sx(win[2][0]);
      gy = sx(win[2][0]) + 2 * sx(win[2][1]) + sx(win[2][2])
         - sx(win[0][0]) - 2 * sx(win[0][1]) - sx(win[0][2]);
    end else begin
      gx = sx(win[1][1]) - sx(win[2][2]);
      gy = sx(win[1][2]) - sx(win[2][1]);
    end
    mag = 12'(gx < 0 ? -gx : gx) + 12'(gy < 0 ? -gy : gy);
    pix = (mag > 12'd255) ? 8'd255 : mag[7:0];
  end

endmodule
