// rotate_op: rotate processing core (image orientation about its centre).
//
// Writes a W x H destination image whose pixel (x, y) is the source pixel
// at the rotated position
//     xs = cx + round( c*(x-cx) + s*(y-cy))
//     ys = cy + round(-s*(x-cx) + c*(y-cy))
// with centre (cx, cy) = (W/2, H/2) rounded down and c, s the cosine and
// sine of the angle as signed 8.8 values (nearest neighbour; positions
// outside the source give 0).  With the image y axis pointing down, a
// positive angle turns the picture clockwise on screen.  The rotated
// coordinates are kept as 8.8 accumulators stepped by c and s along a line
// and from line to line, so only the start of the image needs multiplies.
// Per pixel: a pointer set and one bus read of the source pixel (if
// inside the image), and one bus write.
// Registers (coproc_if window): p0 source base, p1 destination base, p2
// width W, p3 height H, p4 line stride of both images, p5 cosine (signed
// 8.8, bits 15:0), p6 sine (signed 8.8).  Results: r0 pixels written, r1
// clock cycles.  Firmware supplies c and s (for example from a sine table).
// Rotation about the centre follows the document; nearest neighbour
// sampling, zero fill and the registers are this design's choices.
module rotate_op
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
  typedef enum logic [2:0] {IDLE, LSET, PIX, SRC, RD, WR, FIN} state_e;

  logic [31:0]        param [8];
  logic [31:0]        result [4];
  logic               start, done;
  state_e             st;
  logic               pend;
  logic [15:0]        x, y, cx, cy;
  logic signed [31:0] cs, sn;       // cosine, sine (8.8)
  logic signed [31:0] u0, v0, u, v; // rotated offsets (8.8) at line start, at x
  logic signed [31:0] xs, ys;
  logic               in_img;
  logic [7:0]         val;
  logic [31:0]        db, cnt, cyc;

  logic        req_valid, req_ready, rsp_valid;
  br_op_e      req_op;
  logic [1:0]  req_ptr;
  logic [31:0] req_data;
  logic [7:0]  rsp_data;

  coproc_if u_regs (
    .clk, .rst, .s_i, .s_o, .param_o(param), .start_o(start),
    .result_i(result), .busy_i(st != IDLE), .done_i(done), .irq_o(irq)
  );

  pc_wb_bridge #(.NPTR(4)) u_br (
    .clk, .rst, .req_valid, .req_ready, .req_op, .req_ptr, .req_data,
    .rsp_valid, .rsp_data, .m_o, .m_i
  );

  assign result[0] = cnt;
  assign result[1] = cyc;
  assign result[2] = '0;
  assign result[3] = '0;

  assign xs     = $signed(32'(cx)) + ((u + 32'sd128) >>> 8);
  assign ys     = $signed(32'(cy)) + ((v + 32'sd128) >>> 8);
  assign in_img = xs >= 0 && xs < $signed(32'(param[2][15:0])) &&
                  ys >= 0 && ys < $signed(32'(param[3][15:0]));

  always_comb begin
    req_valid = ~pend;
    req_op    = BR_READ;
    req_ptr   = 2'd0;
    req_data  = '0;
    unique case (st)
      LSET: begin
        req_op   = BR_SETB;
        req_ptr  = 2'd3;
        req_data = db;
      end
      SRC: begin
        req_op   = BR_SETB;
        req_data = param[0] + 32'(ys[15:0]) * param[4] + 32'(xs[15:0]);
      end
      RD: ;
      WR: begin
        req_op   = BR_WRITE;
        req_ptr  = 2'd3;
        req_data = {24'd0, val};
      end
      default: req_valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      pend <= 1'b0;
      x    <= '0;
      y    <= '0;
      cx   <= '0;
      cy   <= '0;
      cs   <= '0;
      sn   <= '0;
      u0   <= '0;
      v0   <= '0;
      u    <= '0;
      v    <= '0;
      val  <= '0;
      db   <= '0;
      cnt  <= '0;
      cyc  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st != IDLE) cyc <= cyc + 1'b1;
      if (req_valid && req_ready && (req_op == BR_READ || req_op == BR_WRITE)) pend <= 1'b1;
      if (rsp_valid) pend <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          logic signed [31:0] c, s, hx, hy;
          c  = 32'(signed'(param[5][15:0]));
          s  = 32'(signed'(param[6][15:0]));
          hx = 32'(param[2][15:1]);
          hy = 32'(param[3][15:1]);
          cs  <= c;
          sn  <= s;
          cx  <= param[2][16:1];
          cy  <= param[3][16:1];
          u0  <= -c * hx - s * hy;
          v0  <=  s * hx - c * hy;
          u   <= -c * hx - s * hy;
          v   <=  s * hx - c * hy;
          x   <= '0;
          y   <= '0;
          db  <= param[1];
          cnt <= '0;
          cyc <= '0;
          st  <= (param[2][15:0] == 0 || param[3][15:0] == 0) ? FIN : LSET;
        end
        LSET: if (req_ready) st <= PIX;
        PIX: begin
          val <= 8'd0;
          st  <= in_img ? SRC : WR;
        end
        SRC: if (req_ready) st <= RD;
        RD: if (rsp_valid) begin
          val <= rsp_data;
          st  <= WR;
        end
        WR: if (rsp_valid) begin
          cnt <= cnt + 1'b1;
          if (x + 1'b1 == param[2][15:0]) begin
            x  <= '0;
            y  <= y + 1'b1;
            db <= db + param[4];
            u0 <= u0 + sn;
            v0 <= v0 + cs;
            u  <= u0 + sn;
            v  <= v0 + cs;
            st <= (y + 1'b1 == param[3][15:0]) ? FIN : LSET;
          end else begin
            x  <= x + 1'b1;
            u  <= u + cs;
            v  <= v - sn;
            st <= PIX;
          end
        end
        FIN: begin
          done <= 1'b1;
          st   <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
