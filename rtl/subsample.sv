// subsample: sub-sample operator processing core.
//
// Halves an image in both directions.  In selection mode each output pixel
// is the top left pixel of its 2x2 input block; in interpolation mode it is
// the rounded mean of the four pixels of the block, (a+b+c+d+2)/4.  Pixels
// are read and written through a pc_wb_bridge: pointer 0 walks the even
// input line, pointer 1 the odd input line, pointer 2 the output image.
//
// Registers (coproc_if window): p0 source base, p1 destination base, p2
// source width (even), p3 source height (even), p4 mode (bit 0: 1 =
// interpolation).  Results: r0 output pixels written, r1 clock cycles.
// Down sampling by selection or interpolation follows the document; the
// fixed factor of two and the register layout are this design's choices.
module subsample
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
  typedef enum logic [3:0] {IDLE, SETUP, RD_A, RD_B, RD_C, RD_D, SKIPA, WR, ROW, FIN} state_e;

  logic [31:0] param [8];
  logic [31:0] result [4];
  logic        start, done;
  state_e      st;
  logic        pend;
  logic [1:0]  k;
  logic [15:0] x, y;
  logic [9:0]  sum;
  logic [31:0] cnt, cyc;
  logic        interp;

  logic        req_valid, req_ready, rsp_valid;
  br_op_e      req_op;
  logic [1:0]  req_ptr;
  logic [31:0] req_data;
  logic [7:0]  rsp_data;
  logic [9:0]  sum_r;

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
  assign interp    = param[4][0];
  assign sum_r     = sum + 10'd2;

  always_comb begin
    req_valid = ~pend;
    req_op    = BR_READ;
    req_ptr   = 2'd0;
    req_data  = '0;
    unique case (st)
      SETUP: begin
        req_op   = BR_SETB;
        req_ptr  = k;
        req_data = (k == 2'd0) ? param[0] : (k == 2'd1) ? param[0] + param[2] : param[1];
      end
      RD_A, RD_B: req_ptr = 2'd0;
      RD_C, RD_D: req_ptr = 2'd1;
      SKIPA: begin req_op = BR_ADDOFF; req_ptr = 2'd0; req_data = 32'd1; end
      WR: begin
        req_op   = BR_WRITE;
        req_ptr  = 2'd2;
        req_data = {24'd0, interp ? sum_r[9:2] : sum[7:0]};
      end
      ROW: begin
        // pointer 0 skips the odd line; pointer 1 skips the next even line
        req_op   = BR_ADDOFF;
        req_ptr  = k;
        req_data = interp ? param[2] : (k == 2'd0) ? param[2] : 32'd0;
      end
      default: req_valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      pend <= 1'b0;
      k    <= '0;
      x    <= '0;
      y    <= '0;
      sum  <= '0;
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
          st <= SETUP; k <= '0; x <= '0; y <= '0; cnt <= '0; cyc <= '0;
        end
        SETUP: if (req_ready) begin
          k <= k + 1'b1;
          if (k == 2'd2) st <= (param[2] < 2 || param[3] < 2) ? FIN : RD_A;
        end
        RD_A: if (rsp_valid) begin sum <= {2'd0, rsp_data}; st <= interp ? RD_B : SKIPA; end
        SKIPA: st <= WR;
        RD_B: if (rsp_valid) begin sum <= sum + {2'd0, rsp_data}; st <= RD_C; end
        RD_C: if (rsp_valid) begin sum <= sum + {2'd0, rsp_data}; st <= RD_D; end
        RD_D: if (rsp_valid) begin sum <= sum + {2'd0, rsp_data}; st <= WR; end
        WR: if (rsp_valid) begin
          cnt <= cnt + 1'b1;
          if (x + 1'b1 == param[2][16:1]) begin
            x <= '0; k <= '0; st <= ROW;
          end else begin
            x <= x + 1'b1; st <= RD_A;
          end
        end
        ROW: if (req_ready) begin
          k <= k + 1'b1;
          if (k == 2'd1) begin
            y  <= y + 1'b1;
            st <= (y + 1'b1 == param[3][16:1]) ? FIN : RD_A;
          end
        end
        FIN: begin done <= 1'b1; st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
