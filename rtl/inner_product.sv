// inner_product: inner product processing core (one SVM classifier).
//
// Computes eta = <w, x> over N elements, where x is the motion history
// image (unsigned bytes, taken as the signed 8.8 value 0.x, i.e. x/256) and
// w is one SVM weight vector stored as N signed 8.8 words (two bytes each,
// low byte first).  Every element costs three bus reads through the
// pc_wb_bridge (pixel, weight low, weight high); the product is formed and
// accumulated by the mac_8p8 co-processor in signed 24.8, so a core that is
// replicated per classifier only spends its time on bus traffic.
//
// Registers (coproc_if window): p0 MHI base, p1 weight vector base, p2
// element count N.  Results: r0 accumulator (signed 24.8), r1 clock cycles
// taken.  Control bit 0 starts; status done / irq mark the end.
// The 8.8 x 8.8 -> 24.8 arithmetic follows the document; the pixel scaling,
// weight layout and register layout are this design's choices.
module inner_product
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
  typedef enum logic [2:0] {IDLE, SET0, SET1, RD_X, RD_WL, RD_WH, DRAIN, FIN} state_e;

  logic [31:0] param [8];
  logic [31:0] result [4];
  logic        start, done;
  state_e      st;
  logic        pend;
  logic [31:0] n, cyc;
  logic [7:0]  x, wl;

  logic        req_valid, req_ready, rsp_valid;
  br_op_e      req_op;
  logic [1:0]  req_ptr;
  logic [31:0] req_data;
  logic [7:0]  rsp_data;

  logic               mac_clr, mac_en, mac_idle;
  logic signed [15:0] mac_a, mac_b;
  logic signed [31:0] acc;

  coproc_if u_regs (
    .clk, .rst, .s_i, .s_o, .param_o(param), .start_o(start),
    .result_i(result), .busy_i(st != IDLE), .done_i(done), .irq_o(irq)
  );

  pc_wb_bridge #(.NPTR(4)) u_br (
    .clk, .rst, .req_valid, .req_ready, .req_op, .req_ptr, .req_data,
    .rsp_valid, .rsp_data, .m_o, .m_i
  );

  mac_8p8 u_mac (
    .clk, .rst, .clr(mac_clr), .en(mac_en), .a(mac_a), .b(mac_b),
    .acc, .idle(mac_idle)
  );

  assign result[0] = acc;
  assign result[1] = cyc;
  assign result[2] = '0;
  assign result[3] = '0;

  assign mac_clr = (st == IDLE) && start;
  assign mac_en  = (st == RD_WH) && rsp_valid;
  assign mac_a   = {8'd0, x};
  assign mac_b   = {rsp_data, wl};

  always_comb begin
    req_valid = ~pend;
    req_op    = BR_READ;
    req_ptr   = 2'd0;
    req_data  = '0;
    unique case (st)
      SET0:  begin req_op = BR_SETB; req_ptr = 2'd0; req_data = param[0]; end
      SET1:  begin req_op = BR_SETB; req_ptr = 2'd1; req_data = param[1]; end
      RD_X:  req_ptr = 2'd0;
      RD_WL: req_ptr = 2'd1;
      RD_WH: req_ptr = 2'd1;
      default: req_valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      pend <= 1'b0;
      n    <= '0;
      cyc  <= '0;
      x    <= '0;
      wl   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st != IDLE) cyc <= cyc + 1'b1;
      if (req_valid && req_ready && req_op == BR_READ) pend <= 1'b1;
      if (rsp_valid) pend <= 1'b0;
      unique case (st)
        IDLE:  if (start) begin st <= SET0; n <= '0; cyc <= '0; end
        SET0:  st <= SET1;
        SET1:  st <= (param[2] == 0) ? DRAIN : RD_X;
        RD_X:  if (rsp_valid) begin x  <= rsp_data; st <= RD_WL; end
        RD_WL: if (rsp_valid) begin wl <= rsp_data; st <= RD_WH; end
        RD_WH: if (rsp_valid) begin
          n  <= n + 1'b1;
          st <= (n + 1'b1 == param[2]) ? DRAIN : RD_X;
        end
        DRAIN: if (mac_idle) st <= FIN;
        FIN:   begin done <= 1'b1; st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
