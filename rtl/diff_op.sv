// diff_op: difference operator processing core (motion history update).
//
// For every pixel of one rectangular image segment the core reads the
// current frame pixel c, the previous frame pixel p and the motion history
// pixel h, and writes back the new motion history value
//     h' = TAU              if |c - p| > threshold   (motion, D = 1)
//     h' = max(0, h - 1)    otherwise
// which is the MHI recurrence with TAU = 255.  Several copies of the core
// can work on one image at once, each given its own segment (for example
// the four quadrants), so no two cores ever read and write the same MHI
// pixel.
//
// Interface: a coproc_if register window (Wishbone slave) and a Wishbone
// master through a pc_wb_bridge.  Parameters: p0 current frame base, p1
// previous frame base, p2 MHI base (all addresses of the segment's top left
// pixel), p3 segment width, p4 segment height, p5 line stride of the images
// (image width), p6 difference threshold.  Results: r0 pixels with motion,
// r1 clock cycles taken.  Writing control bit 0 starts the core; status
// bit 1 (done) and irq rise when it finishes.  Each pixel costs three bus
// reads and one write, so its time depends on bus contention.
// The recurrence, TAU and segmenting follow the document; the register
// layout, the absolute-difference threshold test and the hardwired
// sequencer (in place of processor firmware) are this design's choices.
module diff_op
  import vw_pkg::*;
#(
  parameter logic [7:0] TAU = MHI_TAU
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t s_i,
  output wb_s2m_t s_o,
  output wb_m2s_t m_o,
  input  wb_s2m_t m_i,
  output logic    irq
);
  typedef enum logic [3:0] {
    IDLE, SETUP, RD_C, RD_P, RD_H, WR_H, SKIP, FIN
  } state_e;

  logic [31:0] param [8];
  logic [31:0] result [4];
  logic        start, done;
  state_e      st;
  logic        pend;
  logic [1:0]  k;
  logic [15:0] x, y;
  logic [7:0]  c, pv, hnew;
  logic [31:0] cnt, cyc;

  logic        req_valid, req_ready, rsp_valid;
  br_op_e      req_op;
  logic [1:0]  req_ptr;
  logic [31:0] req_data;
  logic [7:0]  rsp_data;
  logic [7:0]  diff;

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

  always_comb begin
    req_valid = ~pend;
    req_op    = BR_READ;
    req_ptr   = 2'd0;
    req_data  = '0;
    unique case (st)
      SETUP: begin
        req_op   = BR_SETB;
        req_ptr  = k;
        req_data = (k == 2'd0) ? param[0] : (k == 2'd1) ? param[1] : param[2];
      end
      RD_C: req_ptr = 2'd0;
      RD_P: req_ptr = 2'd1;
      RD_H: req_ptr = 2'd2;
      WR_H: begin
        req_op   = BR_WRITE;
        req_ptr  = 2'd3;
        req_data = {24'd0, hnew};
      end
      SKIP: begin
        req_op   = BR_ADDOFF;
        req_ptr  = k;
        req_data = param[5] - param[3];
      end
      default: req_valid = 1'b0;
    endcase
  end

  assign diff = (c > pv) ? c - pv : pv - c;

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      pend <= 1'b0;
      k    <= '0;
      x    <= '0;
      y    <= '0;
      c    <= '0;
      pv   <= '0;
      hnew <= '0;
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
          st  <= SETUP;
          k   <= '0;
          x   <= '0;
          y   <= '0;
          cnt <= '0;
          cyc <= '0;
        end
        SETUP: if (req_ready) begin
          k <= k + 1'b1;
          if (k == 2'd3) st <= (param[3] == 0 || param[4] == 0) ? FIN : RD_C;
        end
        RD_C: if (rsp_valid) begin c  <= rsp_data; st <= RD_P; end
        RD_P: if (rsp_valid) begin pv <= rsp_data; st <= RD_H; end
        RD_H: if (rsp_valid) begin
          if (diff > param[6][7:0]) begin
            hnew <= TAU;
            cnt  <= cnt + 1'b1;
          end else begin
            hnew <= (rsp_data == 8'd0) ? 8'd0 : rsp_data - 1'b1;
          end
          st <= WR_H;
        end
        WR_H: if (rsp_valid) begin
          if (x + 1'b1 == param[3][15:0]) begin
            x  <= '0;
            k  <= '0;
            st <= SKIP;
          end else begin
            x  <= x + 1'b1;
            st <= RD_C;
          end
        end
        SKIP: if (req_ready) begin
          k <= k + 1'b1;
          if (k == 2'd3) begin
            y  <= y + 1'b1;
            st <= (y + 1'b1 == param[4][15:0]) ? FIN : RD_C;
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
