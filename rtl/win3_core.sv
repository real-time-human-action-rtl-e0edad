// win3_core: processing core skeleton for 3x3 neighbourhood operators.
//
// Shared by the filter and edge detector cores.  It walks an image line by
// line and presents, for every interior pixel (x, y) with 1 <= x <= W-2 and
// 1 <= y <= H-2, its 3x3 neighbourhood on win (win[r][c] is the pixel at
// (x-1+c, y-1+r)); the enclosing core computes pix from win and mode
// combinationally, and pix is written to dst + y*stride + x.  Border pixels
// of the destination are not written.
//
// Three bridge pointers follow the three source lines and auto-increment,
// so every output pixel costs three bus reads (one new window column) and
// one write; the first two columns of each line are read ahead.
// Registers (coproc_if window): p0 source base, p1 destination base, p2
// width W, p3 height H (both at least 3, else nothing is done), p4 line
// stride of both images, p5 mode (passed to the core on mode).  Results:
// r0 pixels written, r1 clock cycles.  Control bit 0 starts; status done
// and irq mark the end.  The register window and bridge follow the
// document's processing core structure; the line walking is this design's.
module win3_core
  import vw_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  wb_m2s_t    s_i,
  output wb_s2m_t    s_o,
  output wb_m2s_t    m_o,
  input  wb_s2m_t    m_i,
  output logic       irq,
  output logic [7:0] win [3][3],
  output logic [7:0] mode,
  input  logic [7:0] pix
);
  typedef enum logic [2:0] {IDLE, SETUP, RD, WR, FIN} state_e;

  logic [31:0] param [8];
  logic [31:0] result [4];
  logic        start, done;
  state_e      st;
  logic        pend;
  logic [1:0]  k;
  logic [15:0] col, y;          // columns read in this line, output line
  logic [31:0] rb, db;          // source line y-1, destination pixel (1, y)
  logic [7:0]  nc [2];          // new column, rows 0 and 1
  logic [31:0] cnt, cyc;

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
  assign mode      = param[5][7:0];

  always_comb begin
    req_valid = ~pend;
    req_op    = BR_READ;
    req_ptr   = k;
    req_data  = '0;
    unique case (st)
      SETUP: begin
        req_op   = BR_SETB;
        req_data = (k == 2'd3) ? db : rb + 32'(k) * param[4];
      end
      RD: ;
      WR: begin
        req_op   = BR_WRITE;
        req_ptr  = 2'd3;
        req_data = {24'd0, pix};
      end
      default: req_valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      pend <= 1'b0;
      k    <= '0;
      col  <= '0;
      y    <= '0;
      rb   <= '0;
      db   <= '0;
      cnt  <= '0;
      cyc  <= '0;
      done <= 1'b0;
      nc   <= '{default: '0};
      win  <= '{default: '0};
    end else begin
      done <= 1'b0;
      if (st != IDLE) cyc <= cyc + 1'b1;
      if (req_valid && req_ready && (req_op == BR_READ || req_op == BR_WRITE)) pend <= 1'b1;
      if (rsp_valid) pend <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          k   <= '0;
          col <= '0;
          y   <= 16'd1;
          rb  <= param[0];
          db  <= param[1] + param[4] + 32'd1;
          cnt <= '0;
          cyc <= '0;
          st  <= (param[2] < 3 || param[3] < 3) ? FIN : SETUP;
        end
        SETUP: if (req_ready) begin
          k <= k + 1'b1;
          if (k == 2'd3) begin
            k   <= '0;
            col <= '0;
            st  <= RD;
          end
        end
        RD: if (rsp_valid) begin
          if (k != 2'd2) begin
            nc[k[0]] <= rsp_data;
            k        <= k + 1'b1;
          end else begin
            k <= '0;
            for (int r = 0; r < 3; r++) begin
              win[r][0] <= win[r][1];
              win[r][1] <= win[r][2];
            end
            win[0][2] <= nc[0];
            win[1][2] <= nc[1];
            win[2][2] <= rsp_data;
            col <= col + 1'b1;
            if (col >= 16'd2) st <= WR;
          end
        end
        WR: if (rsp_valid) begin
          cnt <= cnt + 1'b1;
          if (col == param[2][15:0]) begin
            // line finished
            rb <= rb + param[4];
            db <= db + param[4];
            y  <= y + 1'b1;
            st <= (y + 1'b1 == param[3][15:0] - 16'd1) ? FIN : SETUP;
          end else begin
            st <= RD;
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
