// tb_diff_op: one difference operator core on a 4 KB memory.  Current,
// previous and MHI images of 20x14 pixels are filled with random data; the
// core is run on each quadrant in turn (as four replicated cores would be
// allocated) and every MHI pixel is compared with the MHI rule computed
// here: 255 where |c-p| > threshold, else max(0, h-1).  The motion count
// result and the cycle counter (at least 4 bus accesses of 2 clocks per
// pixel) are checked, and pixels outside the segment must stay unchanged.
module tb_diff_op;
  import vw_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  // bus master used by the test: classic Wishbone single accesses
  wb_m2s_t hm = WB_M2S_IDLE;
  wb_s2m_t hr;

  task automatic wbw(input logic [23:0] a, input logic [7:0] d);
    @(negedge clk);
    hm = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: a, dat: d};
    do @(negedge clk); while (!hr.ack);
    hm = WB_M2S_IDLE;
  endtask

  task automatic wbr(input logic [23:0] a, output logic [7:0] d);
    @(negedge clk);
    hm = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: a, dat: '0};
    do @(negedge clk); while (!hr.ack);
    d  = hr.dat;
    hm = WB_M2S_IDLE;
  endtask

  task automatic wbw32(input logic [23:0] a, input logic [31:0] d);
    for (int i = 0; i < 4; i++) wbw(a + 24'(i), d[8*i +: 8]);
  endtask

  task automatic wbr32(input logic [23:0] a, output logic [31:0] d);
    logic [7:0] b;
    for (int i = 0; i < 4; i++) begin
      wbr(a + 24'(i), b);
      d[8*i +: 8] = b;
    end
  endtask
  localparam int W = 20, H = 14;
  localparam int CUR = 'h000, PRV = 'h200, MHI = 'h400;
  wb_m2s_t mm;
  wb_s2m_t mr;
  logic irq;
  logic [7:0] c [W*H];
  logic [7:0] p [W*H];
  logic [7:0] h [W*H];
  logic [7:0] thr;

  diff_op dut (.clk, .rst, .s_i(hm), .s_o(hr), .m_o(mm), .m_i(mr), .irq);
  wb_mem #(.BYTES(4096)) mem (.clk, .rst, .s_i(mm), .s_o(mr));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] st;
    logic [31:0] r0, r1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < W*H; i++) begin
      c[i] = 8'($urandom);
      p[i] = ($urandom_range(0, 1) == 1) ? c[i] + 8'($urandom_range(0, 12)) : 8'($urandom);
      h[i] = ($urandom_range(0, 3) == 0) ? 8'd0 : 8'($urandom);
      mem.mem[CUR + i] = c[i];
      mem.mem[PRV + i] = p[i];
      mem.mem[MHI + i] = h[i];
    end
    thr = 8'd10;
    for (int q = 0; q < 4; q++) begin
      int x0, y0, sw, sh, cnt;
      x0 = (q % 2) * (W / 2);
      y0 = (q / 2) * (H / 2);
      sw = W / 2;
      sh = H / 2;
      wbw32(8'h00, 32'(CUR + y0 * W + x0));
      wbw32(8'h04, 32'(PRV + y0 * W + x0));
      wbw32(8'h08, 32'(MHI + y0 * W + x0));
      wbw32(8'h0C, 32'(sw));
      wbw32(8'h10, 32'(sh));
      wbw32(8'h14, 32'(W));
      wbw32(8'h18, 32'(thr));
      wbw(8'h30, 8'h01);
      wbr(8'h31, st);
      check(st[0], "busy after start");
      do begin
        repeat (20) @(negedge clk);
        wbr(8'h31, st);
      end while (!st[1]);
      check(irq, "irq with done");
      cnt = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int i;
          logic [7:0] d, e;
          bit in_seg;
          i = y * W + x;
          in_seg = (x >= x0 && x < x0 + sw && y >= y0 && y < y0 + sh);
          d = (c[i] > p[i]) ? c[i] - p[i] : p[i] - c[i];
          if (in_seg) begin
            if (d > thr) begin
              e = 8'd255;
              cnt++;
            end else begin
              e = (h[i] == 0) ? 8'd0 : h[i] - 1;
            end
            h[i] = e;
          end
          check(mem.mem[MHI + i] == h[i], $sformatf("MHI q%0d (%0d,%0d) got %0d exp %0d", q, x, y, mem.mem[MHI + i], h[i]));
        end
      wbr32(8'h20, r0);
      wbr32(8'h24, r1);
      check(r0 == 32'(cnt), $sformatf("motion count %0d exp %0d", r0, cnt));
      check(r1 >= 32'(8 * sw * sh) && r1 < 32'(20 * sw * sh), $sformatf("cycles %0d", r1));
    end
    finish();
  end
endmodule
