// tb_filter_op: a random 13x9 grey image (line stride 16) in a memory with wait
// states is processed in both modes; every interior destination pixel must
// equal the rounded 3x3 mean (mode 0) or binomial Gaussian (mode 1) computed here from the source, border pixels must stay
// untouched, r0 must count (W-2)*(H-2) pixels, and the cycle count must stay
// within 5 clocks per bus access (with one wait state) for three reads and
// one write per pixel plus six read-ahead reads and four pointer setups per
// line.  Images
// smaller than 3x3 must finish at once without writing.
module tb_filter_op;
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
  localparam int W = 13, H = 9, ST = 16, SRC = 'h100, DST = 'h400;
  wb_m2s_t m;
  wb_s2m_t s;
  logic irq;

  filter_op dut (.clk, .rst, .s_i(hm), .s_o(hr), .m_o(m), .m_i(s), .irq);
  wb_sram_model #(.BYTES(4096), .WAIT(1)) u_mem (.clk, .rst, .s_i(m), .s_o(s));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    finish();
  end

  function automatic int px(int x, int y);
    return int'(u_mem.mem[SRC + y * ST + x]);
  endfunction

  function automatic int absv(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int model(int md, int x, int y);
    int s, g;
    s = 0;
    g = 0;
    for (int r = -1; r <= 1; r++)
      for (int c = -1; c <= 1; c++) begin
        s += px(x + c, y + r);
        g += px(x + c, y + r) * (r == 0 ? 2 : 1) * (c == 0 ? 2 : 1);
      end
    return md == 0 ? (s + 4) / 9 : (g + 8) / 16;
  endfunction

  task automatic run(input int md, input int w, input int h);
    logic [7:0] st;
    wbw32(24'h00, SRC);
    wbw32(24'h04, DST);
    wbw32(24'h08, w);
    wbw32(24'h0C, h);
    wbw32(24'h10, ST);
    wbw32(24'h14, md);
    wbw(24'h30, 8'h01);
    do wbr(24'h31, st); while (!st[1]);
  endtask

  initial begin
    logic [31:0] r0, r1;
    int bad;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int md = 0; md < 2; md++) begin
      for (int i = 0; i < ST * H; i++) u_mem.mem[SRC + i] = 8'($urandom);
      if (md == 1) for (int x = 0; x < W; x++) u_mem.mem[SRC + 4 * ST + x] = 8'd250;   // a strong line
      for (int i = 0; i < ST * H; i++) u_mem.mem[DST + i] = 8'hA5;
      run(md, W, H);
      wbr32(24'h20, r0);
      wbr32(24'h24, r1);
      check(r0 == (W - 2) * (H - 2), $sformatf("mode %0d pixel count %0d", md, r0));
      check(r1 <= 5 * (4 * (W - 2) + 10) * (H - 2) + 100, $sformatf("mode %0d cycles %0d", md, r1));
      bad = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < ST; x++) begin
          int e;
          e = (x >= 1 && x <= W - 2 && y >= 1 && y <= H - 2) ? model(md, x, y) : 'hA5;
          if (int'(u_mem.mem[DST + y * ST + x]) != e) begin
            bad++;
            if (bad < 5) $display("mode %0d (%0d,%0d): got %0d exp %0d", md, x, y, u_mem.mem[DST + y * ST + x], e);
          end
        end
      check(bad == 0, $sformatf("mode %0d: %0d pixels differ", md, bad));
    end
    run(0, 2, 9);
    wbr32(24'h20, r0);
    check(r0 == 0, "too narrow image does nothing");
    finish();
  end
endmodule
