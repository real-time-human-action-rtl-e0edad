// tb_rotate_op: a random 13x9 grey image (line stride 16) in a memory with
// wait states is rotated by 0, 90, 180 and 30 degrees and by -45 degrees.
// Every destination pixel is compared with the source pixel found here from
// the closed-form rotation (c*(x-cx) + s*(y-cy), rounded), or 0 where that
// lies outside the source; bytes beyond the image width must stay
// untouched.  The zero angle must reproduce the source exactly.  r0 must
// count W*H pixels, and the cycle count must stay within 5 clocks per bus
// access (with one wait state) for a pointer setup, a read and a write per
// pixel plus one pointer setup per line.  An empty image must finish at
// once without writing.
module tb_rotate_op;
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

  rotate_op dut (.clk, .rst, .s_i(hm), .s_o(hr), .m_o(m), .m_i(s), .irq);
  wb_sram_model #(.BYTES(4096), .WAIT(1)) u_mem (.clk, .rst, .s_i(m), .s_o(s));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    finish();
  end

  function automatic int model(int c, int sn, int x, int y);
    int hx, hy, u, v, xs, ys;
    hx = W / 2;
    hy = H / 2;
    u  = c * (x - hx) + sn * (y - hy);
    v  = -sn * (x - hx) + c * (y - hy);
    xs = hx + ((u + 128) >>> 8);
    ys = hy + ((v + 128) >>> 8);
    if (xs < 0 || xs >= W || ys < 0 || ys >= H) return 0;
    return int'(u_mem.mem[SRC + ys * ST + xs]);
  endfunction

  task automatic run(input int c, input int sn, input int w, input int h);
    logic [7:0] st;
    wbw32(24'h00, SRC);
    wbw32(24'h04, DST);
    wbw32(24'h08, w);
    wbw32(24'h0C, h);
    wbw32(24'h10, ST);
    wbw32(24'h14, 32'(c) & 32'hFFFF);
    wbw32(24'h18, 32'(sn) & 32'hFFFF);
    wbw(24'h30, 8'h01);
    do wbr(24'h31, st); while (!st[1]);
  endtask

  initial begin
    int cs [5] = '{256, 0, -256, 222, 181};
    int sns [5] = '{0, 256, 0, 128, -181};
    logic [31:0] r0, r1;
    int bad, same;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int a = 0; a < 5; a++) begin
      for (int i = 0; i < ST * H; i++) u_mem.mem[SRC + i] = 8'($urandom_range(1, 255));
      for (int i = 0; i < ST * H; i++) u_mem.mem[DST + i] = 8'hA5;
      run(cs[a], sns[a], W, H);
      wbr32(24'h20, r0);
      wbr32(24'h24, r1);
      check(r0 == W * H, $sformatf("angle %0d pixel count %0d", a, r0));
      check(r1 <= 5 * 3 * W * H + 5 * H + 100, $sformatf("angle %0d cycles %0d", a, r1));
      bad = 0;
      same = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < ST; x++) begin
          int e;
          e = (x < W) ? model(cs[a], sns[a], x, y) : 'hA5;
          if (x < W && u_mem.mem[DST + y * ST + x] == u_mem.mem[SRC + y * ST + x]) same++;
          if (int'(u_mem.mem[DST + y * ST + x]) != e) begin
            bad++;
            if (bad < 5) $display("angle %0d (%0d,%0d): got %0d exp %0d", a, x, y, u_mem.mem[DST + y * ST + x], e);
          end
        end
      check(bad == 0, $sformatf("angle %0d: %0d pixels differ", a, bad));
      if (a == 0) check(same == W * H, "zero angle copies the image");
      if (a == 1) check(same < W * H / 2, "quarter turn moves the image");
    end
    for (int i = 0; i < ST * H; i++) u_mem.mem[DST + i] = 8'hA5;
    run(256, 0, 0, 9);
    wbr32(24'h20, r0);
    check(r0 == 0, "empty image does nothing");
    check(u_mem.mem[DST] == 8'hA5, "empty image writes nothing");
    finish();
  end
endmodule
