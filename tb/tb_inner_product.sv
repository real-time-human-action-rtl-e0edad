// tb_inner_product: one inner product core on a 64 KB memory holding an
// MHI of N bytes and a weight vector of N signed 8.8 words.  The expected
// result is the 24.8 sum of floor(x * w / 256) with x taken as 0.x, formed
// here with 64-bit integers.  Three runs: random data, all-255 MHI with
// negative weights, and an empty vector.  The cycle result must show three
// bus reads of four clocks each (issue, bus, acknowledge, response) per element.
module tb_inner_product;
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
  wb_m2s_t mm;
  wb_s2m_t mr;
  logic irq;

  inner_product dut (.clk, .rst, .s_i(hm), .s_o(hr), .m_o(mm), .m_i(mr), .irq);
  wb_mem #(.BYTES(65536)) mem (.clk, .rst, .s_i(mm), .s_o(mr));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    finish();
  end

  task automatic run(input int n, input int mode);
    longint e;
    logic [7:0] st;
    logic [31:0] r0, r1;
    e = 0;
    for (int i = 0; i < n; i++) begin
      logic [7:0] x;
      logic signed [15:0] w;
      x = (mode == 1) ? 8'd255 : 8'($urandom);
      w = (mode == 1) ? -16'sd300 : 16'($urandom);
      mem.mem[i] = x;
      mem.mem[16'h8000 + 2 * i]     = w[7:0];
      mem.mem[16'h8000 + 2 * i + 1] = w[15:8];
      e += (longint'({8'd0, x}) * longint'(w)) >>> 8;
    end
    wbw32(8'h00, 32'h0000);
    wbw32(8'h04, 32'h8000);
    wbw32(8'h08, 32'(n));
    wbw(8'h30, 8'h01);
    do begin
      repeat (50) @(negedge clk);
      wbr(8'h31, st);
    end while (!st[1]);
    wbr32(8'h20, r0);
    wbr32(8'h24, r1);
    check(r0 == 32'(e), $sformatf("inner product %0d exp %0d (n=%0d)", $signed(r0), e, n));
    check(r1 >= 32'(6 * n) && r1 <= 32'(13 * n + 20), $sformatf("cycles %0d for n=%0d", r1, n));
    check(irq, "irq");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(8000, 0);
    run(500, 1);
    run(0, 0);
    run(37, 0);
    finish();
  end
endmodule
