// tb_offset_threshold: random scores and offsets for the default three
// classes; the class with the largest score+offset must be reported on the
// status register and on class_o with one class_valid pulse, NCLS+2 clocks
// after the start write.  A threshold above every sum must give the extra
// "no motion" class 3.
module tb_offset_threshold;
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
  logic [6:0] class_o;
  logic class_valid;
  int pulses = 0;

  offset_threshold #(.NCLS(3)) dut (.clk, .rst, .s_i(hm), .s_o(hr), .class_o, .class_valid);

  always @(posedge clk) if (class_valid) pulses++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] st;
    logic [31:0] best;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 60; t++) begin
      int signed sc[3], bi[3];
      int signed mx;
      int k, p0;
      k = 0;
      for (int j = 0; j < 3; j++) begin
        sc[j] = $signed($urandom_range(0, 200000)) - 100000;
        bi[j] = $signed($urandom_range(0, 20000)) - 10000;
        wbw32(8'(4 * j), sc[j]);
        wbw32(8'(8'h20 + 4 * j), bi[j]);
      end
      for (int j = 0; j < 3; j++) if (j == 0 || sc[j] + bi[j] > sc[k] + bi[k]) k = j;
      mx = sc[k] + bi[k];
      wbw32(8'h40, (t % 4 == 3) ? 32'h7fff_ffff : 32'h8000_0000);
      p0 = pulses;
      wbw(8'h50, 8'h01);
      repeat (5) @(negedge clk);
      check(pulses == p0 + 1, "one class_valid pulse");
      wbr(8'h51, st);
      wbr32(8'h54, best);
      if (t % 4 == 3) check(st == {1'b1, 7'd3}, "no motion class when below threshold");
      else check(st == {1'b1, 7'(k)}, $sformatf("class %0d exp %0d", st[6:0], k));
      check(class_o == st[6:0], "class_o");
      check($signed(best) == mx, "winning sum");
    end
    finish();
  end
endmodule
