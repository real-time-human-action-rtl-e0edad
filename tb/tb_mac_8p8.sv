// tb_mac_8p8: random operand pairs into the 8.8 x 8.8 -> 24.8 MAC.
// The expected sum is formed with 64-bit integers as the sum of
// floor(a*b / 256), and the two-stage latency is checked: idle falls with
// en and is back two clocks after the last pair.
module tb_mac_8p8;
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
  logic clr = 1'b0, en = 1'b0, idle;
  logic signed [15:0] a = '0, b = '0;
  logic signed [31:0] acc;
  longint expv;

  mac_8p8 dut (.clk, .rst, .clr, .en, .a, .b, .acc, .idle);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk) clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      expv = 0;
      for (int n = 0; n < 100 + run * 10; n++) begin
        a  = 16'($urandom);
        b  = (run % 2 == 0) ? 16'($urandom) : 16'($urandom_range(0, 255));
        en = ($urandom_range(0, 3) != 0) || (n == 99 + run * 10);
        if (en) expv += (longint'(a) * longint'(b)) >>> 8;
        @(negedge clk);
      end
      en = 1'b0;
      check(!idle, "idle while the last product is in flight");
      @(negedge clk);
      check(idle, "idle two clocks after the last pair");
      check(acc == 32'(expv), $sformatf("acc %0d expected %0d", acc, 32'(expv)));
    end
    // one exact small case: 1.5 * -2.25 = -3.375 -> 24.8 = -864
    @(negedge clk) clr = 1'b1;
    @(negedge clk) begin clr = 1'b0; a = 16'sh0180; b = -16'sh0240; en = 1'b1; end
    @(negedge clk) en = 1'b0;
    repeat (2) @(negedge clk);
    check(acc == -32'sd864, "1.5 * -2.25");
    finish();
  end
endmodule
