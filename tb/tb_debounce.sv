// tb_debounce: bursts of bounces shorter than STABLE clocks must not move
// the clean output; a level held for STABLE clocks must appear after the
// two synchroniser stages plus STABLE clocks (cycle-count check), with
// exactly one rise pulse per press.
module tb_debounce;
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
  localparam int ST = 50;
  logic raw = 1'b0, clean, rise;
  int rises = 0;

  debounce #(.STABLE(ST)) dut (.clk, .rst, .raw, .clean, .rise);

  always @(posedge clk) if (rise) rises++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < 4; p++) begin
      // bounce
      for (int i = 0; i < 20; i++) begin
        raw = ~raw;
        repeat ($urandom_range(1, ST - 5)) @(negedge clk);
        check(clean == (p % 2 == 1), $sformatf("press %0d: no change while bouncing", p));
      end
      raw = (p % 2 == 0);
      t = 0;
      while (clean != raw && t < 10 * ST) begin
        @(negedge clk);
        t++;
      end
      check(clean == raw, $sformatf("press %0d settles", p));
      check(t >= ST && t <= ST + 3, $sformatf("press %0d settle time %0d clocks", p, t));
      repeat (10) @(negedge clk);
    end
    check(rises == 2, $sformatf("one rise per press, got %0d", rises));
    finish();
  end
endmodule
