// tb_pb_timer: with a small prescaler the tick period must be exactly
// PRESCALE*reload clocks (a cycle-count check), the tick counter port must
// count ticks, and disabling the timer must stop the ticks.
module tb_pb_timer;
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
  logic [7:0] pb_rdata;
  // processor port bus driven by the test: one OUTPUT or INPUT per call
  pb_port_t pb = '{id: '0, dout: '0, wr: 1'b0, rd: 1'b0};

  task automatic pbw(input logic [7:0] id, input logic [7:0] d);
    @(negedge clk);
    pb = '{id: id, dout: d, wr: 1'b1, rd: 1'b0};
    @(negedge clk);
    pb = '{id: id, dout: '0, wr: 1'b0, rd: 1'b0};
  endtask

  task automatic pbr(input logic [7:0] id, output logic [7:0] d);
    @(negedge clk);
    pb = '{id: id, dout: '0, wr: 1'b0, rd: 1'b1};
    @(negedge clk);
    d  = pb_rdata;
    pb = '{id: id, dout: '0, wr: 1'b0, rd: 1'b0};
  endtask
  localparam int PS = 7;
  logic tick;
  longint cyc = 0, last = -1;
  int nt = 0, bad_period = 0;
  int period = 0;

  pb_timer #(.BASE(PB_TIMER), .PRESCALE(PS)) dut (.clk, .rst, .pb, .rdata(pb_rdata), .tick);

  always @(posedge clk) begin
    cyc++;
    if (tick) begin
      if (last >= 0 && cyc - last != period) bad_period++;
      last = cyc;
      nt++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    pbw(PB_TIMER + 0, 8'd44);
    pbw(PB_TIMER + 1, 8'd1);          // reload 300
    pbr(PB_TIMER + 0, d);
    check(d == 8'd44, "reload low reads back");
    period = PS * 300;
    pbw(PB_TIMER + 2, 8'd1);
    repeat (PS * 300 * 5 + 50) @(negedge clk);
    check(nt == 5, $sformatf("5 ticks in 5 periods, got %0d", nt));
    check(bad_period == 0, $sformatf("tick period is %0d clocks", period));
    pbr(PB_TIMER + 3, d);
    check(d == 8'(nt), $sformatf("tick count port %0d", d));
    pbw(PB_TIMER + 2, 8'd0);
    nt = 0;
    repeat (PS * 300 * 2) @(negedge clk);
    check(nt == 0, "disabled timer does not tick");
    // short reload: period PS*3
    pbw(PB_TIMER + 0, 8'd3);
    pbw(PB_TIMER + 1, 8'd0);
    last = -1;
    period = PS * 3;
    pbw(PB_TIMER + 2, 8'd1);
    repeat (PS * 3 * 20 + 5) @(negedge clk);
    check(nt == 20, $sformatf("20 short ticks, got %0d", nt));
    check(bad_period == 0, "short period exact");
    finish();
  end
endmodule
