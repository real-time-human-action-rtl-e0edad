// tb_coproc_if: parameter registers written byte by byte must appear on
// param_o and read back; result inputs must read back at 0x20-0x2F; a start
// write gives one start pulse and is ignored while busy; done sets status
// bit 1 and irq, and the next start clears them.
module tb_coproc_if;
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
  logic [31:0] param [8];
  logic [31:0] result [4];
  logic start, busy = 1'b0, done = 1'b0, irq;
  int starts = 0;

  coproc_if dut (.clk, .rst, .s_i(hm), .s_o(hr), .param_o(param), .start_o(start),
                 .result_i(result), .busy_i(busy), .done_i(done), .irq_o(irq));

  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [31:0] v [8];
    logic [31:0] r;
    logic [7:0] st;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 8; i++) begin
      v[i] = $urandom;
      wbw32(8'(4 * i), v[i]);
    end
    for (int i = 0; i < 8; i++) begin
      check(param[i] == v[i], "param_o");
      wbr32(8'(4 * i), r);
      check(r == v[i], "param read back");
    end
    for (int i = 0; i < 4; i++) result[i] = $urandom;
    for (int i = 0; i < 4; i++) begin
      wbr32(8'(8'h20 + 4 * i), r);
      check(r == result[i], "result read");
    end
    wbw(8'h30, 8'h01);
    @(negedge clk);
    check(starts == 1, "one start pulse");
    busy = 1'b1;
    wbw(8'h30, 8'h01);
    @(negedge clk);
    check(starts == 1, "start ignored while busy");
    wbr(8'h31, st);
    check(st[1:0] == 2'b01, "status busy");
    @(negedge clk) begin busy = 1'b0; done = 1'b1; end
    @(negedge clk) done = 1'b0;
    wbr(8'h31, st);
    check(st[1:0] == 2'b10 && irq, "status done and irq");
    wbw(8'h30, 8'h01);
    @(negedge clk);
    check(starts == 2 && !irq, "restart clears done");
    finish();
  end
endmodule
