// tb_wb_mem: write and read back random bytes in a RAM instance, check the
// one-wait-state acknowledge, and check that a ROM instance ignores writes.
module tb_wb_mem;
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
  wb_m2s_t rm = WB_M2S_IDLE;
  wb_s2m_t rr;
  logic [7:0] ref_mem [4096];
  logic [7:0] d;

  wb_mem #(.BYTES(4096), .READ_ONLY(1'b0)) dut (.clk, .rst, .s_i(hm), .s_o(hr));
  wb_mem #(.BYTES(256), .READ_ONLY(1'b1)) rom (.clk, .rst, .s_i(rm), .s_o(rr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4096; i++) begin
      ref_mem[i] = 8'($urandom);
      wbw(24'(i), ref_mem[i]);
    end
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(0, 4095);
      wbr(24'(a), d);
      check(d == ref_mem[a], $sformatf("RAM byte %0d", a));
    end
    // acknowledge one clock after STB
    @(negedge clk);
    hm = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: 24'd5, dat: '0};
    @(negedge clk);
    check(hr.ack, "ack one clock after stb");
    hm = WB_M2S_IDLE;
    @(negedge clk);
    // ROM: preset contents, writes ignored
    for (int i = 0; i < 256; i++) rom.mem[i] = 8'(i * 7);
    @(negedge clk);
    rm = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: 24'd9, dat: 8'hAA};
    do @(negedge clk); while (!rr.ack);
    rm = WB_M2S_IDLE;
    @(negedge clk);
    rm = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: 24'd9, dat: 8'h00};
    do @(negedge clk); while (!rr.ack);
    check(rr.dat == 8'd63, "ROM ignores writes");
    rm = WB_M2S_IDLE;
    t0 = 0;
    finish();
  end
endmodule
