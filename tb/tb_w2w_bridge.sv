// tb_w2w_bridge: accesses on the bus 0 side at 0x3xxxxx must reach a 4 KB
// memory on the bus 1 side at the low 20 address bits; random writes and
// read-back through the bridge, plus direct inspection of the memory.
module tb_w2w_bridge;
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
  logic [7:0] ref_mem [4096];

  w2w_bridge #(.WIN_BITS(20)) dut (.clk, .rst, .s_i(hm), .s_o(hr), .m_o(mm), .m_i(mr));
  wb_mem #(.BYTES(4096)) mem (.clk, .rst, .s_i(mm), .s_o(mr));

  // bus 1 side must see only window addresses
  always @(posedge clk) if (mm.cyc && mm.adr[23:20] != 4'h0) begin
    failures++;
    $display("FAIL: address not reduced");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      int a;
      a = $urandom_range(0, 4095);
      ref_mem[a] = 8'($urandom);
      wbw(24'h300000 + 24'(a), ref_mem[a]);
      check(mem.mem[a] == ref_mem[a], "write reached bus 1");
      wbr(24'h300000 + 24'(a), d);
      check(d == ref_mem[a], "read through bridge");
    end
    finish();
  end
endmodule
