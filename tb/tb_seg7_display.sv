// tb_seg7_display: every byte value written over the bus must show both
// nibbles in the hexadecimal seven segment font given here as a table of
// the ten digits and six letters; a result pulse then replaces the value.
module tb_seg7_display;
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
  logic res_valid = 1'b0;
  logic [7:0] res_data = '0;
  logic [6:0] seg0, seg1;
  // segments {g,f,e,d,c,b,a} lit for 0..F
  logic [6:0] font [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  seg7_display dut (.clk, .rst, .s_i(hm), .s_o(hr), .res_valid, .res_data, .seg0, .seg1);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int v = 0; v < 256; v++) begin
      wbw(8'h00, 8'(v));
      check(seg0 == font[v % 16] && seg1 == font[v / 16], $sformatf("value %02x", v));
    end
    wbr(8'h00, d);
    check(d == 8'hFF, "value readable");
    @(negedge clk) begin res_valid = 1'b1; res_data = 8'h02; end
    @(negedge clk) res_valid = 1'b0;
    check(seg0 == font[2] && seg1 == font[0], "result shown");
    finish();
  end
endmodule
