// tb_par_port: bytes pushed by bus writes and by the input stream must
// leave on the PC side in order, with the PC side ready toggling at random;
// the input stream must stall while the FIFO is full and the level register
// must count waiting bytes.
module tb_par_port;
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
  logic in_valid = 1'b0, in_ready, pp_valid, pp_ready = 1'b0;
  logic [7:0] in_data = '0, pp_data;
  logic [7:0] exp_q [$];
  int got = 0;

  par_port #(.DEPTH(16)) dut (.clk, .rst, .s_i(hm), .s_o(hr), .in_valid, .in_ready, .in_data,
                              .pp_valid, .pp_ready, .pp_data);

  always @(posedge clk) if (pp_valid && pp_ready) begin
    logic [7:0] e;
    e = exp_q.pop_front();
    check(pp_data == e, $sformatf("byte %0d: got %02x exp %02x", got, pp_data, e));
    got++;
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
    // fill through the bus with the PC side stopped
    for (int i = 0; i < 5; i++) begin
      exp_q.push_back(8'(i + 100));
      wbw(8'h00, 8'(i + 100));
    end
    wbr(8'h01, d);
    check(d == 5, "level 5");
    // stream until full
    for (int i = 0; i < 11; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = 8'(i);
      exp_q.push_back(8'(i));
    end
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = 8'hAB;
    #1;
    check(!in_ready, "full FIFO stalls the stream");
    // drain at random rate while streaming more
    for (int i = 0; i < 200; i++) begin
      pp_ready = ($urandom_range(0, 1) == 1);
      in_valid = ($urandom_range(0, 1) == 1);
      in_data  = 8'($urandom);
      @(posedge clk);
      if (in_valid && in_ready) exp_q.push_back(in_data);
      @(negedge clk);
    end
    in_valid = 1'b0;
    pp_ready = 1'b1;
    repeat (40) @(negedge clk);
    check(exp_q.size() == 0, "all bytes delivered");
    check(got > 50, "enough traffic");
    finish();
  end
endmodule
