// tb_dma_engine: the four DMA modes on a 4 KB memory.  Memory to memory
// copies 300 random bytes; FIFO to memory writes 200 bytes offered on the
// input stream with random gaps; memory to FIFO sends 150 bytes to an
// output stream whose ready is random; clear zeroes 100 bytes.  Every
// destination byte and the bytes just outside it are compared with the
// expected contents, and done/irq are checked.
module tb_dma_engine;
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
  logic fin_valid = 1'b0, fin_ready, fout_valid, fout_ready = 1'b0, irq;
  logic [7:0] fin_data = '0, fout_data;
  logic [7:0] got [$];

  dma_engine dut (.clk, .rst, .s_i(hm), .s_o(hr), .m_o(mm), .m_i(mr),
                  .fin_valid, .fin_ready, .fin_data, .fout_valid, .fout_ready, .fout_data, .irq);
  wb_mem #(.BYTES(4096)) mem (.clk, .rst, .s_i(mm), .s_o(mr));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    finish();
  end

  // output stream sink
  always @(posedge clk) begin
    if (fout_valid && fout_ready) got.push_back(fout_data);
    fout_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic go(input logic [31:0] s, input logic [31:0] d, input logic [31:0] n, input logic [1:0] mode);
    logic [7:0] st;
    wbw32(8'h00, s);
    wbw32(8'h04, d);
    wbw32(8'h08, n);
    wbw(8'h0C, {1'b1, 5'd0, mode});
    do begin
      repeat (10) @(negedge clk);
      wbr(8'h0D, st);
    end while (!st[1]);
    check(irq, "irq with done");
  endtask

  logic [7:0] src [300];
  logic [7:0] fdat [200];

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4096; i++) mem.mem[i] = 8'hEE;
    for (int i = 0; i < 300; i++) begin
      src[i] = 8'($urandom);
      mem.mem[i] = src[i];
    end
    // memory to memory
    go(0, 'h400, 300, 2'd0);
    for (int i = 0; i < 300; i++) check(mem.mem['h400 + i] == src[i], "m2m byte");
    check(mem.mem['h400 + 300] == 8'hEE && mem.mem['h3FF] == 8'hEE, "m2m bounds");
    // FIFO to memory
    for (int i = 0; i < 200; i++) fdat[i] = 8'($urandom);
    fork
      go(0, 'h800, 200, 2'd1);
      begin
        for (int i = 0; i < 200; i++) begin
          @(negedge clk);
          fin_valid = ($urandom_range(0, 3) != 0);
          fin_data  = fdat[i];
          if (!fin_valid) i--;
          else begin
            @(posedge clk);
            while (!fin_ready) @(posedge clk);
            @(negedge clk);
            fin_valid = 1'b0;
          end
        end
      end
    join
    for (int i = 0; i < 200; i++) check(mem.mem['h800 + i] == fdat[i], $sformatf("f2m byte %0d", i));
    // memory to FIFO
    go(16, 0, 150, 2'd2);
    check(got.size() == 150, $sformatf("m2f byte count %0d", got.size()));
    for (int i = 0; i < 150 && i < got.size(); i++) check(got[i] == src[16 + i], "m2f byte");
    // clear
    go(0, 'h410, 100, 2'd3);
    for (int i = 0; i < 100; i++) check(mem.mem['h410 + i] == 0, "clear byte");
    check(mem.mem['h410 + 100] == src[116] && mem.mem['h40F] == src[15], "clear bounds");
    finish();
  end
endmodule
