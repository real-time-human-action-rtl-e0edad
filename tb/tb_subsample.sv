// tb_subsample: halve a random 24x18 image in selection mode and in
// interpolation mode and compare every output pixel with the top left pixel
// or the rounded 2x2 mean computed here; the pixel count result and the
// bytes around the output image (which must stay untouched) are checked.
module tb_subsample;
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
  localparam int W = 24, H = 18, SRC = 'h100, DST = 'h400;
  wb_m2s_t mm;
  wb_s2m_t mr;
  logic irq;
  logic [7:0] img [W*H];

  subsample dut (.clk, .rst, .s_i(hm), .s_o(hr), .m_o(mm), .m_i(mr), .irq);
  wb_mem #(.BYTES(4096)) mem (.clk, .rst, .s_i(mm), .s_o(mr));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] st;
    logic [31:0] r0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < W*H; i++) begin
      img[i] = 8'($urandom);
      mem.mem[SRC + i] = img[i];
    end
    for (int i = 0; i < 1024; i++) mem.mem[DST - 16 + i] = 8'h5A;
    for (int mode = 0; mode < 2; mode++) begin
      wbw32(8'h00, SRC);
      wbw32(8'h04, DST);
      wbw32(8'h08, W);
      wbw32(8'h0C, H);
      wbw32(8'h10, 32'(mode));
      wbw(8'h30, 8'h01);
      do begin
        repeat (20) @(negedge clk);
        wbr(8'h31, st);
      end while (!st[1]);
      for (int y = 0; y < H / 2; y++)
        for (int x = 0; x < W / 2; x++) begin
          int s;
          logic [7:0] e;
          s = 2 * y * W + 2 * x;
          if (mode == 0) e = img[s];
          else e = 8'((int'(img[s]) + int'(img[s+1]) + int'(img[s+W]) + int'(img[s+W+1]) + 2) / 4);
          check(mem.mem[DST + y * (W / 2) + x] == e,
                $sformatf("mode %0d pixel (%0d,%0d) got %0d exp %0d", mode, x, y, mem.mem[DST + y * (W / 2) + x], e));
        end
      check(mem.mem[DST - 1] == 8'h5A && mem.mem[DST + (W / 2) * (H / 2)] == 8'h5A, "no write outside the output");
      wbr32(8'h20, r0);
      check(r0 == 32'((W / 2) * (H / 2)), "pixel count");
    end
    finish();
  end
endmodule
