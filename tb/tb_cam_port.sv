// tb_cam_port: full size 640x480 Bayer frames into the camera port.
// Raw samples follow a formula of position and frame number; for each
// captured frame every output pixel is compared with the 2x2 cell mean of
// the kept grey column and line (kept when floor((g+1)*O/G) changes),
// computed here.  Frames alternate between 100x80 and 200x160 and between
// the two buffers; a frame while disabled must not be captured.  Status,
// frame count, irq and its clearing, and frame buffer reads over Wishbone
// are checked.  Pixels arrive with random gaps.
module tb_cam_port;
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
  logic cam_valid = 1'b0, cam_sof = 1'b0;
  logic [7:0] cam_data = '0;
  wb_m2s_t fm = WB_M2S_IDLE;
  wb_s2m_t fr;
  logic irq;

  cam_port #(.IN_W(640), .IN_H(480)) dut (
    .clk, .rst, .cam_valid, .cam_sof, .cam_data,
    .fb_i(fm), .fb_o(fr), .reg_i(hm), .reg_o(hr), .irq
  );

  function automatic logic [7:0] raw(int x, int y, int f);
    return 8'((x * 5 + y * 3 + f * 17 + (x ^ y)) & 255);
  endfunction

  function automatic logic [7:0] grey(int gx, int gy, int f);
    return 8'((int'(raw(2*gx, 2*gy, f)) + int'(raw(2*gx+1, 2*gy, f)) +
               int'(raw(2*gx, 2*gy+1, f)) + int'(raw(2*gx+1, 2*gy+1, f))) / 4);
  endfunction

  task automatic send_frame(input int f);
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++) begin
        while ($urandom_range(0, 9) == 0) begin
          @(negedge clk);
          cam_valid = 1'b0;
        end
        @(negedge clk);
        cam_valid = 1'b1;
        cam_sof   = (x == 0 && y == 0);
        cam_data  = raw(x, y, f);
      end
    @(negedge clk);
    cam_valid = 1'b0;
    cam_sof   = 1'b0;
  endtask

  task automatic check_frame(input int f, input int ow, input int oh, input int buffer);
    int oy, ox, bad;
    oy = 0;
    bad = 0;
    for (int gy = 0; gy < 240; gy++) begin
      if ((gy + 1) * oh / 240 != gy * oh / 240) begin
        ox = 0;
        for (int gx = 0; gx < 320; gx++)
          if ((gx + 1) * ow / 320 != gx * ow / 320) begin
            if (dut.fb[buffer * 32768 + oy * ow + ox] != grey(gx, gy, f)) bad++;
            ox++;
          end
        oy++;
      end
    end
    check(bad == 0, $sformatf("frame %0d: %0d wrong pixels", f, bad));
    check(oy == oh, "line count");
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] st, d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // disabled: nothing captured
    send_frame(0);
    wbr(8'h02, d);
    check(d == 0 && !irq, "disabled port captures nothing");
    // frame 1 at 100x80 into buffer 0
    wbw(8'h00, 8'h01);
    send_frame(1);
    wbr(8'h01, st);
    check(st == 8'h02, "ready, last buffer 0");
    check(irq, "irq on frame ready");
    check_frame(1, 100, 80, 0);
    wbw(8'h01, 8'h00);
    check(!irq, "irq cleared");
    // frame 2 at 200x160 into buffer 1
    wbw(8'h00, 8'h03);
    send_frame(2);
    wbr(8'h01, st);
    check(st == 8'h03, "ready, last buffer 1");
    check_frame(2, 200, 160, 1);
    check_frame(1, 100, 80, 0);   // previous frame kept
    // frame 3 back to 100x80, buffer 0
    wbw(8'h00, 8'h01);
    send_frame(3);
    check_frame(3, 100, 80, 0);
    wbr(8'h02, d);
    check(d == 3, "frame count");
    // read some of buffer 1 over Wishbone
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      fm = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: 24'(32768 + 200 * i + 3 * i), dat: '0};
      do @(negedge clk); while (!fr.ack);
      check(fr.dat == dut.fb[32768 + 200 * i + 3 * i], "frame buffer read");
      fm = WB_M2S_IDLE;
    end
    finish();
  end
endmodule
