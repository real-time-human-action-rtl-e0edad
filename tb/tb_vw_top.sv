// tb_vw_top: the whole recognition system at its default size, end to end.
//
// The testbench plays the top level processor's firmware through the host
// port and streams full 640x480 Bayer frames of a synthetic scene (a bright
// block moving to the right over a textured background) into the camera
// port.  Per frame it runs what the system pipeline does: the four
// difference operators update the MHI in internal RAM (one quadrant each,
// reaching bus 1 through the bridge), and the DMA engine copies the frame to
// the external SRAM as the next previous frame.  Then three inner product
// cores compute one classifier each against weights in the internal ROM,
// the offset and threshold unit picks the class and the display shows it.
// Everything is compared with a model computed here: grey frames, MHI,
// 24.8 inner products, offsets and the winning class.  It then captures one
// 200x160 frame and halves it with the sub-sample core, sends MHI bytes to
// the parallel port (DMA memory to FIFO), loads bytes from the FIFO input
// into the external bus 1 SRAM, and classifies once more with a threshold
// that forces the no-motion class.  Finally it acts as the top level
// processor on the port bus: bus accesses through the PicoBlaze to
// Wishbone bridge, a camera register write over I2C (no device answers, so
// NACK is expected), a byte on the serial port decoded here, the DIP
// switches and LEDs, a bouncing button press and a timer tick, both seen
// through the interrupt handler.  Last, the Intel hex engine uploads a data
// record into the external SRAM and answers a read request for the camera
// frame counter, and the filter (Gaussian), edge detector (Sobel) and
// rotate (quarter turn) cores run together on the final MHI into the
// external bus 1 SRAM.  Each
// mechanism is counted and must have
// happened at least once.
module tb_vw_top;
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
  localparam int NF = 5;           // frames in the one-shot capture
  localparam int OW = 100, OH = 80, NPIX = OW * OH;
  localparam logic [23:0] CAMR = 24'h400000, DMAR = 24'h400100, PARR = 24'h400300;
  localparam logic [23:0] SUBR = 24'h400500, DIFFR = 24'h400800;
  localparam logic [23:0] MHI0 = 24'h340000, CLSR = 24'h360000, IPR = 24'h360100;
  localparam logic [23:0] PREV = 24'h000000, HALF = 24'h010000;
  localparam logic [7:0]  THR = 8'd20;
  // 12 frames/s at a 20 MHz system clock: 80 ms = 1,600,000 clocks per frame;
  // pipelined output latency 0.064 s = 1,280,000 clocks
  localparam longint FRAME_CLKS = 1600000, LATENCY_CLKS = 1280000;
  longint t_ready, t_max_frame = 0, t_last, t_result;

  logic cam_valid = 1'b0, cam_sof = 1'b0;
  logic [7:0] cam_data = '0;
  wb_m2s_t sram0_o, sram1_o;
  wb_s2m_t sram0_i, sram1_i;
  logic fin_valid = 1'b0, fin_ready, pp_valid, pp_ready = 1'b1;
  logic [7:0] fin_data = '0, pp_data;
  logic [6:0] seg0, seg1;
  logic [13:0] irq;
  logic [8:0] bus0_stall;
  logic pb_int, txd, scl_oe, sda_oe;
  logic [3:0] buttons = '0;
  logic [7:0] dip = 8'hA5, leds;
  logic hex_rx_valid = 1'b0, hex_rx_ready, hex_tx_valid, hex_tx_ready = 1'b1;
  logic [7:0] hex_rx_data = '0, hex_tx_data;
  string hex_reply = "";
  always @(posedge clk) if (hex_tx_valid && hex_tx_ready) hex_reply = {hex_reply, string'(hex_tx_data)};

  function automatic string hx(input logic [7:0] b);
    string h;
    h = $sformatf("%02x", b);
    return h.toupper();
  endfunction

  // Intel hex record with its checksum
  function automatic string rec(input logic [7:0] typ, input logic [15:0] a, input logic [7:0] d [$]);
    string r;
    logic [7:0] sum;
    sum = 8'(d.size()) + a[15:8] + a[7:0] + typ;
    r = {":", hx(8'(d.size())), hx(a[15:8]), hx(a[7:0]), hx(typ)};
    foreach (d[i]) begin
      r = {r, hx(d[i])};
      sum += d[i];
    end
    return {r, hx(8'(-sum)), "\r\n"};
  endfunction

  task automatic hex_send(input string str);
    for (int i = 0; i < str.len(); i++) begin
      @(negedge clk);
      hex_rx_valid = 1'b1;
      hex_rx_data  = str[i];
      do @(posedge clk); while (!hex_rx_ready);
      @(negedge clk);
      hex_rx_valid = 1'b0;
    end
  endtask
  logic [7:0] bus1_stall;

  vw_top dut (
    .clk, .rst, .host_i(hm), .host_o(hr), .cam_valid, .cam_sof, .cam_data,
    .sram0_o, .sram0_i, .sram1_o, .sram1_i, .fin_valid, .fin_ready, .fin_data,
    .pp_valid, .pp_ready, .pp_data, .seg0, .seg1, .irq, .bus0_stall, .bus1_stall,
    .pb_i(pb), .pb_in(pb_rdata), .pb_int, .buttons, .dip, .leds, .txd,
    .scl_oe, .sda_oe, .sda_i(!sda_oe),
    .hex_rx_valid, .hex_rx_ready, .hex_rx_data, .hex_tx_valid, .hex_tx_ready, .hex_tx_data
  );
  wb_sram_model #(.BYTES(2097152), .WAIT(0)) sram0 (.clk, .rst, .s_i(sram0_o), .s_o(sram0_i));
  wb_sram_model #(.BYTES(262144), .WAIT(2)) sram1 (.clk, .rst, .s_i(sram1_o), .s_o(sram1_i));

  // ---------------- mechanism counters ----------------
  int n_bus0_stall = 0, n_bus1_stall = 0, n_bridge = 0, n_frames = 0, n_res_switch = 0;
  int n_dma_mode [4] = '{0, 0, 0, 0};
  int n_sub = 0, n_nomotion = 0, n_class = 0, n_pp = 0, n_diff_par = 0;
  int n_lib = 0, n_hex = 0, n_pbwb = 0, n_scl = 0, n_uart = 0, n_btn_int = 0, n_tick_int = 0;
  longint cyc_now = 0;
  logic scl_q = 1'b0;
  always @(posedge clk) begin
    scl_q <= scl_oe;
    if (scl_q && !scl_oe && !rst) n_scl++;
    if (dut.m0_req[7].cyc && dut.m0_rsp[7].ack) n_pbwb++;
    if (dut.m0_req[8].cyc && dut.m0_rsp[8].ack) n_hex++;
    cyc_now++;
    if (bus0_stall != 0) n_bus0_stall++;
    if (bus1_stall != 0) n_bus1_stall++;
    if (dut.m1_req[0].cyc && dut.m1_rsp[0].ack) n_bridge++;
    if (pp_valid && pp_ready && !rst) n_pp++;
  end

  // ---------------- scene and reference model ----------------
  function automatic logic [7:0] raw(int x, int y, int f);
    int bx;
    bx = 60 + 70 * f;
    if (x >= bx && x < bx + 110 && y >= 180 && y < 300) return 8'd230;
    return 8'(((x * 3) ^ (y * 5)) & 63);
  endfunction
  function automatic logic [7:0] grey(int gx, int gy, int f);
    return 8'((int'(raw(2*gx, 2*gy, f)) + int'(raw(2*gx+1, 2*gy, f)) +
               int'(raw(2*gx, 2*gy+1, f)) + int'(raw(2*gx+1, 2*gy+1, f))) / 4);
  endfunction
  // kept grey column / line for output index o of size n from g
  function automatic int kept(int o, int n, int g);
    int k;
    k = 0;
    for (int i = 0; i < g; i++)
      if ((i + 1) * n / g != i * n / g) begin
        if (k == o) return i;
        k++;
      end
    return -1;
  endfunction
  logic [7:0] img [NF][NPIX];
  logic [7:0] mhi [NPIX];
  int colx [200], rowy [160];

  function automatic logic signed [15:0] weight(int j, int i);
    int x, y;
    x = i % OW;
    y = i / OW;
    case (j)
      0: return (y >= 30 && y < 52) ? 16'sh0100 : -16'sh0030;   // horizontal band
      1: return (x >= 40 && x < 60) ? 16'sh0100 : -16'sh0030;   // vertical band
      default: return 16'(((i * 37) % 129) - 64);               // "other"
    endcase
  endfunction
  function automatic int signed bias(int j);
    return (j == 0) ? -5000 : (j == 1) ? 2000 : 300;
  endfunction

  // ---------------- camera ----------------
  task automatic send_frame(input int f);
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++) begin
        @(negedge clk);
        cam_valid = 1'b1;
        cam_sof   = (x == 0 && y == 0);
        cam_data  = raw(x, y, f);
      end
    @(negedge clk);
    cam_valid = 1'b0;
    cam_sof   = 1'b0;
  endtask

  task automatic wait_core(input logic [23:0] base);
    logic [7:0] st;
    do begin
      repeat (100) @(negedge clk);
      wbr(base + 24'h31, st);
    end while (!st[1]);
  endtask

  task automatic dma(input logic [31:0] s, input logic [31:0] d, input logic [31:0] n, input int mode);
    logic [7:0] st;
    wbw32(DMAR + 24'h00, s);
    wbw32(DMAR + 24'h04, d);
    wbw32(DMAR + 24'h08, n);
    wbw(DMAR + 24'h0C, {1'b1, 5'd0, 2'(mode)});
    do begin
      repeat (100) @(negedge clk);
      wbr(DMAR + 24'h0D, st);
    end while (!st[1]);
    n_dma_mode[mode]++;
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish();
  end

  // camera stream runs on its own, one frame after another
  int cam_frames_to_send = 0;
  int cam_first = 0;
  initial begin
    wait (!rst);
    forever begin
      wait (cam_frames_to_send > 0);
      send_frame(cam_first);
      cam_first++;
      cam_frames_to_send--;
    end
  end

  initial begin
    logic [7:0] st, b, d;
    logic [31:0] r;
    longint sc [3];
    int best;
    // load the SVM weight vectors into the internal ROM (device configuration)
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < NPIX; i++) begin
        logic [15:0] w;
        w = weight(j, i);
        dut.u_rom.mem[j * 2 * NPIX + 2 * i]     = w[7:0];
        dut.u_rom.mem[j * 2 * NPIX + 2 * i + 1] = w[15:8];
      end
    for (int i = 0; i < OW; i++) colx[i] = kept(i, OW, 320);
    for (int i = 0; i < OH; i++) rowy[i] = kept(i, OH, 240);
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < NPIX; i++) img[f][i] = grey(colx[i % OW], rowy[i / OW], f);
    for (int i = 0; i < NPIX; i++) mhi[i] = 8'd0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // clear the MHI in internal RAM (DMA clear, through the bridge)
    dma(0, MHI0, NPIX, 3);
    // one-shot capture of NF frames at 100x80
    wbw(CAMR, 8'h01);
    cam_frames_to_send = NF;
    for (int f = 0; f < NF; f++) begin
      wait (irq[0]);
      t_ready = cyc_now;
      wbr(CAMR + 24'h01, st);
      b = {7'd0, st[0]};
      wbw(CAMR + 24'h01, 8'h00);
      n_frames++;
      if (f == NF - 1) wbw(CAMR, 8'h00);   // stop after this frame
      if (f > 0) begin
        // four difference operators, one quadrant each
        for (int q = 0; q < 4; q++) begin
          logic [23:0] cr;
          int off;
          cr  = DIFFR + 24'(q * 256);
          off = (q / 2) * (OH / 2) * OW + (q % 2) * (OW / 2);
          wbw32(cr + 24'h00, 32'(24'h200000 + {b, 15'd0} + 24'(off)));
          wbw32(cr + 24'h04, 32'(PREV + 24'(off)));
          wbw32(cr + 24'h08, 32'(MHI0 + 24'(off)));
          wbw32(cr + 24'h0C, OW / 2);
          wbw32(cr + 24'h10, OH / 2);
          wbw32(cr + 24'h14, OW);
          wbw32(cr + 24'h18, 32'(THR));
        end
        for (int q = 0; q < 4; q++) wbw(DIFFR + 24'(q * 256) + 24'h30, 8'h01);
        wbr(DIFFR + 24'h31, st);
        wbr(DIFFR + 24'h331, d);
        if (st[0] && d[0]) n_diff_par++;
        for (int q = 0; q < 4; q++) wait_core(DIFFR + 24'(q * 256));
        // reference MHI update
        for (int i = 0; i < NPIX; i++) begin
          logic [7:0] c, p, dd;
          c = img[f][i];
          p = img[f-1][i];
          dd = (c > p) ? c - p : p - c;
          mhi[i] = (dd > THR) ? 8'd255 : (mhi[i] == 0) ? 8'd0 : mhi[i] - 1;
        end
      end
      // the camera frame must match the model
      begin
        int bad;
        bad = 0;
        for (int i = 0; i < NPIX; i++) if (dut.u_cam.fb[{b[0], 15'(i)}] != img[f][i]) bad++;
        check(bad == 0, $sformatf("frame %0d: %0d pixels differ", f, bad));
      end
      // keep this frame as the previous one
      dma(32'(24'h200000 + {b, 15'd0}), PREV, NPIX, 0);
      if (cyc_now - t_ready > t_max_frame) t_max_frame = cyc_now - t_ready;
      t_last = t_ready;
    end
    check(t_max_frame < FRAME_CLKS, $sformatf("per-frame work %0d clocks within 80 ms at 20 MHz", t_max_frame));
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < NPIX; i++) if (dut.u_ram.mem[i] != mhi[i]) bad++;
      check(bad == 0, $sformatf("MHI: %0d pixels differ", bad));
    end

    // three classifiers on three inner product cores, in parallel
    for (int j = 0; j < 3; j++) begin
      wbw32(IPR + 24'(j * 256) + 24'h00, 32'h40000);
      wbw32(IPR + 24'(j * 256) + 24'h04, 32'(24'h50000 + 24'(j * 2 * NPIX)));
      wbw32(IPR + 24'(j * 256) + 24'h08, NPIX);
    end
    for (int j = 0; j < 3; j++) wbw(IPR + 24'(j * 256) + 24'h30, 8'h01);
    for (int j = 0; j < 3; j++) wait_core(IPR + 24'(j * 256));
    best = 0;
    for (int j = 0; j < 3; j++) begin
      sc[j] = 0;
      for (int i = 0; i < NPIX; i++) sc[j] += (longint'({8'd0, mhi[i]}) * longint'(weight(j, i))) >>> 8;
      wbr32(IPR + 24'(j * 256) + 24'h20, r);
      check(r == 32'(sc[j]), $sformatf("inner product %0d: %0d exp %0d", j, $signed(r), sc[j]));
      wbw32(CLSR + 24'(4 * j), r);
      wbw32(CLSR + 24'h20 + 24'(4 * j), bias(j));
      if (sc[j] + bias(j) > sc[best] + bias(best)) best = j;
    end
    wbw32(CLSR + 24'h40, 32'h8000_0000);
    wbw(CLSR + 24'h50, 8'h01);
    repeat (10) @(negedge clk);
    wbr(CLSR + 24'h51, st);
    check(st == {1'b1, 7'(best)}, $sformatf("class %0d exp %0d", st[6:0], best));
    check(seg0 == dut.u_seg7.hex7(4'(best)) && seg1 == dut.u_seg7.hex7(4'd0), "display shows the class");
    check(best == 0, "horizontal motion recognised");
    t_result = cyc_now - t_last;
    check(t_result < LATENCY_CLKS, $sformatf("output latency %0d clocks within 64 ms at 20 MHz", t_result));
    n_class++;
    // no-motion class through the threshold
    wbw32(CLSR + 24'h40, 32'h7fff_ffff);
    wbw(CLSR + 24'h50, 8'h01);
    repeat (10) @(negedge clk);
    wbr(CLSR + 24'h51, st);
    check(st == {1'b1, 7'd3}, "no-motion class");
    if (st[6:0] == 7'd3) n_nomotion++;

    // MHI bytes to the PC through DMA memory-to-FIFO and the parallel port
    begin
      int n0;
      n0 = n_pp;
      dma(MHI0 + 24'd4000, 0, 64, 2);
      repeat (20) @(negedge clk);
      check(n_pp == n0 + 64, "64 bytes on the parallel port");
    end
    // FIFO input into the external bus 1 SRAM
    fork
      dma(0, 24'h300100, 32, 1);
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        fin_valid = 1'b1;
        fin_data  = 8'(i * 3 + 1);
        @(posedge clk);
        while (!fin_ready) @(posedge clk);
        @(negedge clk);
        fin_valid = 1'b0;
      end
    join
    for (int i = 0; i < 32; i++) check(sram1.mem['h100 + i] == 8'(i * 3 + 1), "FIFO to SRAM 1");

    // resolution switch: one 200x160 frame, halved by the sub-sample core
    wbw(CAMR, 8'h03);
    n_res_switch++;
    cam_frames_to_send = 1;
    wait (irq[0]);
    wbr(CAMR + 24'h01, st);
    b = {7'd0, st[0]};
    wbw(CAMR + 24'h01, 8'h00);
    wbw(CAMR, 8'h00);
    wbw32(SUBR + 24'h00, 32'(24'h200000 + {b, 15'd0}));
    wbw32(SUBR + 24'h04, 32'(HALF));
    wbw32(SUBR + 24'h08, 200);
    wbw32(SUBR + 24'h0C, 160);
    wbw32(SUBR + 24'h10, 1);
    wbw(SUBR + 24'h30, 8'h01);
    wait_core(SUBR);
    n_sub++;
    begin
      int bad, f;
      bad = 0;
      f = NF;
      for (int i = 0; i < 200; i++) colx[i] = kept(i, 200, 320);
      for (int i = 0; i < 160; i++) rowy[i] = kept(i, 160, 240);
      for (int y = 0; y < 80; y++)
        for (int x = 0; x < 100; x++) begin
          int s;
          s = int'(grey(colx[2*x], rowy[2*y], f)) + int'(grey(colx[2*x+1], rowy[2*y], f)) +
              int'(grey(colx[2*x], rowy[2*y+1], f)) + int'(grey(colx[2*x+1], rowy[2*y+1], f));
          if (sram0.mem['h10000 + 100 * y + x] != 8'((s + 2) / 4)) bad++;
        end
      check(bad == 0, $sformatf("sub-sampled frame: %0d pixels differ", bad));
    end

    // top level processor module on the port bus
    begin
      logic [7:0] d, st;
      int t;
      // bridge: write 4 bytes to the external SRAM, read them back
      pbw(PB_WB + 0, 8'h00);
      pbw(PB_WB + 1, 8'hF0);
      pbw(PB_WB + 2, 8'h01);
      for (int i = 0; i < 4; i++) pbw(PB_WB + 3, 8'(8'hC0 + i));
      pbw(PB_WB + 1, 8'hF0);
      pbw(PB_WB + 0, 8'h00);
      pbw(PB_WB + 4, 8'd4);
      for (int i = 0; i < 4; i++) begin
        t = 0;
        do begin pbr(PB_WB + 6, st); t++; end while (!st[2] && t < 100);
        pbr(PB_WB + 5, d);
        check(d == 8'(8'hC0 + i) && sram0.mem['h1F000 + i] == d,
              $sformatf("processor bridge byte %0d: %02x", i, d));
      end
      // camera I2C register write; nothing answers, so NACK is reported
      pbw(PB_WB + 0, 8'h00);
      pbw(PB_WB + 1, 8'h04);
      pbw(PB_WB + 2, 8'h40);
      pbw(PB_WB + 3, 8'h21);
      pbw(PB_WB + 3, 8'h12);
      pbw(PB_WB + 3, 8'h80);
      pbw(PB_WB + 3, 8'h01);
      t = 0;
      do begin
        repeat (100) @(negedge clk);
        wbr(24'h400404, st);
        t++;
      end while (st[0] && t < 1000);
      check(st == 8'h02, $sformatf("I2C transfer done with NACK, status %02x", st));
      check(n_scl == 28, $sformatf("28 I2C clock pulses (27 bits and STOP), got %0d", n_scl));
      // serial port byte, decoded at 20 MHz / 115200 baud
      fork
        begin
          logic [7:0] b;
          @(negedge txd);
          repeat (173 / 2) @(posedge clk);
          for (int i = 0; i < 8; i++) begin
            repeat (173) @(posedge clk);
            b[i] = txd;
          end
          repeat (173) @(posedge clk);
          check(b == 8'h5A && txd, $sformatf("serial byte %02x", b));
          n_uart++;
        end
        pbw(PB_UART, 8'h5A);
      join
      // DIP switches and LEDs
      pbr(PB_IO + 1, d);
      check(d == 8'hA5, "DIP switches");
      pbw(PB_IO + 2, 8'h3C);
      check(leds == 8'h3C, "LEDs");
      repeat (200) @(negedge clk);
      pbr(PB_IRQ + 1, d);
      check(d[2] && d[4] && d[6], $sformatf("serial done, frame ready and class result pending: %02x", d));
      // bouncing button press: interrupt source 0
      pbw(PB_IRQ + 1, 8'hFF);
      pbw(PB_IRQ + 0, 8'h01);
      for (int i = 0; i < 30; i++) begin
        buttons[0] = ~buttons[0];
        repeat ($urandom_range(10, 3000)) @(negedge clk);
      end
      buttons[0] = 1'b1;
      t = 0;
      while (!pb_int && t < 400000) begin @(negedge clk); t++; end
      pbr(PB_IRQ + 2, d);
      check(pb_int && d == 8'd0, $sformatf("button interrupt, source %0d", d));
      if (pb_int) n_btn_int++;
      pbr(PB_IO + 0, d);
      check(d == 8'h01, "button reads pressed");
      buttons[0] = 1'b0;
      pbw(PB_IRQ + 1, 8'hFF);
      // timer: reload 2 ms, interrupt source 1
      pbw(PB_IRQ + 0, 8'h02);
      pbw(PB_TIMER + 0, 8'd2);
      pbw(PB_TIMER + 1, 8'd0);
      pbw(PB_TIMER + 2, 8'd1);
      t = 0;
      while (!pb_int && t < 100000) begin @(negedge clk); t++; end
      pbr(PB_IRQ + 2, d);
      check(pb_int && d == 8'd1, $sformatf("timer interrupt, source %0d", d));
      check(t >= 39000 && t <= 40010, $sformatf("timer period 2 x 20000 clocks, got %0d", t));
      if (pb_int) n_tick_int++;
      pbw(PB_TIMER + 2, 8'd0);
    end

    // Intel hex engine: upload 3 bytes to 0x01F100, read the frame counter
    begin
      logic [7:0] fc;
      int t;
      hex_send(rec(8'h04, 16'h0000, '{8'h00, 8'h01}));
      hex_send(rec(8'h00, 16'hF100, '{8'h11, 8'h22, 8'h33}));
      repeat (20) @(negedge clk);
      check(sram0.mem['h1F100] == 8'h11 && sram0.mem['h1F101] == 8'h22 && sram0.mem['h1F102] == 8'h33,
            "Intel hex upload into the external SRAM");
      wbr(CAMR + 24'h02, fc);
      hex_reply = "";
      hex_send(rec(8'h04, 16'h0000, '{8'h00, 8'h40}));
      hex_send(rec(8'h06, 16'h0002, '{8'h01}));
      t = 0;
      while (hex_reply.len() < 15 && t < 1000) begin @(negedge clk); t++; end
      check(hex_reply == rec(8'h00, 16'h0002, '{fc}),
            $sformatf("Intel hex download of the frame counter: %s", hex_reply));
    end

    // filter, edge detector and rotate cores on the MHI, at the same time
    begin
      localparam logic [23:0] FILTR = 24'h360C00, EDGER = 24'h360D00, ROTR = 24'h360E00;
      int badf, bade, badr;
      for (int c = 0; c < 2; c++) begin
        logic [23:0] cr;
        cr = c == 0 ? FILTR : EDGER;
        wbw32(cr + 24'h00, 32'h040000);
        wbw32(cr + 24'h04, c == 0 ? 32'h010000 : 32'h020000);
        wbw32(cr + 24'h08, OW);
        wbw32(cr + 24'h0C, OH);
        wbw32(cr + 24'h10, OW);
        wbw32(cr + 24'h14, 1);
      end
      wbw32(ROTR + 24'h00, 32'h040000);
      wbw32(ROTR + 24'h04, 32'h030000);
      wbw32(ROTR + 24'h08, OW);
      wbw32(ROTR + 24'h0C, OH);
      wbw32(ROTR + 24'h10, OW);
      wbw32(ROTR + 24'h14, 0);
      wbw32(ROTR + 24'h18, 256);
      wbw(FILTR + 24'h30, 8'h01);
      wbw(EDGER + 24'h30, 8'h01);
      wbw(ROTR + 24'h30, 8'h01);
      wait_core(FILTR);
      wait_core(EDGER);
      wait_core(ROTR);
      badf = 0;
      bade = 0;
      badr = 0;
      for (int y = 0; y < OH; y++)
        for (int x = 0; x < OW; x++) begin
          int xs, ys, e;
          xs = OW / 2 + (y - OH / 2);   // quarter turn: c = 0, s = 1
          ys = OH / 2 - (x - OW / 2);
          e = (xs < 0 || xs >= OW || ys < 0 || ys >= OH) ? 0 : int'(mhi[ys * OW + xs]);
          if (int'(sram1.mem['h30000 + y * OW + x]) != e) badr++;
        end
      for (int y = 1; y < OH - 1; y++)
        for (int x = 1; x < OW - 1; x++) begin
          int g, gx, gy, m;
          g = 0;
          for (int r = -1; r <= 1; r++)
            for (int c = -1; c <= 1; c++)
              g += int'(mhi[(y + r) * OW + x + c]) * (r == 0 ? 2 : 1) * (c == 0 ? 2 : 1);
          if (int'(sram1.mem['h10000 + y * OW + x]) != (g + 8) / 16) badf++;
          gx = int'(mhi[(y - 1) * OW + x + 1]) + 2 * int'(mhi[y * OW + x + 1]) + int'(mhi[(y + 1) * OW + x + 1])
             - int'(mhi[(y - 1) * OW + x - 1]) - 2 * int'(mhi[y * OW + x - 1]) - int'(mhi[(y + 1) * OW + x - 1]);
          gy = int'(mhi[(y + 1) * OW + x - 1]) + 2 * int'(mhi[(y + 1) * OW + x]) + int'(mhi[(y + 1) * OW + x + 1])
             - int'(mhi[(y - 1) * OW + x - 1]) - 2 * int'(mhi[(y - 1) * OW + x]) - int'(mhi[(y - 1) * OW + x + 1]);
          m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          if (int'(sram1.mem['h20000 + y * OW + x]) != (m > 255 ? 255 : m)) bade++;
        end
      check(badf == 0, $sformatf("Gaussian filtered MHI: %0d pixels differ", badf));
      check(bade == 0, $sformatf("Sobel edges of the MHI: %0d pixels differ", bade));
      check(badr == 0, $sformatf("rotated MHI: %0d pixels differ", badr));
      n_lib = 1;
    end

    // every mechanism must have happened
    check(n_frames == NF, "frames captured");
    check(n_bus0_stall > 0, "bus 0 contention stalls");
    check(n_bus1_stall > 0, "bus 1 contention stalls");
    check(n_bridge > 0, "bus 0 to bus 1 bridge transfers");
    check(n_diff_par > 0, "difference operators running in parallel");
    for (int m = 0; m < 4; m++) check(n_dma_mode[m] > 0, $sformatf("DMA mode %0d used", m));
    check(n_res_switch > 0 && n_sub > 0, "resolution switch and sub-sample");
    check(n_class > 0 && n_nomotion > 0, "classification and no-motion");
    check(n_pbwb > 0, "processor bridge bus cycles");
    check(n_hex > 0, "Intel hex engine bus cycles");
    check(n_lib > 0, "filter, edge detector and rotate cores");
    check(n_scl > 0, "camera I2C transfer");
    check(n_uart > 0, "serial port byte");
    check(n_btn_int > 0 && n_tick_int > 0, "button and timer interrupts");
    $display("per-frame work %0d clocks, output latency %0d clocks", t_max_frame, t_result);
    $display("mechanisms: bus0 stall cycles %0d, bus1 stall cycles %0d, bridge transfers %0d, frames %0d, dma modes %0d/%0d/%0d/%0d, parallel bytes %0d",
             n_bus0_stall, n_bus1_stall, n_bridge, n_frames, n_dma_mode[0], n_dma_mode[1], n_dma_mode[2], n_dma_mode[3], n_pp);
    finish();
  end
endmodule
