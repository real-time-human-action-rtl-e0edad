// vw_top: embedded human action recognition system on two Wishbone buses.
//
// The design recognises an action from a short video: a camera port turns
// the Bayer stream into small grey frames, replicated difference operators
// update a motion history image (MHI) segment by segment, replicated inner
// product cores multiply the MHI with one linear SVM weight vector each,
// and the offset and threshold unit adds each classifier's offset and
// shows the best class on the seven segment display.
//
// Processing module 0 (system bus 0) holds the camera port and its dual
// frame buffer, the DMA engine, the seven segment display, the PC parallel
// port, the sub-sample core, N_DIFF difference operator cores, the port to
// the external synchronous SRAM (2048 KB, a frame buffer) and the bridge to
// bus 1.  Processing module 1 (system bus 1) holds the internal RAM (32 KB,
// the MHI), the internal ROM (64 KB, the SVM weights), the offset and
// threshold unit, N_IP inner product cores, the filter, rotate and edge
// detector cores (library cores the recognition itself does not use) and
// the port to the external asynchronous SRAM (256 KB).
//
// The top level processor module keeps its peripherals here and its 8-bit
// processor outside: the processor's port bus enters on pb_i and its input
// data leave on pb_in (the OR of all port read data, one clock after the
// port number).  On that port bus sit the input/output ports (de-bounced
// buttons, DIP switches, LEDs), the timer, the serial port, the interrupt
// handler (its output is pb_int) and the PicoBlaze to Wishbone bridge,
// which is the last master of bus 0.  The camera I2C port is a bus 0
// slave.  host_i/host_o is a further bus 0 master (master 0) for a host
// or test access.  The Intel hex upload/download engine is the last bus 0
// master; its character streams (hex_rx_*, hex_tx_*) come from and go to
// a PC serial link outside the top.  Address and port maps: see vw_pkg.
// Interrupt handler sources: 0 button press, 1 timer, 2 serial port done,
// 3 input port change, 4 camera frame ready, 5 DMA done, 6 class result,
// 7 any processing core done.  irq shows the cores' done flags:
// bit 0 camera frame ready, bit 1 DMA done, bit 2 sub-sample done,
// bits 3.. difference operators, then the inner product cores, then the
// filter, the edge detector and the rotate core.
// bus0_stall / bus1_stall show masters waiting for their bus.
//
// The partition into two processing modules, the memories and their sizes,
// four difference operator and four inner product cores and three classes
// follow the document.  Hardwired sequencers in place of processor
// firmware inside the cores, the address map and register layouts are this
// design's own choices.
module vw_top
  import vw_pkg::*;
#(
  parameter int unsigned N_DIFF = 4,
  parameter int unsigned N_IP   = 4,
  parameter int unsigned NCLS   = 3,
  parameter int unsigned CAM_W  = 640,
  parameter int unsigned CAM_H  = 480,
  parameter int unsigned NBTN   = 4
) (
  input  logic       clk,
  input  logic       rst,
  // host access (bus 0 master 0)
  input  wb_m2s_t    host_i,
  output wb_s2m_t    host_o,
  // top level processor module: processor port bus and board I/O
  input  pb_port_t   pb_i,
  output logic [7:0] pb_in,
  output logic       pb_int,
  input  logic [NBTN-1:0] buttons,
  input  logic [7:0] dip,
  output logic [7:0] leds,
  output logic       txd,
  // Intel hex engine character streams
  input  logic       hex_rx_valid,
  output logic       hex_rx_ready,
  input  logic [7:0] hex_rx_data,
  output logic       hex_tx_valid,
  input  logic       hex_tx_ready,
  output logic [7:0] hex_tx_data,
  // camera I2C (open drain: high pulls the line low)
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       sda_i,
  // camera
  input  logic       cam_valid,
  input  logic       cam_sof,
  input  logic [7:0] cam_data,
  // external synchronous SRAM on bus 0, external asynchronous SRAM on bus 1
  output wb_m2s_t    sram0_o,
  input  wb_s2m_t    sram0_i,
  output wb_m2s_t    sram1_o,
  input  wb_s2m_t    sram1_i,
  // DMA FIFO input stream
  input  logic       fin_valid,
  output logic       fin_ready,
  input  logic [7:0] fin_data,
  // PC parallel port
  output logic       pp_valid,
  input  logic       pp_ready,
  output logic [7:0] pp_data,
  // seven segment display
  output logic [6:0] seg0,
  output logic [6:0] seg1,
  output logic [6+N_DIFF+N_IP-1:0] irq,
  output logic [5+N_DIFF-1:0]      bus0_stall,
  output logic [N_IP+3:0]          bus1_stall
);
  // ---------------- bus 0 ----------------
  localparam int unsigned NM0 = 5 + N_DIFF;       // host, dma, sub, diff..., pb bridge, hex
  localparam int unsigned NS0 = 9 + N_DIFF;       // sram, cambuf, bus1, cam, dma, seg7, par, sub, diff..., i2c
  localparam int unsigned NM1 = 4 + N_IP;         // bridge, ip..., filter, edge, rotate
  localparam int unsigned NS1 = 7 + N_IP;         // sram, ram, rom, cls, ip..., filter, edge, rotate

  function automatic logic [NS0-1:0][AW-1:0] b0_base();
    logic [NS0-1:0][AW-1:0] b;
    b[0] = B0_SRAM_BASE;
    b[1] = B0_CAMBUF_BASE;
    b[2] = B0_BUS1_BASE;
    b[3] = B0_REG_BASE + AW'(B0R_CAM  * 256);
    b[4] = B0_REG_BASE + AW'(B0R_DMA  * 256);
    b[5] = B0_REG_BASE + AW'(B0R_SEG7 * 256);
    b[6] = B0_REG_BASE + AW'(B0R_PAR  * 256);
    b[7] = B0_REG_BASE + AW'(B0R_SUB  * 256);
    for (int i = 0; i < N_DIFF; i++) b[8+i] = B0_REG_BASE + AW'((B0R_DIFF0 + i) * 256);
    b[8+N_DIFF] = B0_REG_BASE + AW'(B0R_I2C * 256);
    return b;
  endfunction
  function automatic logic [NS0-1:0][AW-1:0] b0_mask();
    logic [NS0-1:0][AW-1:0] m;
    m[0] = B0_SRAM_MASK;
    m[1] = B0_CAMBUF_MASK;
    m[2] = B0_BUS1_MASK;
    for (int i = 3; i < NS0; i++) m[i] = B0_REG_MASK;
    return m;
  endfunction
  function automatic logic [NS1-1:0][AW-1:0] b1_base();
    logic [NS1-1:0][AW-1:0] b;
    b[0] = B1_SRAM_BASE;
    b[1] = B1_RAM_BASE;
    b[2] = B1_ROM_BASE;
    b[3] = B1_REG_BASE + AW'(B1R_CLS * 256);
    for (int i = 0; i < N_IP; i++) b[4+i] = B1_REG_BASE + AW'((B1R_IP0 + i) * 256);
    b[4+N_IP] = B1_REG_BASE + AW'(B1R_FILT * 256);
    b[5+N_IP] = B1_REG_BASE + AW'(B1R_EDGE * 256);
    b[6+N_IP] = B1_REG_BASE + AW'(B1R_ROT * 256);
    return b;
  endfunction
  function automatic logic [NS1-1:0][AW-1:0] b1_mask();
    logic [NS1-1:0][AW-1:0] m;
    m[0] = B1_SRAM_MASK;
    m[1] = B1_RAM_MASK;
    m[2] = B1_ROM_MASK;
    for (int i = 3; i < NS1; i++) m[i] = B1_REG_MASK;
    return m;
  endfunction

  wb_m2s_t [NM0-1:0] m0_req;
  wb_s2m_t [NM0-1:0] m0_rsp;
  wb_m2s_t [NS0-1:0] s0_req;
  wb_s2m_t [NS0-1:0] s0_rsp;
  wb_m2s_t [NM1-1:0] m1_req;
  wb_s2m_t [NM1-1:0] m1_rsp;
  wb_m2s_t [NS1-1:0] s1_req;
  wb_s2m_t [NS1-1:0] s1_rsp;

  wb_bus #(.NM(NM0), .NS(NS0), .BASE(b0_base()), .MASK(b0_mask())) u_bus0 (
    .clk, .rst, .m_i(m0_req), .m_o(m0_rsp), .s_o(s0_req), .s_i(s0_rsp), .stall(bus0_stall)
  );
  wb_bus #(.NM(NM1), .NS(NS1), .BASE(b1_base()), .MASK(b1_mask())) u_bus1 (
    .clk, .rst, .m_i(m1_req), .m_o(m1_rsp), .s_o(s1_req), .s_i(s1_rsp), .stall(bus1_stall)
  );

  // host
  assign m0_req[0] = host_i;
  assign host_o    = m0_rsp[0];

  // external SRAMs
  assign sram0_o   = s0_req[0];
  assign s0_rsp[0] = sram0_i;
  assign sram1_o   = s1_req[0];
  assign s1_rsp[0] = sram1_i;

  // ---------------- processing module 0 ----------------
  logic       dma_fout_valid, dma_fout_ready;
  logic [7:0] dma_fout_data;
  logic [6:0] cls;
  logic       cls_valid;

  cam_port #(.IN_W(CAM_W), .IN_H(CAM_H)) u_cam (
    .clk, .rst, .cam_valid, .cam_sof, .cam_data,
    .fb_i(s0_req[1]), .fb_o(s0_rsp[1]), .reg_i(s0_req[3]), .reg_o(s0_rsp[3]), .irq(irq[0])
  );

  w2w_bridge #(.WIN_BITS(20)) u_w2w (
    .clk, .rst, .s_i(s0_req[2]), .s_o(s0_rsp[2]), .m_o(m1_req[0]), .m_i(m1_rsp[0])
  );

  dma_engine u_dma (
    .clk, .rst, .s_i(s0_req[4]), .s_o(s0_rsp[4]), .m_o(m0_req[1]), .m_i(m0_rsp[1]),
    .fin_valid, .fin_ready, .fin_data,
    .fout_valid(dma_fout_valid), .fout_ready(dma_fout_ready), .fout_data(dma_fout_data),
    .irq(irq[1])
  );

  seg7_display u_seg7 (
    .clk, .rst, .s_i(s0_req[5]), .s_o(s0_rsp[5]),
    .res_valid(cls_valid), .res_data({1'b0, cls}), .seg0, .seg1
  );

  par_port #(.DEPTH(16)) u_par (
    .clk, .rst, .s_i(s0_req[6]), .s_o(s0_rsp[6]),
    .in_valid(dma_fout_valid), .in_ready(dma_fout_ready), .in_data(dma_fout_data),
    .pp_valid, .pp_ready, .pp_data
  );

  subsample u_sub (
    .clk, .rst, .s_i(s0_req[7]), .s_o(s0_rsp[7]), .m_o(m0_req[2]), .m_i(m0_rsp[2]), .irq(irq[2])
  );

  for (genvar g = 0; g < N_DIFF; g++) begin : g_diff
    diff_op u_diff (
      .clk, .rst, .s_i(s0_req[8+g]), .s_o(s0_rsp[8+g]),
      .m_o(m0_req[3+g]), .m_i(m0_rsp[3+g]), .irq(irq[3+g])
    );
  end

  // ---------------- top level processor module ----------------
  logic [7:0]      rd_io, rd_tim, rd_uart, rd_irq, rd_wb;
  logic [NBTN-1:0] btn_clean, btn_rise;
  logic            tim_tick, uart_done, io_change;

  for (genvar g = 0; g < NBTN; g++) begin : g_btn
    debounce u_deb (.clk, .rst, .raw(buttons[g]), .clean(btn_clean[g]), .rise(btn_rise[g]));
  end

  pb_io #(.NBTN(NBTN)) u_io (
    .clk, .rst, .pb(pb_i), .rdata(rd_io), .buttons(btn_clean), .dip, .out_port(leds),
    .change(io_change)
  );
  pb_timer u_timer (.clk, .rst, .pb(pb_i), .rdata(rd_tim), .tick(tim_tick));
  uart_tx  u_uart  (.clk, .rst, .pb(pb_i), .rdata(rd_uart), .txd, .done(uart_done));
  irq_handler #(.NSRC(8)) u_irq (
    .clk, .rst, .pb(pb_i), .rdata(rd_irq),
    .src({|irq[6+N_DIFF+N_IP-1:2], cls_valid, irq[1], irq[0], io_change, uart_done,
          tim_tick, |btn_rise}),
    .interrupt(pb_int)
  );
  pb_wb_bridge u_pbwb (
    .clk, .rst, .pb(pb_i), .rdata(rd_wb), .m_o(m0_req[3+N_DIFF]), .m_i(m0_rsp[3+N_DIFF])
  );
  assign pb_in = rd_io | rd_tim | rd_uart | rd_irq | rd_wb;

  ihex_engine u_hex (
    .clk, .rst, .rx_valid(hex_rx_valid), .rx_ready(hex_rx_ready), .rx_data(hex_rx_data),
    .tx_valid(hex_tx_valid), .tx_ready(hex_tx_ready), .tx_data(hex_tx_data),
    .m_o(m0_req[4+N_DIFF]), .m_i(m0_rsp[4+N_DIFF])
  );

  i2c_master u_i2c (
    .clk, .rst, .s_i(s0_req[8+N_DIFF]), .s_o(s0_rsp[8+N_DIFF]), .scl_oe, .sda_oe, .sda_i
  );

  // ---------------- processing module 1 ----------------
  wb_mem #(.BYTES(32768), .READ_ONLY(1'b0)) u_ram (
    .clk, .rst, .s_i(s1_req[1]), .s_o(s1_rsp[1])
  );
  wb_mem #(.BYTES(65536), .READ_ONLY(1'b1)) u_rom (
    .clk, .rst, .s_i(s1_req[2]), .s_o(s1_rsp[2])
  );

  offset_threshold #(.NCLS(NCLS)) u_cls (
    .clk, .rst, .s_i(s1_req[3]), .s_o(s1_rsp[3]), .class_o(cls), .class_valid(cls_valid)
  );

  for (genvar g = 0; g < N_IP; g++) begin : g_ip
    inner_product u_ip (
      .clk, .rst, .s_i(s1_req[4+g]), .s_o(s1_rsp[4+g]),
      .m_o(m1_req[1+g]), .m_i(m1_rsp[1+g]), .irq(irq[3+N_DIFF+g])
    );
  end

  filter_op u_filt (
    .clk, .rst, .s_i(s1_req[4+N_IP]), .s_o(s1_rsp[4+N_IP]),
    .m_o(m1_req[1+N_IP]), .m_i(m1_rsp[1+N_IP]), .irq(irq[3+N_DIFF+N_IP])
  );

  edge_op u_edge (
    .clk, .rst, .s_i(s1_req[5+N_IP]), .s_o(s1_rsp[5+N_IP]),
    .m_o(m1_req[2+N_IP]), .m_i(m1_rsp[2+N_IP]), .irq(irq[4+N_DIFF+N_IP])
  );

  rotate_op u_rot (
    .clk, .rst, .s_i(s1_req[6+N_IP]), .s_o(s1_rsp[6+N_IP]),
    .m_o(m1_req[3+N_IP]), .m_i(m1_rsp[3+N_IP]), .irq(irq[5+N_DIFF+N_IP])
  );

endmodule
