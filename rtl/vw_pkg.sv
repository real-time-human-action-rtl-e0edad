// vw_pkg: types and constants shared by the video processing system.
//
// The system buses are 8-bit Wishbone (classic cycles: the master holds
// CYC/STB/WE/ADR/DAT until the slave returns ACK) with a 24-bit byte
// address.  A master drives a wb_m2s_t, a slave answers with a wb_s2m_t.
// The 8-bit data width follows the 8-bit processors and 8-bit grey pixels of
// the described system; the address width and the address map below are
// this design's own choice.
package vw_pkg;

  localparam int unsigned AW = 24;   // Wishbone byte address width
  localparam int unsigned DW = 8;    // Wishbone data width

  typedef struct packed {
    logic          cyc;
    logic          stb;
    logic          we;
    logic [AW-1:0] adr;
    logic [DW-1:0] dat;
  } wb_m2s_t;

  typedef struct packed {
    logic          ack;
    logic [DW-1:0] dat;
  } wb_s2m_t;

  localparam wb_m2s_t WB_M2S_IDLE = '{cyc: 1'b0, stb: 1'b0, we: 1'b0, adr: '0, dat: '0};
  localparam wb_s2m_t WB_S2M_IDLE = '{ack: 1'b0, dat: '0};

  // ---------------- System bus 0 address map (processing module 0) -------
  localparam logic [AW-1:0] B0_SRAM_BASE = 24'h000000;  // external sync SRAM, 2048 KB
  localparam logic [AW-1:0] B0_SRAM_MASK = 24'hE00000;
  localparam logic [AW-1:0] B0_CAMBUF_BASE = 24'h200000; // camera dual frame buffer, 64 KB
  localparam logic [AW-1:0] B0_CAMBUF_MASK = 24'hFF0000;
  localparam logic [AW-1:0] B0_BUS1_BASE = 24'h300000;  // window onto system bus 1, 1 MB
  localparam logic [AW-1:0] B0_BUS1_MASK = 24'hF00000;
  localparam logic [AW-1:0] B0_REG_BASE  = 24'h400000;  // register blocks, 256 B each
  localparam logic [AW-1:0] B0_REG_MASK  = 24'hFFFF00;
  // register block numbers on bus 0 (address = B0_REG_BASE + n*256)
  localparam int unsigned B0R_CAM   = 0;
  localparam int unsigned B0R_DMA   = 1;
  localparam int unsigned B0R_SEG7  = 2;
  localparam int unsigned B0R_PAR   = 3;
  localparam int unsigned B0R_I2C   = 4;
  localparam int unsigned B0R_SUB   = 5;
  localparam int unsigned B0R_DIFF0 = 8;   // difference operators 8, 9, 10, ...

  // ---------------- System bus 1 address map (processing module 1) -------
  // Bus 1 addresses are the low 20 bits of the bus 0 window 0x3xxxxx.
  localparam logic [AW-1:0] B1_SRAM_BASE = 24'h000000;  // external async SRAM, 256 KB
  localparam logic [AW-1:0] B1_SRAM_MASK = 24'hFC0000;
  localparam logic [AW-1:0] B1_RAM_BASE  = 24'h040000;  // internal RAM, 32 KB (MHI)
  localparam logic [AW-1:0] B1_RAM_MASK  = 24'hFF8000;
  localparam logic [AW-1:0] B1_ROM_BASE  = 24'h050000;  // internal ROM, 64 KB (SVM data)
  localparam logic [AW-1:0] B1_ROM_MASK  = 24'hFF0000;
  localparam logic [AW-1:0] B1_REG_BASE  = 24'h060000;  // register blocks, 256 B each
  localparam logic [AW-1:0] B1_REG_MASK  = 24'hFFFF00;
  localparam int unsigned B1R_CLS = 0;     // offset and threshold unit
  localparam int unsigned B1R_IP0 = 1;     // inner product cores 1, 2, 3, ...
  localparam int unsigned B1R_FILT = 12;   // filter core (processing core 3)
  localparam int unsigned B1R_EDGE = 13;   // edge detector core (processing core 5)
  localparam int unsigned B1R_ROT = 14;    // rotate core (processing core 4)

  // ---------------- Processing core register window -----------------------
  // Every processing core has the same co-processor style register window:
  // eight 32-bit parameter registers, four 32-bit result registers, a control
  // and a status register (bytes little endian).
  localparam int unsigned CR_PARAM  = 'h00;  // 0x00..0x1F  param[0..7]
  localparam int unsigned CR_RESULT = 'h20;  // 0x20..0x2F  result[0..3]
  localparam int unsigned CR_CTRL   = 'h30;  // write bit0 = start
  localparam int unsigned CR_STATUS = 'h31;  // bit0 busy, bit1 done

  // Processing core to Wishbone bridge requests
  typedef enum logic [1:0] {
    BR_READ   = 2'd0,   // read byte at base+offset, then offset += 1
    BR_WRITE  = 2'd1,   // write byte at base+offset, then offset += 1
    BR_SETB   = 2'd2,   // base := data, offset := 0
    BR_ADDOFF = 2'd3    // offset += data (skip to the next line of a segment)
  } br_op_e;

  // ---------------- Top level processor port bus -------------------------
  // The 8-bit processor of the top level module reaches its peripherals by
  // port number: an OUTPUT drives id, dout and a one-clock wr strobe; an
  // INPUT drives id and a one-clock rd strobe and takes the peripherals'
  // OR-ed read data one clock after id is set.
  typedef struct packed {
    logic [7:0] id;
    logic [7:0] dout;
    logic       wr;
    logic       rd;
  } pb_port_t;

  // port numbers of the top level processor module
  localparam logic [7:0] PB_IO    = 8'h00;  // 0x00..0x03 input / output ports
  localparam logic [7:0] PB_TIMER = 8'h08;  // 0x08..0x0B timer
  localparam logic [7:0] PB_UART  = 8'h10;  // 0x10..0x11 serial port
  localparam logic [7:0] PB_IRQ   = 8'h18;  // 0x18..0x1A interrupt handler
  localparam logic [7:0] PB_WB    = 8'h20;  // 0x20..0x27 PicoBlaze to Wishbone bridge

  // Motion history image maximum duration (Eq. 1: tau = 255)
  localparam logic [7:0] MHI_TAU = 8'd255;

endpackage
