// i2c_master: camera I2C (SCCB) configuration port, a bus 0 Wishbone slave.
//
// Firmware loads the 7-bit device address (register 0x00), the camera
// register number (0x01) and, for a write, the data byte (0x02), then
// writes the control register 0x03: bit 0 starts a register write, bit 1
// a register read.  A write sends START, device+W, register, data, STOP.
// A read sends START, device+W, register, STOP, then START, device+R,
// reads one byte, answers it with NACK and sends STOP (the SCCB form used
// by camera sensors); the byte is then readable at 0x02.  Register 0x04 is
// status: bit 0 busy, bit 1 a device byte was not acknowledged.
// Lines are open drain: scl_oe / sda_oe high pull the line low; sda_i is
// the line level.  Each bit takes four phases of CLK_HZ/(4*I2C_HZ) clocks,
// so 100 kHz at the 20 MHz clock.  The document only says the camera is
// configured over I2C; everything else here is this design's choice.
module i2c_master
  import vw_pkg::*;
#(
  parameter int unsigned CLK_HZ = 20_000_000,
  parameter int unsigned I2C_HZ = 100_000
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t s_i,
  output wb_s2m_t s_o,
  output logic    scl_oe,
  output logic    sda_oe,
  input  logic    sda_i
);
  localparam int unsigned QDIV = CLK_HZ / (4 * I2C_HZ);
  localparam int unsigned QW   = (QDIV > 1) ? $clog2(QDIV) : 1;

  typedef enum logic [1:0] {SY_START, SY_STOP, SY_BYTE, SY_RBYTE} sym_e;

  logic [6:0]    dev;
  logic [7:0]    regn, wdat, rdat;
  logic          busy, nack, rd;
  logic [2:0]    step;
  logic [3:0]    bitn;        // 0..8 inside a byte, 8 is the acknowledge
  logic [1:0]    ph;
  logic [QW-1:0] qcnt;
  logic [7:0]    rsh;
  sym_e          sym;
  logic [7:0]    tx;
  logic          last;
  logic          sda_l, scl_l;   // line levels this phase

  // symbol and transmit byte of each step
  always_comb begin
    tx   = 8'h00;
    last = 1'b0;
    if (!rd) begin
      unique case (step)
        3'd0:    sym = SY_START;
        3'd1:    begin sym = SY_BYTE; tx = {dev, 1'b0}; end
        3'd2:    begin sym = SY_BYTE; tx = regn; end
        3'd3:    begin sym = SY_BYTE; tx = wdat; end
        default: begin sym = SY_STOP; last = 1'b1; end
      endcase
    end else begin
      unique case (step)
        3'd0:    sym = SY_START;
        3'd1:    begin sym = SY_BYTE; tx = {dev, 1'b0}; end
        3'd2:    begin sym = SY_BYTE; tx = regn; end
        3'd3:    sym = SY_STOP;
        3'd4:    sym = SY_START;
        3'd5:    begin sym = SY_BYTE; tx = {dev, 1'b1}; end
        3'd6:    sym = SY_RBYTE;
        default: begin sym = SY_STOP; last = 1'b1; end
      endcase
    end
  end

  // line levels per symbol and phase
  always_comb begin
    sda_l = 1'b1;
    scl_l = 1'b1;
    unique case (sym)
      SY_START: begin sda_l = (ph < 2); scl_l = (ph != 3); end
      SY_STOP:  begin sda_l = (ph >= 2); scl_l = (ph != 0); end
      SY_BYTE:  begin sda_l = (bitn == 8) ? 1'b1 : tx[3'(7 - bitn)];
                      scl_l = (ph == 1 || ph == 2); end
      default:  begin sda_l = 1'b1;   // release for the slave, then NACK
                      scl_l = (ph == 1 || ph == 2); end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dev    <= '0;
      regn   <= '0;
      wdat   <= '0;
      rdat   <= '0;
      busy   <= 1'b0;
      nack   <= 1'b0;
      rd     <= 1'b0;
      step   <= '0;
      bitn   <= '0;
      ph     <= '0;
      qcnt   <= '0;
      rsh    <= '0;
      scl_oe <= 1'b0;
      sda_oe <= 1'b0;
    end else begin
      if (s_i.cyc && s_i.stb && s_i.we && !s_o.ack && !busy) begin
        unique case (s_i.adr[2:0])
          3'd0: dev  <= s_i.dat[6:0];
          3'd1: regn <= s_i.dat;
          3'd2: wdat <= s_i.dat;
          3'd3: if (s_i.dat[1:0] != 0) begin
            busy <= 1'b1;
            nack <= 1'b0;
            rd   <= s_i.dat[1];
            step <= '0;
            bitn <= '0;
            ph   <= '0;
            qcnt <= '0;
          end
          default: ;
        endcase
      end
      if (busy) begin
        scl_oe <= !scl_l;
        sda_oe <= !sda_l;
        if (qcnt == QW'(QDIV - 1)) begin
          qcnt <= '0;
          // sample in the middle of the clock high time
          if (ph == 2 && (sym == SY_BYTE || sym == SY_RBYTE)) begin
            if (sym == SY_BYTE && bitn == 8 && sda_i) nack <= 1'b1;
            if (sym == SY_RBYTE && bitn != 8) rsh <= {rsh[6:0], sda_i};
          end
          ph <= ph + 1'b1;
          if (ph == 3) begin
            if ((sym == SY_BYTE || sym == SY_RBYTE) && bitn != 8) begin
              bitn <= bitn + 1'b1;
            end else begin
              bitn <= '0;
              if (sym == SY_RBYTE) rdat <= rsh;
              if (last) busy <= 1'b0;
              else      step <= step + 1'b1;
            end
          end
        end else begin
          qcnt <= qcnt + 1'b1;
        end
      end else begin
        scl_oe <= 1'b0;
        sda_oe <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_o <= WB_S2M_IDLE;
    end else begin
      s_o.ack <= s_i.cyc && s_i.stb && !s_o.ack;
      unique case (s_i.adr[2:0])
        3'd0:    s_o.dat <= {1'b0, dev};
        3'd1:    s_o.dat <= regn;
        3'd2:    s_o.dat <= rd ? rdat : wdat;
        3'd4:    s_o.dat <= {6'd0, nack, busy};
        default: s_o.dat <= 8'h00;
      endcase
    end
  end

endmodule
