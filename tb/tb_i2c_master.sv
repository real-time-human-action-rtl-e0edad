// tb_i2c_master: a camera-like I2C slave model (address 0x21, 256
// registers) on open-drain lines.  Register writes must land in the model,
// register reads (write register number, repeated START, read with NACK)
// must return the model's byte, a wrong device address must set the NACK
// status bit, and one write transaction must take 29 bit times of
// 4*CLK_HZ/(4*I2C_HZ) clocks (cycle-count check).
module tb_i2c_master;
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
  localparam int CLK = 4_000_000, FI2C = 100_000, QD = CLK / (4 * FI2C);
  logic scl_oe, sda_oe, sl_sda = 1'b0;
  wire  scl = !scl_oe;
  wire  sda = !(sda_oe || sl_sda);
  logic [7:0] regs [256];
  logic [7:0] rp = '0;

  i2c_master #(.CLK_HZ(CLK), .I2C_HZ(FI2C)) dut (.clk, .rst, .s_i(hm), .s_o(hr), .scl_oe, .sda_oe, .sda_i(sda));

  // slave model: START/STOP detection, byte shift on SCL rise, ACK on SCL low
  initial begin
    logic [7:0] b;
    int n;
    bit me, rdm;
    forever begin
      @(negedge sda iff scl);                          // START
      n = 0;
      me = 1'b0;
      rdm = 1'b0;
      fork begin : xfer
        forever begin
          if (!rdm) begin
            for (int i = 7; i >= 0; i--) begin
              @(posedge scl);
              b[i] = sda;
            end
            @(negedge scl);
            if (n == 0) begin
              me  = (b[7:1] == 7'h21);
              rdm = b[0];
            end else if (me && n == 1) rp = b;
            else if (me) begin regs[rp] = b; rp++; end
            if (me) sl_sda = 1'b1;
            @(negedge scl);
            sl_sda = 1'b0;
            n++;
          end else begin
            b = regs[rp];
            for (int i = 7; i >= 0; i--) begin
              sl_sda = !b[i];
              @(negedge scl);
            end
            sl_sda = 1'b0;
            @(posedge scl);
            @(negedge scl);
            rdm = 1'b0;
          end
        end
      end join_none
      @(posedge sda iff scl);                          // STOP or repeated START follows
      disable fork;
      sl_sda = 1'b0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    finish();
  end

  task automatic wait_done(output logic [7:0] st, output int t);
    t = 0;
    do begin wbr(24'h4, st); t += 2; end while (st[0]);
  endtask

  initial begin
    logic [7:0] d, st;
    int t;
    for (int i = 0; i < 256; i++) regs[i] = 8'(i * 7 + 3);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wbw(24'h0, 8'h21);
    for (int k = 0; k < 4; k++) begin
      logic [7:0] r, v;
      r = 8'($urandom);
      v = 8'($urandom);
      wbw(24'h1, r);
      wbw(24'h2, v);
      wbw(24'h3, 8'h01);
      wait_done(st, t);
      check(st == 8'h00, $sformatf("write %0d acknowledged, status %02x", k, st));
      check(regs[r] == v, $sformatf("write %0d reg %02x = %02x exp %02x", k, r, regs[r], v));
      if (k == 0) check(t >= 29 * 4 * QD && t <= 29 * 4 * QD + 8,
                        $sformatf("write takes %0d clocks, expected %0d", t, 29 * 4 * QD));
      regs[r] = 8'($urandom);
      wbw(24'h3, 8'h02);
      wait_done(st, t);
      wbr(24'h2, d);
      check(st == 8'h00 && d == regs[r], $sformatf("read %0d reg %02x got %02x exp %02x", k, r, d, regs[r]));
    end
    wbw(24'h0, 8'h30);
    wbw(24'h3, 8'h01);
    wait_done(st, t);
    check(st == 8'h02, $sformatf("wrong device gives NACK, status %02x", st));
    finish();
  end
endmodule
