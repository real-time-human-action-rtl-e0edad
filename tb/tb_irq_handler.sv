// tb_irq_handler: rising edges on masked and unmasked sources must set
// pending bits; the interrupt must follow the enabled pending bits only;
// the priority port must name the lowest enabled pending source; writing
// ones to the pending port must clear exactly those bits; a source held
// high must not re-trigger.
module tb_irq_handler;
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
  logic [7:0] src = '0;
  logic interrupt;

  irq_handler #(.BASE(PB_IRQ), .NSRC(8)) dut (.clk, .rst, .pb, .rdata(pb_rdata), .src, .interrupt);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  task automatic pulse(input int n);
    @(negedge clk);
    src[n] = 1'b1;
    @(negedge clk);
    src[n] = 1'b0;
  endtask

  initial begin
    logic [7:0] d;
    logic [7:0] mask, pend;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    pbw(PB_IRQ + 0, 8'b0010_0100);
    pulse(3);
    repeat (3) @(negedge clk);
    check(!interrupt, "masked source gives no interrupt");
    pbr(PB_IRQ + 1, d);
    check(d == 8'b0000_1000, "masked source still pending");
    pulse(5);
    repeat (2) @(negedge clk);
    check(interrupt, "enabled source raises interrupt");
    pulse(2);
    pbr(PB_IRQ + 2, d);
    check(d == 8'd2, $sformatf("lowest enabled pending is 2, got %0d", d));
    pbw(PB_IRQ + 1, 8'b0000_0100);
    pbr(PB_IRQ + 2, d);
    check(d == 8'd5, $sformatf("after clearing 2 next is 5, got %0d", d));
    pbw(PB_IRQ + 1, 8'b0010_0000);
    repeat (2) @(negedge clk);
    check(!interrupt, "interrupt drops when cleared");
    pbr(PB_IRQ + 2, d);
    check(d == 8'hFF, "no enabled source pending");
    // level held high must not re-trigger
    pbw(PB_IRQ + 0, 8'hFF);
    pbw(PB_IRQ + 1, 8'hFF);
    @(negedge clk);
    src[6] = 1'b1;
    repeat (3) @(negedge clk);
    pbw(PB_IRQ + 1, 8'b0100_0000);
    repeat (5) @(negedge clk);
    check(!interrupt, "held level does not re-trigger");
    src[6] = 1'b0;
    // random sequence against a model
    mask = 8'($urandom);
    pend = 8'h00;
    pbw(PB_IRQ + 0, mask);
    for (int k = 0; k < 50; k++) begin
      logic [7:0] e;
      e = 8'($urandom) & 8'($urandom);
      @(negedge clk);
      src = e;
      @(negedge clk);
      src = '0;
      pend |= e;
      repeat (2) @(negedge clk);
      check(interrupt == |(pend & mask), $sformatf("random step %0d interrupt", k));
      pbr(PB_IRQ + 1, d);
      check(d == pend, $sformatf("random step %0d pending %02x exp %02x", k, d, pend));
      e = 8'($urandom);
      pbw(PB_IRQ + 1, e);
      pend &= ~e;
    end
    finish();
  end
endmodule
