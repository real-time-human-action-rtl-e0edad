// tb_pb_io: the button and DIP switch ports must read the synchronised
// inputs, the output port must drive out_port and read back, and other
// port numbers must read zero (the read data are OR-ed by the top); every
// change of the inputs must give one change pulse.
module tb_pb_io;
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
  logic [3:0] buttons = '0;
  logic [7:0] dip = '0, out_port;
  logic change;
  int n_change = 0;
  always @(posedge clk) if (change) n_change++;

  pb_io #(.BASE(PB_IO), .NBTN(4)) dut (.clk, .rst, .pb, .rdata(pb_rdata), .buttons, .dip, .out_port, .change);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] d, v;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 30; k++) begin
      int c0;
      logic [3:0] ob;
      logic [7:0] od;
      c0 = n_change;
      ob = buttons;
      od = dip;
      @(negedge clk);
      buttons = 4'($urandom);
      dip     = (k % 3 == 0) ? dip : 8'($urandom);
      v       = 8'($urandom);
      repeat (4) @(negedge clk);
      check(n_change - c0 == ((ob != buttons || od != dip) ? 1 : 0), "change pulse");
      pbr(PB_IO + 0, d);
      check(d == {4'd0, buttons}, $sformatf("buttons %02x", d));
      pbr(PB_IO + 1, d);
      check(d == dip, $sformatf("dip %02x exp %02x", d, dip));
      pbw(PB_IO + 2, v);
      check(out_port == v, "output port drives pins");
      pbr(PB_IO + 2, d);
      check(d == v, "output port reads back");
      pbr(8'h40, d);
      check(d == 8'h00, "other port reads zero");
    end
    finish();
  end
endmodule
