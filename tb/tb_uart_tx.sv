// tb_uart_tx: bytes written to the data port must appear on txd as 8N1
// frames in order; a receiver in the test samples each bit in its middle
// and checks that every bit lasts CLK_HZ/BAUD clocks (cycle-count check on
// the start-bit to stop-bit distance), and the status port must report
// busy and a full FIFO.  The done pulse must come once, when the last
// queued byte has left.
module tb_uart_tx;
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
  localparam int CLK = 1_000_000, BAUD = 62_500, DIV = CLK / BAUD;   // 16 clocks per bit
  logic txd, done;
  logic [7:0] exp_q [$];
  int got = 0, n_done = 0;
  always @(posedge clk) if (done) n_done++;

  uart_tx #(.BASE(PB_UART), .CLK_HZ(CLK), .BAUD(BAUD), .DEPTH(8)) dut (.clk, .rst, .pb, .rdata(pb_rdata), .txd, .done);

  // receiver
  initial begin
    logic [7:0] b;
    int t;
    @(negedge rst);
    forever begin
      @(negedge txd);
      t = 0;
      repeat (DIV / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      // stop bit must last to the end of the 10th bit time, then idle or start
      repeat (DIV / 2 - 2) @(posedge clk);
      check(txd == 1'b1, $sformatf("frame %0d length is 10 bit times of %0d clocks", got, DIV));
      if (exp_q.size() == 0) begin
        check(1'b0, "unexpected frame");
      end else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        check(b == e, $sformatf("frame %0d got %02x exp %02x", got, b, e));
      end
      got++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] d, st;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    pbr(PB_UART + 1, st);
    check(st == 8'h00, "idle status");
    // fill the FIFO back to back
    for (int i = 0; i < 9; i++) begin
      d = 8'($urandom);
      exp_q.push_back(d);
      pbw(PB_UART + 0, d);
    end
    pbr(PB_UART + 1, st);
    check(st == 8'h03, $sformatf("busy and full, got %02x", st));
    // polled sending of more bytes
    for (int i = 0; i < 12; i++) begin
      do pbr(PB_UART + 1, st); while (st[1]);
      d = 8'($urandom);
      exp_q.push_back(d);
      pbw(PB_UART + 0, d);
    end
    do pbr(PB_UART + 1, st); while (st[0]);
    repeat (DIV) @(negedge clk);
    check(n_done == 1, $sformatf("one done pulse, got %0d", n_done));
    check(got == 21 && exp_q.size() == 0, $sformatf("21 frames received, got %0d", got));
    finish();
  end
endmodule
