// tb_pb_wb_bridge: the processor side queues bus writes and reads through
// the port bus; the bytes must reach a Wishbone memory with wait states at
// the auto-incremented addresses, reads must come back in order through the
// read FIFO, and the status port must report busy, data available and the
// number of waiting bytes.  A block of 20 reads (more than the FIFO depth)
// must still return every byte in order while the test pops them.
module tb_pb_wb_bridge;
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
  wb_m2s_t m;
  wb_s2m_t s;
  logic [7:0] ref_mem [4096];

  pb_wb_bridge #(.BASE(PB_WB), .DEPTH(16)) dut (.clk, .rst, .pb, .rdata(pb_rdata), .m_o(m), .m_i(s));
  wb_sram_model #(.BYTES(4096), .WAIT(2)) u_mem (.clk, .rst, .s_i(m), .s_o(s));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    finish();
  end

  task automatic set_adr(input logic [23:0] a);
    pbw(PB_WB + 0, a[7:0]);
    pbw(PB_WB + 1, a[15:8]);
    pbw(PB_WB + 2, a[23:16]);
  endtask

  task automatic wait_idle();
    logic [7:0] st;
    do pbr(PB_WB + 6, st); while (st[0]);
  endtask

  initial begin
    logic [7:0] d, st;
    int t0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // write 40 bytes starting at 0x100, then read them back
    set_adr(24'h000100);
    for (int i = 0; i < 40; i++) begin
      d = 8'($urandom);
      ref_mem[256 + i] = d;
      do pbr(PB_WB + 6, st); while (st[1]);
      pbw(PB_WB + 3, d);
    end
    pbr(PB_WB + 0, d);
    check(d == 8'h28, $sformatf("address auto-incremented to 0x128, got low byte %02x", d));
    wait_idle();
    for (int i = 0; i < 40; i++)
      check(u_mem.mem[256 + i] == ref_mem[256 + i], $sformatf("memory byte %0d", i));
    // read back 4 bytes and check status counts
    set_adr(24'h000100);
    pbw(PB_WB + 4, 8'd4);
    t0 = 0;
    do begin pbr(PB_WB + 6, st); t0++; end while (st[0] && t0 < 1000);
    check(st[7:3] == 5'd4 && st[2], $sformatf("status reports 4 bytes waiting, got %02x", st));
    for (int i = 0; i < 4; i++) begin
      pbr(PB_WB + 5, d);
      check(d == ref_mem[256 + i], $sformatf("read %0d got %02x exp %02x", i, d, ref_mem[256 + i]));
    end
    pbr(PB_WB + 6, st);
    check(st == 8'h00, $sformatf("idle and empty after pops, got %02x", st));
    // 20 reads: more than the FIFO holds; pop while the bridge refills
    pbw(PB_WB + 4, 8'd20);
    for (int i = 0; i < 20; i++) begin
      do pbr(PB_WB + 6, st); while (!st[2]);
      pbr(PB_WB + 5, d);
      check(d == ref_mem[260 + i], $sformatf("block read %0d got %02x exp %02x", i, d, ref_mem[260 + i]));
    end
    wait_idle();
    pbr(PB_WB + 2, d);
    pbr(PB_WB + 1, st);
    check({d, st} == 16'h0001, "address high bytes after reads");
    finish();
  end
endmodule
