// tb_wb_bus: three masters and three memories (at 0x000000, 0x010000 and
// 0x020000, 4 KB each) on one bus.  Each master writes and reads back its
// own random bytes at the same time as the others; data must land in the
// right memory, masters must be seen stalled while another owns the bus,
// and every master must be served (round robin).  An unmapped address must
// be acknowledged with data 0.
module tb_wb_bus;
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
  localparam int NM = 3, NS = 3;
  wb_m2s_t [NM-1:0] mreq;
  wb_s2m_t [NM-1:0] mrsp;
  wb_m2s_t [NS-1:0] sreq;
  wb_s2m_t [NS-1:0] srsp;
  logic [NM-1:0] stall;
  int stalls [NM];
  int done_cnt [NM];
  logic [7:0] vv [NM][64];

  wb_bus #(.NM(NM), .NS(NS),
           .BASE({24'h020000, 24'h010000, 24'h000000}),
           .MASK({24'hFF0000, 24'hFF0000, 24'hFF0000})) dut (
    .clk, .rst, .m_i(mreq), .m_o(mrsp), .s_o(sreq), .s_i(srsp), .stall);

  for (genvar g = 0; g < NS; g++) begin : g_mem
    wb_mem #(.BYTES(4096)) mem (.clk, .rst, .s_i(sreq[g]), .s_o(srsp[g]));
  end

  always @(posedge clk) for (int i = 0; i < NM; i++) if (stall[i]) stalls[i]++;

  task automatic acc(input int m, input logic we, input logic [23:0] a, input logic [7:0] d, output logic [7:0] r);
    @(negedge clk);
    mreq[m] = '{cyc: 1'b1, stb: 1'b1, we: we, adr: a, dat: d};
    do @(negedge clk); while (!mrsp[m].ack);
    r = mrsp[m].dat;
    mreq[m] = WB_M2S_IDLE;
  endtask

  task automatic master(input int m);
    logic [7:0] r;
    for (int i = 0; i < 64; i++) begin
      vv[m][i] = 8'($urandom);
      acc(m, 1'b1, 24'(m * 'h10000 + 16 * i + m), vv[m][i], r);
    end
    for (int i = 0; i < 64; i++) begin
      acc(m, 1'b0, 24'(m * 'h10000 + 16 * i + m), 8'h00, r);
      check(r == vv[m][i], $sformatf("master %0d read back %0d", m, i));
      done_cnt[m]++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] r;
    for (int i = 0; i < NM; i++) begin
      mreq[i] = WB_M2S_IDLE;
      stalls[i] = 0;
      done_cnt[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    fork
      master(0);
      master(1);
      master(2);
    join
    for (int m = 0; m < NM; m++) begin
      check(stalls[m] > 0, $sformatf("master %0d saw the bus busy", m));
      check(done_cnt[m] == 64, "all accesses served");
    end
    // master 0 reads what masters 1 and 2 wrote: the decoder picked the memory
    for (int m = 1; m < NM; m++) begin
      acc(0, 1'b0, 24'(m * 'h10000 + 16 * 9 + m), 8'h00, r);
      check(r == vv[m][9], "cross read");
    end
    acc(0, 1'b0, 24'h7F0000, 8'h00, r);
    check(r == 8'h00, "unmapped read returns 0");
    finish();
  end
endmodule
