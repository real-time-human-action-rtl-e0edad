// tb_pc_wb_bridge: pointer requests into a 4 KB memory.  Pointer 3 writes a
// 6x5 block line by line (writes auto-increment, ADDOFF skips to the next
// line of a 16-byte wide image); pointers 0 and 1 read it back and the
// memory is inspected directly.  Each access must take one request and
// produce exactly one response; SETB and ADDOFF must produce none.
module tb_pc_wb_bridge;
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
  logic req_valid = 1'b0, req_ready, rsp_valid;
  br_op_e req_op = BR_READ;
  logic [1:0] req_ptr = '0;
  logic [31:0] req_data = '0;
  logic [7:0] rsp_data;
  wb_m2s_t mm;
  wb_s2m_t mr;
  int rsps = 0;

  pc_wb_bridge #(.NPTR(4)) dut (.clk, .rst, .req_valid, .req_ready, .req_op, .req_ptr, .req_data,
                                .rsp_valid, .rsp_data, .m_o(mm), .m_i(mr));
  wb_mem #(.BYTES(4096)) mem (.clk, .rst, .s_i(mm), .s_o(mr));

  always @(posedge clk) if (rsp_valid) rsps++;

  task automatic req(input br_op_e op, input logic [1:0] p, input logic [31:0] d, output logic [7:0] r);
    int n0;
    n0 = rsps;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req_op    = op;
    req_ptr   = p;
    req_data  = d;
    @(negedge clk);
    req_valid = 1'b0;
    if (op == BR_READ || op == BR_WRITE) begin
      while (!rsp_valid) @(negedge clk);
      r = rsp_data;
      @(negedge clk);
      check(rsps == n0 + 1, "one response per access");
    end else begin
      r = '0;
      repeat (3) @(negedge clk);
      check(rsps == n0, "no response for pointer set-up");
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish();
  end

  initial begin
    logic [7:0] r;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4096; i++) mem.mem[i] = 8'h00;
    req(BR_SETB, 2'd3, 32'h123, r);
    req(BR_SETB, 2'd0, 32'h123, r);
    req(BR_SETB, 2'd1, 32'h123 + 16, r);
    for (int y = 0; y < 5; y++) begin
      for (int x = 0; x < 6; x++) req(BR_WRITE, 2'd3, 32'(10 * y + x + 1), r);
      req(BR_ADDOFF, 2'd3, 32'(16 - 6), r);
    end
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        logic [7:0] e;
        e = (y < 5 && x < 6) ? 8'(10 * y + x + 1) : 8'h00;
        check(mem.mem[32'h123 + 16 * y + x] == e, $sformatf("memory (%0d,%0d)", x, y));
      end
    // pointer 0 reads line 0, pointer 1 reads line 1, interleaved
    for (int x = 0; x < 6; x++) begin
      req(BR_READ, 2'd0, 0, r);
      check(r == 8'(x + 1), "pointer 0 read");
      req(BR_READ, 2'd1, 0, r);
      check(r == 8'(10 + x + 1), "pointer 1 read");
    end
    finish();
  end
endmodule
