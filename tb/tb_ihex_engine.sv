// tb_ihex_engine: Intel hex records are sent as characters with random gaps
// and the reply is collected with a randomly stalling receiver.  Data
// records (with and without an extended linear address record) must land
// in a memory model with wait states, read request records must return a
// data record with the memory contents and a correct checksum, and bad
// checksums, non-hex characters and unknown types must be answered with
// '?' and change nothing.
module tb_ihex_engine;
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
  logic rx_valid = 1'b0, rx_ready, tx_valid, tx_ready = 1'b0;
  logic [7:0] rx_data = '0, tx_data;
  wb_m2s_t m;
  wb_s2m_t s;
  string reply = "";

  ihex_engine dut (.clk, .rst, .rx_valid, .rx_ready, .rx_data, .tx_valid, .tx_ready, .tx_data,
                   .m_o(m), .m_i(s));
  wb_sram_model #(.BYTES(2097152), .WAIT(1)) u_mem (.clk, .rst, .s_i(m), .s_o(s));

  always @(posedge clk) begin
    if (tx_valid && tx_ready) reply = {reply, string'(tx_data)};
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    finish();
  end

  function automatic string hx(input logic [7:0] b);
    string h;
    h = $sformatf("%02x", b);
    return h.toupper();
  endfunction

  // build a record from its bytes; bad = 1 spoils the checksum
  function automatic string rec(input logic [7:0] typ, input logic [15:0] a,
                                input logic [7:0] d [$], input bit bad = 0);
    string r;
    logic [7:0] sum;
    sum = 8'(d.size()) + a[15:8] + a[7:0] + typ;
    r = {":", hx(8'(d.size())), hx(a[15:8]), hx(a[7:0]), hx(typ)};
    foreach (d[i]) begin
      r = {r, hx(d[i])};
      sum += d[i];
    end
    r = {r, hx(8'(-sum) ^ (bad ? 8'h01 : 8'h00)), "\r\n"};
    return r;
  endfunction

  task automatic send(input string str);
    for (int i = 0; i < str.len(); i++) begin
      @(negedge clk);
      rx_valid = 1'b1;
      rx_data  = str[i];
      do @(posedge clk); while (!rx_ready);
      @(negedge clk);
      rx_valid = 1'b0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  task automatic wait_reply(input int n);
    int t;
    t = 0;
    while (reply.len() < n && t < 20000) begin @(negedge clk); t++; end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    logic [7:0] d [$];
    logic [7:0] e [$];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // data record at 0x000120
    d = {};
    for (int i = 0; i < 16; i++) d.push_back(8'($urandom));
    send(rec(8'h00, 16'h0120, d));
    repeat (100) @(negedge clk);
    for (int i = 0; i < 16; i++) check(u_mem.mem['h120 + i] == d[i], $sformatf("upload byte %0d", i));
    check(reply == "", "no reply to a good data record");
    // extended linear address 0x0012 then data at 0x12ABCD
    send(rec(8'h04, 16'h0000, '{8'h00, 8'h12}));
    e = {8'h5A, 8'hA5, 8'h3C};
    send(rec(8'h00, 16'hABCD, e));
    repeat (60) @(negedge clk);
    check(u_mem.mem['h12ABCD] == 8'h5A && u_mem.mem['h12ABCE] == 8'hA5 && u_mem.mem['h12ABCF] == 8'h3C,
          "upload above 64 KB through the extended address");
    // read request: 5 bytes from 0x12ABCC
    u_mem.mem['h12ABCC] = 8'h77;
    u_mem.mem['h12ABD0] = 8'h01;
    reply = "";
    send(rec(8'h06, 16'hABCC, '{8'h05}));
    e = {8'h77, 8'h5A, 8'hA5, 8'h3C, 8'h01};
    wait_reply(rec(8'h00, 16'hABCC, e).len());
    check(reply == rec(8'h00, 16'hABCC, e), $sformatf("download reply %s expected %s", reply, rec(8'h00, 16'hABCC, e)));
    // bad checksum: error reply, memory unchanged
    reply = "";
    send(rec(8'h04, 16'h0000, '{8'h00, 8'h00}));
    send(rec(8'h00, 16'h0120, '{8'hEE}, 1));
    wait_reply(3);
    check(reply == "?\r\n", $sformatf("bad checksum reply '%s'", reply));
    check(u_mem.mem['h120] == d[0], "bad record not written");
    // non-hex digit and unknown type
    reply = "";
    send(":02012G00\r\n");
    wait_reply(3);
    check(reply == "?\r\n", "non-hex digit rejected");
    reply = "";
    send(rec(8'h07, 16'h0000, '{8'h01}));
    wait_reply(3);
    check(reply == "?\r\n", "unknown type rejected");
    // end of file record, then a long read of the first upload
    reply = "";
    send(rec(8'h01, 16'h0000, '{}));
    send(rec(8'h06, 16'h0120, '{8'h10}));
    wait_reply(rec(8'h00, 16'h0120, d).len());
    check(reply == rec(8'h00, 16'h0120, d), $sformatf("16 byte download '%s'", reply));
    finish();
  end
endmodule
