// wb_sram_model: behavioural model of an off-chip SRAM behind a Wishbone
// port, for testbenches only.  BYTES of storage, decoded from the low
// address bits; each access is acknowledged WAIT+1 clocks after STB (one
// for a synchronous part, more for an asynchronous part behind its
// controller).  Contents start at zero.
module wb_sram_model
  import vw_pkg::*;
#(
  parameter int unsigned BYTES = 2097152,
  parameter int unsigned WAIT  = 0
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t s_i,
  output wb_s2m_t s_o
);
  logic [7:0] mem [BYTES];
  int unsigned cnt;
  logic [$clog2(BYTES)-1:0] a;

  assign a = s_i.adr[$clog2(BYTES)-1:0];

  initial for (int i = 0; i < BYTES; i++) mem[i] = 8'h00;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_o.ack <= 1'b0;
      s_o.dat <= '0;
      cnt     <= 0;
    end else begin
      s_o.ack <= 1'b0;
      if (s_i.cyc && s_i.stb && !s_o.ack) begin
        if (cnt == WAIT) begin
          cnt     <= 0;
          s_o.ack <= 1'b1;
          s_o.dat <= mem[a];
          if (s_i.we) mem[a] <= s_i.dat;
        end else begin
          cnt <= cnt + 1;
        end
      end else begin
        cnt <= 0;
      end
    end
  end
endmodule
