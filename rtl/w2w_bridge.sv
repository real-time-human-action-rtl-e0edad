// w2w_bridge: Wishbone to Wishbone bridge from system bus 0 to bus 1.
//
// A slave on bus 0 that answers an address window and repeats each access
// as a master on bus 1, with the address reduced to its low WIN_BITS bits.
// The access is registered on both sides: it starts on bus 1 the clock
// after it is seen on bus 0, and bus 0 gets its ACK (with read data) the
// clock after bus 1 acknowledged.  Bus 1 may be busy with its own masters;
// the bus 0 master then simply waits.  Keeping the two buses apart lets
// cores on each bus run in parallel; only bridged accesses cost bandwidth
// on both.  The bridge follows the document; its timing is this design's.
module w2w_bridge
  import vw_pkg::*;
#(
  parameter int unsigned WIN_BITS = 20
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t s_i,
  output wb_s2m_t s_o,
  output wb_m2s_t m_o,
  input  wb_s2m_t m_i
);
  typedef enum logic [1:0] {IDLE, FWD, RET} state_e;
  state_e st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st  <= IDLE;
      m_o <= WB_M2S_IDLE;
      s_o <= WB_S2M_IDLE;
    end else begin
      s_o.ack <= 1'b0;
      unique case (st)
        IDLE: if (s_i.cyc && s_i.stb) begin
          m_o.cyc <= 1'b1;
          m_o.stb <= 1'b1;
          m_o.we  <= s_i.we;
          m_o.adr <= AW'(s_i.adr[WIN_BITS-1:0]);
          m_o.dat <= s_i.dat;
          st      <= FWD;
        end
        FWD: if (m_i.ack) begin
          m_o     <= WB_M2S_IDLE;
          s_o.ack <= 1'b1;
          s_o.dat <= m_i.dat;
          st      <= RET;
        end
        RET: st <= IDLE;   // master drops STB after its ACK
        default: st <= IDLE;
      endcase
    end
  end

endmodule
