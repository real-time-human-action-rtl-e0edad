// wb_bus: shared Wishbone system bus with arbiter and address decoder.
//
// NM masters share one bus.  A round-robin arbiter grants the bus to one
// requesting master (CYC high) and holds the grant for as long as that
// master keeps CYC high; the next grant starts searching at the master after
// the last owner, so no master can be starved.  The granted master's address
// is compared with each slave's BASE/MASK pair ((adr & MASK) == BASE, first
// match wins) and only the selected slave sees STB.  An access that matches
// no slave is acknowledged by the bus itself with data 0, so a wrong address
// never hangs a master.  A master that requests while another owns the bus
// waits (its stall bit is high), which is how replicated processing cores
// are slowed down when bus bandwidth runs out.
//
// Timing: a grant is combinational in the cycle CYC rises while the bus is
// free; the slave's ACK is returned to the granted master in the same cycle.
// The document names the address decoder and the arbiter of each bus; the
// round-robin policy and the default acknowledge are this design's choice.
module wb_bus
  import vw_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter int unsigned NS = 2,
  parameter logic [NS-1:0][AW-1:0] BASE = '0,
  parameter logic [NS-1:0][AW-1:0] MASK = '0
) (
  input  logic               clk,
  input  logic               rst,
  input  wb_m2s_t [NM-1:0]   m_i,
  output wb_s2m_t [NM-1:0]   m_o,
  output wb_m2s_t [NS-1:0]   s_o,
  input  wb_s2m_t [NS-1:0]   s_i,
  output logic    [NM-1:0]   stall   // master requests but does not own the bus
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic          locked;
  logic [MW-1:0] owner, cur;
  logic          any_req;
  wb_m2s_t       bus;
  logic [NS-1:0] sel;
  logic          nomatch;
  logic          def_ack;

  always_comb begin
    int unsigned idx;
    idx     = 0;
    any_req = 1'b0;
    cur     = owner;
    if (!locked) begin
      // search from owner+1 round the ring
      for (int k = NM; k >= 1; k--) begin
        idx = (int'(owner) + k) % NM;
        if (m_i[idx].cyc) begin
          cur     = MW'(idx);
          any_req = 1'b1;
        end
      end
    end else begin
      any_req = m_i[owner].cyc;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= 1'b0;
      owner  <= MW'(NM - 1);
    end else if (!locked) begin
      if (any_req) begin
        locked <= 1'b1;
        owner  <= cur;
      end
    end else if (!m_i[owner].cyc) begin
      locked <= 1'b0;
    end
  end

  assign bus = any_req ? m_i[cur] : WB_M2S_IDLE;

  always_comb begin
    sel = '0;
    for (int i = NS - 1; i >= 0; i--) begin
      if ((bus.adr & MASK[i]) == BASE[i]) begin
        sel    = '0;
        sel[i] = 1'b1;
      end
    end
    nomatch = (sel == '0);
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s_o[i]     = bus;
      s_o[i].cyc = bus.cyc & sel[i];
      s_o[i].stb = bus.stb & sel[i];
    end
  end

  // acknowledge accesses to unmapped addresses
  always_ff @(posedge clk) begin
    if (rst) def_ack <= 1'b0;
    else     def_ack <= bus.cyc & bus.stb & nomatch & ~def_ack;
  end

  always_comb begin
    wb_s2m_t r;
    r = WB_S2M_IDLE;
    for (int i = 0; i < NS; i++) if (sel[i]) r = s_i[i];
    if (nomatch) r = '{ack: def_ack, dat: '0};
    for (int j = 0; j < NM; j++) begin
      m_o[j] = WB_S2M_IDLE;
      m_o[j].dat = r.dat;
      if (any_req && cur == MW'(j)) m_o[j].ack = r.ack;
      stall[j] = m_i[j].cyc & ~(any_req && cur == MW'(j));
    end
  end

endmodule
