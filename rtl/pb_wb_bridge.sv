// pb_wb_bridge: PicoBlaze port bus to Wishbone bridge (bus 0 master).
//
// The 8-bit processor cannot wait for a slow bus, so it only queues work:
// it sets a 24-bit address (ports BASE+0..2, low byte first), then every
// write to BASE+3 queues a bus write of that byte and every write of n to
// BASE+4 queues n bus reads; the address advances by one after each queued
// access.  Queued accesses run one after another as classic Wishbone
// cycles; read bytes are collected in a read FIFO, which BASE+5 pops (read
// value is the oldest byte).  BASE+6 reads status: bit 0 bridge busy (work
// queued or running), bit 1 command FIFO full, bit 2 read data available,
// bits 7:3 number of read bytes waiting.
// Port reads return data one clock after the port number is applied.
// The FIFO buffered request/response scheme follows the document; port
// numbers, FIFO depths and address auto-increment are this design's.
module pb_wb_bridge
  import vw_pkg::*;
#(
  parameter logic [7:0]  BASE  = PB_WB,
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  pb_port_t   pb,
  output logic [7:0] rdata,
  output wb_m2s_t    m_o,
  input  wb_s2m_t    m_i
);
  localparam int unsigned PW = $clog2(DEPTH);

  typedef struct packed {
    logic          we;
    logic [AW-1:0] adr;
    logic [7:0]    dat;
  } cmd_t;

  cmd_t          cq [DEPTH];
  logic [7:0]    rq [DEPTH];
  logic [PW:0]   ccnt, rcnt;
  logic [PW-1:0] cwp, crp, rwp, rrp;
  logic [AW-1:0] adr;
  logic [7:0]    nrd;        // reads still to queue
  logic          active;
  logic          sel_w, sel_r;
  logic          cpush, cpop, rpush, rpop;
  cmd_t          cin;

  assign sel_w = pb.wr && pb.id[7:3] == BASE[7:3];
  assign sel_r = pb.rd && pb.id[7:3] == BASE[7:3];

  // queue one command per clock: a data write, or the next pending read
  always_comb begin
    cpush = 1'b0;
    cin   = '{we: 1'b0, adr: adr, dat: pb.dout};
    if (ccnt != (PW+1)'(DEPTH)) begin
      if (sel_w && pb.id[2:0] == 3'd3) begin
        cpush  = 1'b1;
        cin.we = 1'b1;
      end else if (nrd != 0 && (rcnt + ccnt) < (PW+1)'(DEPTH)) begin
        cpush = 1'b1;
      end
    end
  end

  assign cpop  = active & m_i.ack;
  assign rpush = cpop & ~m_o.we;
  assign rpop  = sel_r && pb.id[2:0] == 3'd5 && rcnt != 0;

  always_ff @(posedge clk) begin
    if (rst) begin
      ccnt   <= '0;
      rcnt   <= '0;
      cwp    <= '0;
      crp    <= '0;
      rwp    <= '0;
      rrp    <= '0;
      adr    <= '0;
      nrd    <= '0;
      active <= 1'b0;
      m_o    <= WB_M2S_IDLE;
    end else begin
      if (sel_w) begin
        unique case (pb.id[2:0])
          3'd0: adr[7:0]   <= pb.dout;
          3'd1: adr[15:8]  <= pb.dout;
          3'd2: adr[23:16] <= pb.dout;
          3'd4: nrd        <= pb.dout;
          default: ;
        endcase
      end
      if (cpush) begin
        cq[cwp] <= cin;
        cwp     <= cwp + 1'b1;
        adr     <= adr + 1'b1;
        if (!cin.we) nrd <= nrd - 1'b1;
      end
      // bus side
      if (!active) begin
        if (ccnt != 0) begin
          active  <= 1'b1;
          m_o.cyc <= 1'b1;
          m_o.stb <= 1'b1;
          m_o.we  <= cq[crp].we;
          m_o.adr <= cq[crp].adr;
          m_o.dat <= cq[crp].dat;
        end
      end else if (m_i.ack) begin
        active <= 1'b0;
        m_o    <= WB_M2S_IDLE;
        crp    <= crp + 1'b1;
      end
      if (rpush) begin
        rq[rwp] <= m_i.dat;
        rwp     <= rwp + 1'b1;
      end
      if (rpop) rrp <= rrp + 1'b1;
      ccnt <= ccnt + (PW+1)'(cpush) - (PW+1)'(cpop);
      rcnt <= rcnt + (PW+1)'(rpush) - (PW+1)'(rpop);
    end
  end

  // port read data, one clock after the port number
  always_ff @(posedge clk) begin
    rdata <= 8'h00;
    if (pb.id[7:3] == BASE[7:3]) begin
      unique case (pb.id[2:0])
        3'd0: rdata <= adr[7:0];
        3'd1: rdata <= adr[15:8];
        3'd2: rdata <= adr[23:16];
        3'd5: rdata <= rq[rrp];
        3'd6: rdata <= {5'(rcnt), rcnt != 0,
                        ccnt == (PW+1)'(DEPTH), (ccnt != 0) || active || (nrd != 0)};
        default: rdata <= 8'h00;
      endcase
    end
  end

endmodule
