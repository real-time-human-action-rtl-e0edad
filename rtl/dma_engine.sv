// dma_engine: direct memory access controller on system bus 0.
//
// Moves a block of LEN bytes without processor involvement, in one of four
// modes: 0 memory to memory (read SRC+i, write DST+i), 1 FIFO to memory
// (bytes from the fin stream written to DST+i), 2 memory to FIFO (SRC+i
// read and sent on the fout stream), 3 clear (zero written to DST+i).
// Each byte is one classic Wishbone read and/or write on the master port;
// the streams use valid/ready handshakes and simply pause the transfer.
//
// Wishbone slave registers (32-bit little endian): 0x00 SRC, 0x04 DST,
// 0x08 LEN, 0x0C control (bits 1:0 mode, writing bit 7 = 1 starts),
// 0x0D status (bit 0 busy, bit 1 done; done is cleared by a start).
// irq is the done flag.  The four transfer kinds follow the document; the
// registers and the byte-at-a-time transfer are this design's choices.
module dma_engine
  import vw_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  wb_m2s_t    s_i,
  output wb_s2m_t    s_o,
  output wb_m2s_t    m_o,
  input  wb_s2m_t    m_i,
  input  logic       fin_valid,
  output logic       fin_ready,
  input  logic [7:0] fin_data,
  output logic       fout_valid,
  input  logic       fout_ready,
  output logic [7:0] fout_data,
  output logic       irq
);
  typedef enum logic [1:0] {M2M = 2'd0, F2M = 2'd1, M2F = 2'd2, CLR = 2'd3} mode_e;
  typedef enum logic [2:0] {IDLE, NEXT, RD, GETF, WR, PUTF} state_e;

  logic [31:0] src, dst, len, i;
  mode_e       mode;
  state_e      st;
  logic        done_q;
  logic        ack;
  logic [7:0]  rdat, off;
  logic        wr;

  assign off = s_i.adr[7:0];
  assign wr  = s_i.cyc & s_i.stb & s_i.we & ~ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack        <= 1'b0;
      src        <= '0;
      dst        <= '0;
      len        <= '0;
      mode       <= M2M;
      st         <= IDLE;
      done_q     <= 1'b0;
      i          <= '0;
      m_o        <= WB_M2S_IDLE;
      fout_valid <= 1'b0;
      fout_data  <= '0;
    end else begin
      ack <= s_i.cyc & s_i.stb & ~ack;
      if (wr && st == IDLE) begin
        unique case (off[3:2])
          2'd0: src[8*off[1:0] +: 8] <= s_i.dat;
          2'd1: dst[8*off[1:0] +: 8] <= s_i.dat;
          2'd2: len[8*off[1:0] +: 8] <= s_i.dat;
          default: if (off == 8'h0C) begin
            mode <= mode_e'(s_i.dat[1:0]);
            if (s_i.dat[7]) begin
              st     <= NEXT;
              i      <= '0;
              done_q <= 1'b0;
            end
          end
        endcase
      end
      unique case (st)
        NEXT: begin
          if (i == len) begin
            st     <= IDLE;
            done_q <= 1'b1;
          end else if (mode == M2M || mode == M2F) begin
            m_o <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: AW'(src + i), dat: '0};
            st  <= RD;
          end else if (mode == F2M) begin
            st <= GETF;
          end else begin
            m_o  <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: AW'(dst + i), dat: '0};
            st   <= WR;
          end
        end
        RD: if (m_i.ack) begin
          m_o <= WB_M2S_IDLE;
          if (mode == M2F) begin
            fout_valid <= 1'b1;
            fout_data  <= m_i.dat;
            st         <= PUTF;
          end else begin
            m_o <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: AW'(dst + i), dat: m_i.dat};
            st  <= WR;
          end
        end
        GETF: if (fin_valid) begin
          m_o <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: AW'(dst + i), dat: fin_data};
          st  <= WR;
        end
        WR: if (m_i.ack) begin
          m_o <= WB_M2S_IDLE;
          i   <= i + 1'b1;
          st  <= NEXT;
        end
        PUTF: if (fout_ready) begin
          fout_valid <= 1'b0;
          i          <= i + 1'b1;
          st         <= NEXT;
        end
        default: ;
      endcase
    end
  end

  assign fin_ready = (st == GETF);

  always_ff @(posedge clk) begin
    unique case (off[3:2])
      2'd0: rdat <= src[8*off[1:0] +: 8];
      2'd1: rdat <= dst[8*off[1:0] +: 8];
      2'd2: rdat <= len[8*off[1:0] +: 8];
      default: rdat <= (off == 8'h0C) ? {6'd0, mode} :
                       (off == 8'h0D) ? {6'd0, done_q, st != IDLE} : 8'h00;
    endcase
  end

  assign s_o.ack = ack;
  assign s_o.dat = rdat;
  assign irq     = done_q;

endmodule
