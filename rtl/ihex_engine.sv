// ihex_engine: Intel hex upload/download engine, a bus 0 master.
//
// Lets a PC read and write anything on system bus 0 (memories and the
// status and control registers of every component) with text records in
// the extended Intel hex format, so it can stand in for the top level
// processor during tests.  ASCII characters arrive on the rx stream and
// replies leave on the tx stream (valid/ready, one character per
// transfer); the serial line itself is outside this block.
//
// A record is ':' LL AAAA TT data.. CC in hex digits (LL data bytes, 16-bit
// address AAAA, type TT, checksum CC so that all bytes sum to 0 mod 256).
// Characters between records are ignored.  Types handled:
//   00 data: the LL bytes are written to bus addresses {EXT, AAAA} + i,
//      only after the checksum has been found correct;
//   01 end of file: accepted, no action;
//   04 extended linear address: two data bytes, the low one becomes EXT,
//      the upper 8 address bits;
//   06 read request (this design's extension, not a standard record type):
//      one data byte N (1..255); N bytes are read from {EXT, AAAA} and returned as a
//      type 00 record ':' NN AAAA 00 data.. CC CR LF.
// A bad checksum, a non-hex digit inside a record or an unknown type is
// answered with '?' CR LF and the record is dropped.  Bus accesses are
// classic single cycles, one per byte.
// Upload and download in extended Intel hex over the system bus follow the
// document; the read request record, the error reply and the character
// streams are this design's choices.
module ihex_engine
  import vw_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       rx_valid,
  output logic       rx_ready,
  input  logic [7:0] rx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic [7:0] tx_data,
  output wb_m2s_t    m_o,
  input  wb_s2m_t    m_i
);
  typedef enum logic [2:0] {S_IDLE, S_HEX, S_BUS, S_TX, S_ERR} state_e;

  state_e      st;
  logic [7:0]  buf_q [256];
  logic [7:0]  len, typ, sum, ext, cnt;
  logic [3:0]  cur;        // high nibble of the byte being read
  logic [15:0] addr;
  logic [8:0]  k;          // byte index inside the record
  logic        hi;         // next hex digit is the high nibble
  logic [3:0]  nib;
  logic        is_hex;
  // transmit side: item index over ':', bytes as two digits, CR, LF
  logic [8:0]  ti;         // byte index of the reply record
  logic [1:0]  tph;        // 0 high digit, 1 low digit
  logic [7:0]  tbyte, tsum;
  logic        tstart, tend;
  logic [1:0]  etail;      // error reply position

  // hex digit decode
  always_comb begin
    is_hex = 1'b1;
    nib    = 4'd0;
    if (rx_data >= "0" && rx_data <= "9")      nib = 4'(rx_data - "0");
    else if (rx_data >= "A" && rx_data <= "F") nib = 4'(rx_data - "A" + 8'd10);
    else if (rx_data >= "a" && rx_data <= "f") nib = 4'(rx_data - "a" + 8'd10);
    else is_hex = 1'b0;
  end

  function automatic logic [7:0] hexc(input logic [3:0] v);
    return (v < 10) ? 8'("0") + 8'(v) : 8'("A") + 8'(v) - 8'd10;
  endfunction

  // reply record bytes: N, AH, AL, 00, data.., checksum
  always_comb begin
    if (ti == 0)                  tbyte = len;
    else if (ti == 1)             tbyte = addr[15:8];
    else if (ti == 2)             tbyte = addr[7:0];
    else if (ti == 3)             tbyte = 8'h00;
    else if (ti < 9'(len) + 9'd4) tbyte = buf_q[8'(ti - 9'd4)];
    else                          tbyte = 8'(-tsum);
  end

  assign rx_ready = (st == S_IDLE) || (st == S_HEX);

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = 8'h00;
    if (st == S_TX) begin
      tx_valid = 1'b1;
      if (tstart)                        tx_data = ":";
      else if (tend)                     tx_data = (tph == 0) ? 8'h0D : 8'h0A;
      else                               tx_data = hexc(tph == 0 ? tbyte[7:4] : tbyte[3:0]);
    end else if (st == S_ERR) begin
      tx_valid = 1'b1;
      tx_data  = (etail == 0) ? "?" : (etail == 1) ? 8'h0D : 8'h0A;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= S_IDLE;
      len    <= '0;
      typ    <= '0;
      sum    <= '0;
      cur    <= '0;
      ext    <= '0;
      cnt    <= '0;
      addr   <= '0;
      k      <= '0;
      hi     <= 1'b1;
      ti     <= '0;
      tph    <= '0;
      tsum   <= '0;
      tstart <= 1'b0;
      tend   <= 1'b0;
      etail  <= '0;
      m_o    <= WB_M2S_IDLE;
    end else begin
      unique case (st)
        S_IDLE: if (rx_valid && rx_data == ":") begin
          st  <= S_HEX;
          k   <= '0;
          hi  <= 1'b1;
          sum <= '0;
        end
        S_HEX: if (rx_valid) begin
          if (!is_hex) begin
            st    <= S_ERR;
            etail <= '0;
          end else if (hi) begin
            cur <= nib;
            hi  <= 1'b0;
          end else begin
            logic [7:0] b;
            b = {cur, nib};
            hi  <= 1'b1;
            sum <= sum + b;
            k   <= k + 1'b1;
            if (k == 0)      len        <= b;
            else if (k == 1) addr[15:8] <= b;
            else if (k == 2) addr[7:0]  <= b;
            else if (k == 3) typ        <= b;
            else if (k < 9'(len) + 9'd4) buf_q[8'(k - 9'd4)] <= b;
            if (k >= 3 && k == 9'(len) + 9'd4) begin
              // checksum byte: record complete
              cnt <= '0;
              if (8'(sum + b) != 8'd0) begin
                st    <= S_ERR;
                etail <= '0;
              end else begin
                unique case (typ)
                  8'h00: st <= (len == 0) ? S_IDLE : S_BUS;
                  8'h01: st <= S_IDLE;
                  8'h04: begin
                    ext <= buf_q[1];
                    st  <= S_IDLE;
                  end
                  8'h06: begin
                    len <= buf_q[0];
                    st  <= (buf_q[0] == 0) ? S_IDLE : S_BUS;
                  end
                  default: begin
                    st    <= S_ERR;
                    etail <= '0;
                  end
                endcase
              end
            end
          end
        end
        S_BUS: begin
          if (!m_o.cyc) begin
            m_o.cyc <= 1'b1;
            m_o.stb <= 1'b1;
            m_o.we  <= (typ == 8'h00);
            m_o.adr <= {ext, addr + 16'(cnt)};
            m_o.dat <= buf_q[cnt];
          end else if (m_i.ack) begin
            m_o <= WB_M2S_IDLE;
            if (typ != 8'h00) buf_q[cnt] <= m_i.dat;
            cnt <= cnt + 1'b1;
            if (cnt + 1'b1 == len) begin
              if (typ == 8'h00) begin
                st <= S_IDLE;
              end else begin
                st     <= S_TX;
                ti     <= '0;
                tph    <= '0;
                tsum   <= '0;
                tstart <= 1'b1;
                tend   <= 1'b0;
              end
            end
          end
        end
        S_TX: if (tx_ready) begin
          if (tstart) begin
            tstart <= 1'b0;
          end else if (tend) begin
            if (tph == 0) tph <= 2'd1;
            else          st  <= S_IDLE;
          end else if (tph == 0) begin
            tph <= 2'd1;
          end else begin
            tph  <= 2'd0;
            tsum <= tsum + tbyte;
            ti   <= ti + 1'b1;
            if (ti == 9'(len) + 9'd4) tend <= 1'b1;
          end
        end
        default: if (tx_ready) begin     // S_ERR
          if (etail == 2) st <= S_IDLE;
          etail <= etail + 1'b1;
        end
      endcase
    end
  end

endmodule
