// uart_tx: serial port (transmit side) of the top level processor module.
//
// Bytes written to port BASE+0 enter a FIFO of DEPTH bytes and are sent on
// txd as 8N1 frames (start bit 0, eight data bits LSB first, stop bit 1),
// each bit lasting CLK_HZ/BAUD clocks.  Port BASE+1 reads status: bit 0
// transmitter busy, bit 1 FIFO full.  Bytes written while the FIFO is full
// are dropped; firmware polls bit 1 first.  done pulses for one clock when
// the last queued byte has been sent (an interrupt source, so firmware can
// queue the next message).  The document only names the
// serial port (used for status messages); 115200 baud, 8N1 and the FIFO
// are this design's choices.
module uart_tx
  import vw_pkg::*;
#(
  parameter logic [7:0]  BASE   = PB_UART,
  parameter int unsigned CLK_HZ = 20_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter int unsigned DEPTH  = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  pb_port_t   pb,
  output logic [7:0] rdata,
  output logic       txd,
  output logic       done
);
  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned DVW = $clog2(DIV);
  localparam int unsigned PW  = $clog2(DEPTH);

  logic [7:0]     fifo [DEPTH];
  logic [PW:0]    cnt;
  logic [PW-1:0]  wp, rp;
  logic [8:0]     sh;        // data bits then stop bit
  logic [3:0]     nbit;      // bits left to send after the current one
  logic [DVW-1:0] dcnt;
  logic           busy, sel, push, pop;

  assign sel  = pb.id[7:1] == BASE[7:1];
  assign push = pb.wr && sel && !pb.id[0] && cnt != (PW+1)'(DEPTH);
  assign pop  = !busy && cnt != 0;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      wp   <= '0;
      rp   <= '0;
      sh   <= '1;
      nbit <= '0;
      dcnt <= '0;
      busy <= 1'b0;
      txd  <= 1'b1;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (push) begin
        fifo[wp] <= pb.dout;
        wp       <= wp + 1'b1;
      end
      if (pop) begin
        rp   <= rp + 1'b1;
        sh   <= {1'b1, fifo[rp]};
        nbit <= 4'd9;
        dcnt <= '0;
        busy <= 1'b1;
        txd  <= 1'b0;        // start bit
      end else if (busy) begin
        if (dcnt == DVW'(DIV - 1)) begin
          dcnt <= '0;
          if (nbit == 0) begin
            busy <= 1'b0;
            done <= (cnt == 0) && !push;
          end else begin
            txd  <= sh[0];
            sh   <= {1'b1, sh[8:1]};
            nbit <= nbit - 1'b1;
          end
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    rdata <= 8'h00;
    if (sel && pb.id[0]) rdata <= {6'd0, cnt == (PW+1)'(DEPTH), busy || cnt != 0};
  end

endmodule
