// irq_handler: interrupt handler of the top level processor module.
//
// The processor has a single interrupt input.  This unit latches a rising
// edge on any of NSRC request lines into a pending bit, and raises the
// processor interrupt while any pending bit is enabled by the mask.  Ports
// (processor port bus): BASE+0 mask (read/write), BASE+1 pending (read;
// writing ones clears those bits), BASE+2 number of the lowest enabled
// pending source (read; 0xFF if none), so firmware can service several
// sources in a fixed priority.  interrupt_ack from the processor has no
// effect on the pending bits: each source is cleared by firmware.
// Servicing several interrupts through one handler follows the document;
// the edge latching, registers and priority read are this design's.
module irq_handler
  import vw_pkg::*;
#(
  parameter logic [7:0]  BASE = PB_IRQ,
  parameter int unsigned NSRC = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  pb_port_t        pb,
  output logic [7:0]      rdata,
  input  logic [NSRC-1:0] src,
  output logic            interrupt
);
  logic [NSRC-1:0] src_q, pend, mask, act;
  logic [7:0]      first;
  logic            sel;

  assign sel = pb.id[7:2] == BASE[7:2];
  assign act = pend & mask;

  always_comb begin
    first = 8'hFF;
    for (int i = NSRC - 1; i >= 0; i--) if (act[i]) first = 8'(i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      src_q     <= '0;
      pend      <= '0;
      mask      <= '0;
      interrupt <= 1'b0;
    end else begin
      src_q <= src;
      pend  <= (pend | (src & ~src_q)) &
               ~((pb.wr && sel && pb.id[1:0] == 2'd1) ? NSRC'(pb.dout) : '0);
      if (pb.wr && sel && pb.id[1:0] == 2'd0) mask <= NSRC'(pb.dout);
      interrupt <= |act;
    end
  end

  always_ff @(posedge clk) begin
    rdata <= 8'h00;
    if (sel) begin
      unique case (pb.id[1:0])
        2'd0: rdata <= 8'(mask);
        2'd1: rdata <= 8'(pend);
        2'd2: rdata <= first;
        default: rdata <= 8'h00;
      endcase
    end
  end

endmodule
