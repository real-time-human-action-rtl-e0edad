// wb_mem: on-chip block RAM (or ROM) as a Wishbone slave.
//
// Used for the internal BlockRAM RAM that holds the motion history image
// (32 KB) and the internal BlockRAM ROM that holds the SVM classification
// data sets (64 KB).  The slave decodes the low $clog2(BYTES) address bits;
// the bus decoder has already selected it.  A read or write is acknowledged
// one clock after STB is seen (two-cycle classic Wishbone access), read data
// comes from a registered block RAM port.  With READ_ONLY set, writes are
// acknowledged and ignored; a ROM's contents are loaded when the device is
// configured, which a simulation models by writing the array directly.
// Sizes follow the document; the one-wait-state timing is this design's.
module wb_mem
  import vw_pkg::*;
#(
  parameter int unsigned BYTES     = 32768,
  parameter bit          READ_ONLY = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t s_i,
  output wb_s2m_t s_o
);
  localparam int unsigned MAW = $clog2(BYTES);

  logic [7:0]     mem [BYTES];
  logic           ack;
  logic [7:0]     rdat;
  logic [MAW-1:0] a;

  assign a = s_i.adr[MAW-1:0];

  always_ff @(posedge clk) begin
    if (s_i.cyc && s_i.stb && !ack && s_i.we && !READ_ONLY) mem[a] <= s_i.dat;
    rdat <= mem[a];
  end

  always_ff @(posedge clk) begin
    if (rst) ack <= 1'b0;
    else     ack <= s_i.cyc & s_i.stb & ~ack;
  end

  assign s_o.ack = ack;
  assign s_o.dat = rdat;

endmodule
