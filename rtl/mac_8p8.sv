// mac_8p8: inner product co-processor, signed 8.8 x signed 8.8 into 24.8.
//
// Two pipeline stages.  Stage 1 registers the full 32-bit signed product of
// the two 16-bit signed 8.8 operands (16 fraction bits).  Stage 2 drops the
// eight lowest fraction bits (arithmetic shift, i.e. rounding toward minus
// infinity) and adds the 24.8 value to a 32-bit signed 24.8 accumulator,
// which wraps on overflow.  A new operand pair may be given every clock
// (en); clr empties the pipeline and zeroes the accumulator.  idle is high
// when no product is in flight, so acc holds the sum of every pair given.
// The number formats and the pipelined multiplier follow the document; the
// truncation and wrap-around are this design's choice.
module mac_8p8 (
  input  logic               clk,
  input  logic               rst,
  input  logic               clr,
  input  logic               en,
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  output logic signed [31:0] acc,
  output logic               idle
);
  logic signed [31:0] prod;
  logic               prod_v;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      prod   <= '0;
      prod_v <= 1'b0;
      acc    <= '0;
    end else begin
      prod   <= a * b;
      prod_v <= en;
      if (prod_v) acc <= acc + (prod >>> 8);
    end
  end

  assign idle = ~prod_v & ~en;

endmodule
