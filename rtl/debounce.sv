// debounce: push button de-bounce filter.
//
// The raw button input is first synchronised with two flip-flops.  The
// clean output only changes after the synchronised input has held a new
// level for STABLE consecutive clocks; any bounce restarts the count.
// rise pulses for one clock when the clean output goes high (a button
// press, used as an interrupt source).  With the default STABLE of 200000
// and a 20 MHz clock the input must be steady for 10 ms.  The document only
// names the de-bounce block; the filter is this design's choice.
module debounce #(
  parameter int unsigned STABLE = 200000
) (
  input  logic clk,
  input  logic rst,
  input  logic raw,
  output logic clean,
  output logic rise
);
  localparam int unsigned CW = $clog2(STABLE + 1);

  logic [1:0]    sync;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      cnt   <= '0;
      clean <= 1'b0;
      rise  <= 1'b0;
    end else begin
      sync <= {sync[0], raw};
      rise <= 1'b0;
      if (sync[1] == clean) begin
        cnt <= '0;
      end else if (cnt == CW'(STABLE - 1)) begin
        cnt   <= '0;
        clean <= sync[1];
        rise  <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
