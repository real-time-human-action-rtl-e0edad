// seg7_display: driver for two seven segment LED digits.
//
// Shows one byte as two hexadecimal digits (digit 1 the high nibble).
// Segments are active high in the order {g,f,e,d,c,b,a}.  The byte comes
// from a Wishbone register (offset 0x00, readable) or, whenever res_valid
// pulses, from the recognition result res_data, whichever was written
// last.  Both digits have their own segment outputs (no multiplexing).
// The two digits and their use for the result follow the document; the
// hexadecimal font and the direct result input are this design's choices.
module seg7_display
  import vw_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  wb_m2s_t    s_i,
  output wb_s2m_t    s_o,
  input  logic       res_valid,
  input  logic [7:0] res_data,
  output logic [6:0] seg0,
  output logic [6:0] seg1
);
  logic [7:0] value;
  logic       ack;

  function automatic logic [6:0] hex7(input logic [3:0] d);
    unique case (d)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;
      4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;
      4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;
      default: return 7'b1110001;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      value <= '0;
      ack   <= 1'b0;
    end else begin
      ack <= s_i.cyc & s_i.stb & ~ack;
      if (s_i.cyc && s_i.stb && s_i.we && !ack && s_i.adr[7:0] == 8'h00) value <= s_i.dat;
      else if (res_valid) value <= res_data;
    end
  end

  assign s_o.ack = ack;
  assign s_o.dat = value;
  assign seg0    = hex7(value[3:0]);
  assign seg1    = hex7(value[7:4]);

endmodule
