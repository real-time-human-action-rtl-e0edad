// offset_threshold: adds each SVM classifier's offset and picks the winner.
//
// For M one-versus-all linear SVM classifiers the decision values are
// eta_j = <w_j, x> + b_j, and the sample is given the class k with the
// largest eta_k.  The inner products arrive as signed 24.8 scores; this
// unit adds the signed 24.8 offsets b_j, compares the sums one class per
// clock, and reports the index of the largest.  If even the largest sum is
// below the threshold register, the result is the extra class M ("no
// motion").
//
// Wishbone slave registers (32-bit values little endian): 0x00+4j score j,
// 0x20+4j offset j (j < 8), 0x40 threshold, 0x50 control (write bit 0 =
// evaluate), 0x51 status (bit 7 valid, bits 6:0 class), 0x54 winning sum.
// Results also leave on class_o with a one clock class_valid pulse, for the
// display.  class_valid rises NCLS + 2 clocks after the start write.  The offset addition and the
// maximum rule follow the document; the threshold rule for the no motion
// class and the register layout are this design's choices.
module offset_threshold
  import vw_pkg::*;
#(
  parameter int unsigned NCLS = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  wb_m2s_t    s_i,
  output wb_s2m_t    s_o,
  output logic [6:0] class_o,
  output logic       class_valid
);
  logic signed [31:0] score [8];
  logic signed [31:0] bias  [8];
  logic signed [31:0] thr, best, sum;
  logic [6:0]         besti;
  logic [3:0]         j;
  logic               run, valid, fin;
  logic               ack;
  logic [7:0]         rdat, off;
  logic               wr;

  assign off = s_i.adr[7:0];
  assign wr  = s_i.cyc & s_i.stb & s_i.we & ~ack;
  assign sum = score[j[2:0]] + bias[j[2:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      ack         <= 1'b0;
      thr         <= 32'sh8000_0000;
      best        <= '0;
      besti       <= '0;
      j           <= '0;
      run         <= 1'b0;
      fin         <= 1'b0;
      valid       <= 1'b0;
      class_o     <= '0;
      class_valid <= 1'b0;
      for (int i = 0; i < 8; i++) begin
        score[i] <= '0;
        bias[i]  <= '0;
      end
    end else begin
      ack         <= s_i.cyc & s_i.stb & ~ack;
      class_valid <= 1'b0;
      if (wr) begin
        if (off < 8'h20)       score[off[4:2]][8*off[1:0] +: 8] <= s_i.dat;
        else if (off < 8'h40)  bias[off[4:2]][8*off[1:0] +: 8]  <= s_i.dat;
        else if (off[7:2] == 6'h10) thr[8*off[1:0] +: 8] <= s_i.dat;
        else if (off == 8'h50 && s_i.dat[0] && !run) begin
          run   <= 1'b1;
          valid <= 1'b0;
          j     <= '0;
        end
      end
      if (run) begin
        if (j == 0 || sum > best) begin
          best  <= sum;
          besti <= 7'(j);
        end
        if (j == 4'(NCLS - 1)) begin
          run <= 1'b0;
          j   <= '0;
        end else begin
          j <= j + 1'b1;
        end
      end
      // one clock after the last comparison
      fin <= run && (j == 4'(NCLS - 1));
      if (fin) begin
        valid       <= 1'b1;
        class_valid <= 1'b1;
        class_o     <= (best < thr) ? 7'(NCLS) : besti;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (off < 8'h20)             rdat <= score[off[4:2]][8*off[1:0] +: 8];
    else if (off < 8'h40)        rdat <= bias[off[4:2]][8*off[1:0] +: 8];
    else if (off[7:2] == 6'h10)  rdat <= thr[8*off[1:0] +: 8];
    else if (off == 8'h51)       rdat <= {valid, class_o};
    else if (off[7:2] == 6'h15)  rdat <= best[8*off[1:0] +: 8];
    else                         rdat <= 8'h00;
  end

  assign s_o.ack = ack;
  assign s_o.dat = rdat;

endmodule
