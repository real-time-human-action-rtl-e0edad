// cam_port: camera parallel port with Bayer to grey conversion, down
// sampling and a dual frame buffer.
//
// The camera streams raw Bayer pixels (RGGB: even lines R G R G ..., odd
// lines G B G B ...) of an IN_W x IN_H frame in raster order, one pixel per
// clock with cam_valid; cam_sof marks the first pixel of a frame.  Each 2x2
// Bayer cell becomes one grey pixel, the rounded-down mean of its four
// samples (a line buffer keeps the sums of the even line).  The resulting
// IN_W/2 x IN_H/2 grey image is reduced to 100x80 or 200x160 by pixel
// selection: grey column gx is kept when floor((gx+1)*OW/GW) differs from
// floor(gx*OW/GW), and likewise for lines, which spreads the kept pixels
// evenly.  Kept pixels are written, line by line, into one of two 32 KB
// frame buffers while the other holds the last complete frame; the buffers
// swap at the end of each frame, so one image can be processed while the
// next is captured.
//
// Wishbone slave fb_*: read the buffers (byte offset 0x0000 buffer 0,
// 0x8000 buffer 1; writes are ignored).  Wishbone slave reg_*: 0x00 control
// (bit 0 enable, bit 1 resolution: 0 = 100x80, 1 = 200x160, sampled at the
// start of a frame), 0x01 status (bit 0 buffer holding the last complete
// frame, bit 1 frame ready; writing 0x01 clears frame ready), 0x02 count of
// complete frames.  irq is the frame ready flag.
// The 640x480 Bayer input, greyscale conversion, the two output sizes and
// the dual 32 KB buffers follow the document; the cell mean, the selection
// pattern and the registers are this design's choices.
module cam_port
  import vw_pkg::*;
#(
  parameter int unsigned IN_W = 640,
  parameter int unsigned IN_H = 480
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cam_valid,
  input  logic       cam_sof,
  input  logic [7:0] cam_data,
  input  wb_m2s_t    fb_i,
  output wb_s2m_t    fb_o,
  input  wb_m2s_t    reg_i,
  output wb_s2m_t    reg_o,
  output logic       irq
);
  localparam int unsigned GW = IN_W / 2;
  localparam int unsigned GH = IN_H / 2;

  logic [7:0]  fb [65536];
  logic [8:0]  lb [GW];
  logic [9:0]  rx, ry;          // raw pixel position
  logic [7:0]  prev_s;          // first sample of the current pair
  logic        capturing, res, res_q;
  logic        enable;
  logic        wsel, last_buf, ready;
  logic [7:0]  frames;
  logic [9:0]  ax, ay;          // selection accumulators
  logic        row_keep;
  logic [14:0] waddr;
  logic [8:0]  ow, oh;
  logic [9:0]  pos_x, pos_y;
  logic [8:0]  pair;
  logic [9:0]  quad;
  logic [9:0]  ax_n, ay_n;
  logic        col_keep, res_cur;

  assign res_cur = cam_sof ? res : res_q;
  assign ow = res_cur ? 9'd200 : 9'd100;
  assign oh = res_cur ? 9'd160 : 9'd80;

  // position of the incoming pixel (a start of frame restarts at 0,0)
  assign pos_x = cam_sof ? '0 : rx;
  assign pos_y = cam_sof ? '0 : ry;
  assign pair  = {1'b0, prev_s} + {1'b0, cam_data};
  assign quad  = {1'b0, lb[pos_x[9:1]]} + {1'b0, pair};
  assign ax_n  = ((pos_x == 10'd1) ? 10'd0 : ax) + 10'(ow);
  assign col_keep = (ax_n >= 10'(GW));
  assign ay_n  = ((pos_y == 10'd0) ? 10'd0 : ay) + 10'(oh);

  always_ff @(posedge clk) begin
    if (rst) begin
      rx        <= '0;
      ry        <= '0;
      prev_s    <= '0;
      capturing <= 1'b0;
      res_q     <= 1'b0;
      wsel      <= 1'b0;
      last_buf  <= 1'b1;
      ready     <= 1'b0;
      frames    <= '0;
      ax        <= '0;
      ay        <= '0;
      row_keep  <= 1'b0;
      waddr     <= '0;
    end else begin
      if (reg_i.cyc && reg_i.stb && reg_i.we && !reg_o.ack && reg_i.adr[7:0] == 8'h01)
        ready <= 1'b0;
      if (cam_valid) begin
        if (cam_sof) begin
          capturing <= enable;
          res_q     <= res;
        end
        // raster position
        if (pos_x == 10'(IN_W - 1)) begin
          rx <= '0;
          ry <= pos_y + 1'b1;
        end else begin
          rx <= pos_x + 1'b1;
          ry <= pos_y;
        end
        if (!pos_x[0]) prev_s <= cam_data;
        if ((capturing && !cam_sof) || (cam_sof && enable)) begin
          // line and column selection, one decision per grey line / column
          if (pos_x == 0 && !pos_y[0]) begin
            if (pos_y == 0) waddr <= '0;
            row_keep <= (ay_n >= 10'(GH));
            ay       <= (ay_n >= 10'(GH)) ? ay_n - 10'(GH) : ay_n;
          end
          if (pos_x[0]) begin
            if (!pos_y[0]) begin
              lb[pos_x[9:1]] <= pair;
            end else begin
              // odd line: finish the Bayer cell
              if (row_keep) begin
                if (col_keep) begin
                  fb[{wsel, waddr}] <= quad[9:2];
                  waddr <= waddr + 1'b1;
                end
              end
              ax <= col_keep ? ax_n - 10'(GW) : ax_n;
            end
          end
          // end of frame
          if (pos_x == 10'(IN_W - 1) && pos_y == 10'(IN_H - 1)) begin
            last_buf  <= wsel;
            wsel      <= ~wsel;
            ready     <= 1'b1;
            frames    <= frames + 1'b1;
            capturing <= 1'b0;
          end
        end
      end
    end
  end

  // register slave
  logic       r_ack;
  logic [7:0] r_dat;
  always_ff @(posedge clk) begin
    if (rst) begin
      r_ack  <= 1'b0;
      enable <= 1'b0;
      res    <= 1'b0;
    end else begin
      r_ack <= reg_i.cyc & reg_i.stb & ~r_ack;
      if (reg_i.cyc && reg_i.stb && reg_i.we && !r_ack && reg_i.adr[7:0] == 8'h00) begin
        enable <= reg_i.dat[0];
        res    <= reg_i.dat[1];
      end
    end
  end
  always_ff @(posedge clk) begin
    unique case (reg_i.adr[7:0])
      8'h00:   r_dat <= {6'd0, res, enable};
      8'h01:   r_dat <= {6'd0, ready, last_buf};
      8'h02:   r_dat <= frames;
      default: r_dat <= 8'h00;
    endcase
  end
  assign reg_o.ack = r_ack;
  assign reg_o.dat = r_dat;
  assign irq       = ready;

  // frame buffer read slave
  logic       f_ack;
  logic [7:0] f_dat;
  always_ff @(posedge clk) begin
    if (rst) f_ack <= 1'b0;
    else     f_ack <= fb_i.cyc & fb_i.stb & ~f_ack;
    f_dat <= fb[fb_i.adr[15:0]];
  end
  assign fb_o.ack = f_ack;
  assign fb_o.dat = f_dat;

endmodule
