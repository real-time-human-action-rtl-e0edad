// pc_wb_bridge: processing core to Wishbone bridge with pointer management.
//
// The core's sequencer never forms bus addresses itself.  The bridge keeps
// NPTR pointers, each a base address and an offset.  Requests (valid/ready):
//   BR_SETB   ptr := data, offset := 0            (one clock)
//   BR_ADDOFF offset += data                      (one clock, skips ahead)
//   BR_READ   read the byte at base+offset, then offset += 1
//   BR_WRITE  write data[7:0] at base+offset, then offset += 1
// A read or write runs one classic Wishbone cycle on the master port; its
// completion is signalled by rsp_valid for one clock, with the read byte on
// rsp_data.  req_ready is high only while no bus cycle is in progress.
// Automatic pointer update after each access and offsets from base pointers
// follow the document; the request encoding is this design's own.
module pc_wb_bridge
  import vw_pkg::*;
#(
  parameter int unsigned NPTR = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  br_op_e                  req_op,
  input  logic [$clog2(NPTR)-1:0] req_ptr,
  input  logic [31:0]             req_data,
  output logic                    rsp_valid,
  output logic [7:0]              rsp_data,
  output wb_m2s_t                 m_o,
  input  wb_s2m_t                 m_i
);
  logic [AW-1:0]           base [NPTR];
  logic [AW-1:0]           off  [NPTR];
  logic                    active;
  logic [$clog2(NPTR)-1:0] p;

  assign req_ready = ~active;

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      m_o       <= WB_M2S_IDLE;
      p         <= '0;
      for (int i = 0; i < NPTR; i++) begin
        base[i] <= '0;
        off[i]  <= '0;
      end
    end else begin
      rsp_valid <= 1'b0;
      if (!active) begin
        if (req_valid) begin
          unique case (req_op)
            BR_SETB: begin
              base[req_ptr] <= req_data[AW-1:0];
              off[req_ptr]  <= '0;
            end
            BR_ADDOFF: off[req_ptr] <= off[req_ptr] + req_data[AW-1:0];
            default: begin
              active  <= 1'b1;
              p       <= req_ptr;
              m_o.cyc <= 1'b1;
              m_o.stb <= 1'b1;
              m_o.we  <= (req_op == BR_WRITE);
              m_o.adr <= base[req_ptr] + off[req_ptr];
              m_o.dat <= req_data[7:0];
            end
          endcase
        end
      end else if (m_i.ack) begin
        active    <= 1'b0;
        m_o.cyc   <= 1'b0;
        m_o.stb   <= 1'b0;
        m_o.we    <= 1'b0;
        rsp_valid <= 1'b1;
        rsp_data  <= m_i.dat;
        off[p]    <= off[p] + 1'b1;
      end
    end
  end

endmodule
