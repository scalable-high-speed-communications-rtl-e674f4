// axis_upsizer: AXI4-Stream data width converter, narrow to wide.
//
// On the DANNA FPGA the 32-bit Aurora receive stream is widened to one
// 288-bit (36-byte) input packet per transfer, as the document describes.
// Beats are collected in arrival order, the first beat in the least
// significant bits (AXI4-Stream byte order). A wide beat is issued after
// RATIO narrow beats, or earlier when a narrow beat carries TLAST; m_tkeep
// then marks only the bytes that were received. m_tlast repeats the TLAST of
// the beat that closed the wide word.
//
// Timing: one wide output register. s_tready is high while that register is
// empty or being drained this cycle, so a new packet can start in the cycle
// the previous one leaves. Latency: m_tvalid rises the clock after the last
// narrow beat. rst is synchronous, active high.
module axis_upsizer #(
  parameter int unsigned S_W = 32,
  parameter int unsigned M_W = 288
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             s_tvalid,
  output logic             s_tready,
  input  logic [S_W-1:0]   s_tdata,
  input  logic [S_W/8-1:0] s_tkeep,
  input  logic             s_tlast,
  output logic             m_tvalid,
  input  logic             m_tready,
  output logic [M_W-1:0]   m_tdata,
  output logic [M_W/8-1:0] m_tkeep,
  output logic             m_tlast
);
  localparam int unsigned RATIO = M_W / S_W;
  localparam int unsigned CW    = $clog2(RATIO);
  localparam int unsigned SB    = S_W / 8;

  logic [CW-1:0] idx_q;
  logic          s_beat, closes;

  assign s_tready = !m_tvalid || m_tready;
  assign s_beat   = s_tvalid && s_tready;
  assign closes   = s_tlast || (idx_q == CW'(RATIO - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      idx_q    <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tkeep  <= '0;
      m_tlast  <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (s_beat) begin
        m_tdata[idx_q*S_W +: S_W] <= s_tdata;
        if (idx_q == '0) m_tkeep <= {{(M_W/8-SB){1'b0}}, s_tkeep};
        else             m_tkeep[idx_q*SB +: SB] <= s_tkeep;
        if (closes) begin
          idx_q    <= '0;
          m_tvalid <= 1'b1;
          m_tlast  <= s_tlast;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (rst)
    (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata)));
endmodule
