// axis_downsizer: AXI4-Stream data width converter, wide to narrow.
//
// On the DANNA FPGA each 512-bit (64-byte) output packet is cut into 16
// 32-bit beats for the Aurora transmit stream, as the document describes.
// The least significant slice goes first (AXI4-Stream byte order). m_tlast
// is set on the final slice of a wide beat that carried TLAST; m_tkeep is the
// matching slice of s_tkeep.
//
// Timing: the wide beat is held in a register; s_tready is high when the
// register is empty or its last slice is being accepted, so back-to-back
// packets stream without a gap (one narrow beat per clock). rst is
// synchronous, active high.
module axis_downsizer #(
  parameter int unsigned S_W = 512,
  parameter int unsigned M_W = 32
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
  localparam int unsigned RATIO = S_W / M_W;
  localparam int unsigned CW    = $clog2(RATIO);
  localparam int unsigned MB    = M_W / 8;

  logic [S_W-1:0]   data_q;
  logic [S_W/8-1:0] keep_q;
  logic             last_q, full_q;
  logic [CW-1:0]    idx_q;
  logic             at_end;

  assign at_end   = (idx_q == CW'(RATIO - 1));
  assign m_tvalid = full_q;
  assign m_tdata  = data_q[idx_q*M_W +: M_W];
  assign m_tkeep  = keep_q[idx_q*MB +: MB];
  assign m_tlast  = last_q && at_end;
  assign s_tready = !full_q || (m_tready && at_end);

  always_ff @(posedge clk) begin
    if (rst) begin
      full_q <= 1'b0;
      idx_q  <= '0;
      data_q <= '0;
      keep_q <= '0;
      last_q <= 1'b0;
    end else begin
      if (full_q && m_tready) begin
        idx_q <= at_end ? '0 : idx_q + 1'b1;
        if (at_end) full_q <= 1'b0;
      end
      if (s_tvalid && s_tready) begin
        data_q <= s_tdata;
        keep_q <= s_tkeep;
        last_q <= s_tlast;
        full_q <= 1'b1;
        idx_q  <= '0;
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (rst)
    (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata) && $stable(m_tlast)));
endmodule
