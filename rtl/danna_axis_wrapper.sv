// danna_axis_wrapper: AXI4-Stream wrapper around the DANNA array.
//
// The DANNA array reads input packets and writes output packets through a
// native FIFO interface; the link to the Aurora core is AXI4-Stream. As the
// document describes, a wrapper buffers packets in both directions and
// provides the AXI4-Stream side. Here each direction is a single-clock
// packet FIFO, one whole packet per entry:
//   - input:  s_axis (288-bit packets from the width converter) -> FIFO ->
//             native read port (in_pkt_dout/in_pkt_empty/in_pkt_rd_en,
//             first word fall through).
//   - output: native write port (out_pkt_din/out_pkt_wr_en/out_pkt_full) ->
//             FIFO -> m_axis (512-bit packets, TLAST on every packet, all
//             bytes kept) to the width converter.
// Input beats whose TLAST is low (a packet not closed where expected) are
// still stored; framing errors are counted in bad_frame_count.
// Buffer depths are this design's choice (the document gives none).
// in_pkt_count/out_pkt_count give occupancy for flow control and debug.
// rst is synchronous, active high; it empties both buffers.
module danna_axis_wrapper #(
  parameter int unsigned IN_W      = 288,
  parameter int unsigned OUT_W     = 512,
  parameter int unsigned IN_DEPTH  = 16,
  parameter int unsigned OUT_DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  // AXI4-Stream slave: input packets
  input  logic                       s_tvalid,
  output logic                       s_tready,
  input  logic [IN_W-1:0]            s_tdata,
  input  logic                       s_tlast,
  // native FIFO read port to the array
  output logic [IN_W-1:0]            in_pkt_dout,
  output logic                       in_pkt_empty,
  input  logic                       in_pkt_rd_en,
  // native FIFO write port from the array
  input  logic [OUT_W-1:0]           out_pkt_din,
  input  logic                       out_pkt_wr_en,
  output logic                       out_pkt_full,
  // AXI4-Stream master: output packets
  output logic                       m_tvalid,
  input  logic                       m_tready,
  output logic [OUT_W-1:0]           m_tdata,
  output logic [OUT_W/8-1:0]         m_tkeep,
  output logic                       m_tlast,
  // status
  output logic [$clog2(IN_DEPTH):0]  in_pkt_count,
  output logic [$clog2(OUT_DEPTH):0] out_pkt_count,
  output logic [15:0]                bad_frame_count
);
  logic in_full, out_empty;

  sync_fifo #(.W(IN_W), .DEPTH(IN_DEPTH)) u_in_buf (
    .clk, .rst,
    .wr_en(s_tvalid && s_tready), .din(s_tdata), .full(in_full),
    .rd_en(in_pkt_rd_en), .dout(in_pkt_dout), .empty(in_pkt_empty),
    .count(in_pkt_count));
  assign s_tready = !in_full;

  sync_fifo #(.W(OUT_W), .DEPTH(OUT_DEPTH)) u_out_buf (
    .clk, .rst,
    .wr_en(out_pkt_wr_en), .din(out_pkt_din), .full(out_pkt_full),
    .rd_en(m_tvalid && m_tready), .dout(m_tdata), .empty(out_empty),
    .count(out_pkt_count));
  assign m_tvalid = !out_empty;
  assign m_tkeep  = '1;
  assign m_tlast  = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) bad_frame_count <= '0;
    else if (s_tvalid && s_tready && !s_tlast && bad_frame_count != '1)
      bad_frame_count <= bad_frame_count + 1'b1;
  end
endmodule
