// danna_fpga_link: communication logic on the DANNA FPGA.
//
// Connects the Aurora 8B/10B user interface (32-bit AXI4-Stream, Aurora
// user clock) to the DANNA array, as the document describes:
//   receive:  Aurora rx stream -> axis_upsizer (32 -> 288 bit, one 36-byte
//             input packet per wide beat) -> danna_axis_wrapper input
//             buffer -> native FIFO read port of the array.
//   transmit: array native FIFO write port -> danna_axis_wrapper output
//             buffer -> axis_downsizer (512 -> 32 bit, TLAST on the 16th
//             word, one 64-byte output packet per Aurora frame) -> Aurora tx.
// The Aurora receive stream cannot be stalled, so nfc_controller asks the
// channel partner for XOFF once IN_NFC_THRESHOLD packets are buffered and
// for XON when fewer are. A receive word that arrives while the upsizer
// cannot take it is lost and counted in rx_overflow_count.
// buf_rst (asynchronous, active high) is the communication-buffer reset
// from the communication board; it is bridged into user_clk here. It does
// not reset the DANNA array.
// Buffer depths and the flow-control threshold are this design's choices.
module danna_fpga_link #(
  parameter int unsigned IN_PKT_W         = 288,
  parameter int unsigned OUT_PKT_W        = 512,
  parameter int unsigned IN_DEPTH         = 16,
  parameter int unsigned OUT_DEPTH        = 16,
  parameter int unsigned IN_NFC_THRESHOLD = 12
) (
  input  logic                       user_clk,
  input  logic                       buf_rst,
  // Aurora user interface
  input  logic                       rx_tvalid,
  input  logic [31:0]                rx_tdata,
  input  logic [3:0]                 rx_tkeep,
  input  logic                       rx_tlast,
  output logic                       tx_tvalid,
  input  logic                       tx_tready,
  output logic [31:0]                tx_tdata,
  output logic [3:0]                 tx_tkeep,
  output logic                       tx_tlast,
  output logic                       nfc_tvalid,
  input  logic                       nfc_tready,
  output logic [3:0]                 nfc_tdata,
  // DANNA array native FIFO ports
  output logic [IN_PKT_W-1:0]        in_pkt_dout,
  output logic                       in_pkt_empty,
  input  logic                       in_pkt_rd_en,
  input  logic [OUT_PKT_W-1:0]       out_pkt_din,
  input  logic                       out_pkt_wr_en,
  output logic                       out_pkt_full,
  // status
  output logic [$clog2(IN_DEPTH):0]  in_pkt_count,
  output logic [$clog2(OUT_DEPTH):0] out_pkt_count,
  output logic                       nfc_paused,
  output logic [15:0]                rx_overflow_count,
  output logic [15:0]                bad_frame_count
);
  logic rst;
  reset_sync #(.STAGES(2), .HOLD_CYCLES(4)) u_rst (.clk(user_clk), .rst_in(buf_rst), .rst_out(rst));

  // ---------------- receive ----------------
  logic                  up_s_tready, up_tvalid, up_tready, up_tlast;
  logic [IN_PKT_W-1:0]   up_tdata;
  logic [IN_PKT_W/8-1:0] up_tkeep;

  axis_upsizer #(.S_W(32), .M_W(IN_PKT_W)) u_up (
    .clk(user_clk), .rst,
    .s_tvalid(rx_tvalid), .s_tready(up_s_tready), .s_tdata(rx_tdata),
    .s_tkeep(rx_tkeep), .s_tlast(rx_tlast),
    .m_tvalid(up_tvalid), .m_tready(up_tready), .m_tdata(up_tdata),
    .m_tkeep(up_tkeep), .m_tlast(up_tlast));

  always_ff @(posedge user_clk) begin
    if (rst) rx_overflow_count <= '0;
    else if (rx_tvalid && !up_s_tready && rx_overflow_count != '1)
      rx_overflow_count <= rx_overflow_count + 1'b1;
  end

  // ---------------- wrapper ----------------
  logic                   dn_tvalid, dn_tready, dn_tlast;
  logic [OUT_PKT_W-1:0]   dn_tdata;
  logic [OUT_PKT_W/8-1:0] dn_tkeep;

  danna_axis_wrapper #(.IN_W(IN_PKT_W), .OUT_W(OUT_PKT_W),
                       .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_wrap (
    .clk(user_clk), .rst,
    .s_tvalid(up_tvalid), .s_tready(up_tready), .s_tdata(up_tdata), .s_tlast(up_tlast),
    .in_pkt_dout, .in_pkt_empty, .in_pkt_rd_en,
    .out_pkt_din, .out_pkt_wr_en, .out_pkt_full,
    .m_tvalid(dn_tvalid), .m_tready(dn_tready), .m_tdata(dn_tdata),
    .m_tkeep(dn_tkeep), .m_tlast(dn_tlast),
    .in_pkt_count, .out_pkt_count, .bad_frame_count);

  // ---------------- transmit ----------------
  axis_downsizer #(.S_W(OUT_PKT_W), .M_W(32)) u_down (
    .clk(user_clk), .rst,
    .s_tvalid(dn_tvalid), .s_tready(dn_tready), .s_tdata(dn_tdata),
    .s_tkeep(dn_tkeep), .s_tlast(dn_tlast),
    .m_tvalid(tx_tvalid), .m_tready(tx_tready), .m_tdata(tx_tdata),
    .m_tkeep(tx_tkeep), .m_tlast(tx_tlast));

  // ---------------- flow control ----------------
  // packets held: those buffered plus one being assembled or waiting
  localparam int unsigned LW = $clog2(IN_DEPTH) + 2;
  logic [LW-1:0] in_level;
  assign in_level = LW'(in_pkt_count) + LW'(up_tvalid);

  nfc_controller #(.LEVEL_W(LW), .THRESHOLD(IN_NFC_THRESHOLD)) u_nfc (
    .clk(user_clk), .rst, .fill_level(in_level),
    .nfc_tvalid, .nfc_tready, .nfc_tdata, .paused(nfc_paused),
    .xoff_count(), .xon_count());

  // the byte enables of a whole packet are all ones; not needed further
  logic unused_keep;
  assign unused_keep = ^up_tkeep;
endmodule
