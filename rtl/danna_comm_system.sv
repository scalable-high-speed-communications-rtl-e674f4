// danna_comm_system: host-to-DANNA communication path, both boards.
//
// A host PC talks to a DANNA neuromorphic array through a separate
// communication board. The host side is PCIe (Xillybus core, exposed here
// as its FIFO ports); the board-to-board side is one Aurora 8B/10B lane per
// direction (exposed here as the user interfaces of the two Aurora cores);
// the array side is a native FIFO port per direction (exposed here because
// the array is outside this design). This top holds the logic the document
// adds around those cores:
//   comm_board       on the communication board FPGA (bus_clk, cb_user_clk)
//   danna_fpga_link  on the DANNA FPGA (dn_user_clk)
// The communication-buffer reset made on the communication board from the
// host's open files also resets the DANNA FPGA's buffers; it is wired
// straight across here (how it crosses between the boards is not
// described, so this is this design's choice).
//
// To close the loop, connect cb_tx_* to dn_rx_* and dn_tx_* to cb_rx_*
// through Aurora cores (or a model of the channel), and route each side's
// NFC request to the other side's transmitter.
module danna_comm_system #(
  parameter int unsigned IN_FIFO_DEPTH    = 512,
  parameter int unsigned OUT_FIFO_DEPTH   = 1024,
  parameter int unsigned CB_NFC_THRESHOLD = 960,
  parameter int unsigned DN_IN_DEPTH      = 16,
  parameter int unsigned DN_OUT_DEPTH     = 16,
  parameter int unsigned DN_NFC_THRESHOLD = 12
) (
  // ---- host side (Xillybus FIFO ports, PCIe bus clock) ----
  input  logic         bus_clk,
  input  logic         sys_rst,
  input  logic         user_w_wren,
  input  logic [31:0]  user_w_data,
  output logic         user_w_full,
  input  logic         user_w_open,
  input  logic         user_r_rden,
  output logic [63:0]  user_r_data,
  output logic         user_r_empty,
  output logic         user_r_eof,
  input  logic         user_r_open,
  // ---- communication board Aurora user interface ----
  input  logic         cb_user_clk,
  output logic         cb_tx_tvalid,
  input  logic         cb_tx_tready,
  output logic [31:0]  cb_tx_tdata,
  output logic [3:0]   cb_tx_tkeep,
  output logic         cb_tx_tlast,
  input  logic         cb_rx_tvalid,
  input  logic [31:0]  cb_rx_tdata,
  input  logic [3:0]   cb_rx_tkeep,
  input  logic         cb_rx_tlast,
  output logic         cb_nfc_tvalid,
  input  logic         cb_nfc_tready,
  output logic [3:0]   cb_nfc_tdata,
  // ---- DANNA FPGA Aurora user interface ----
  input  logic         dn_user_clk,
  input  logic         dn_rx_tvalid,
  input  logic [31:0]  dn_rx_tdata,
  input  logic [3:0]   dn_rx_tkeep,
  input  logic         dn_rx_tlast,
  output logic         dn_tx_tvalid,
  input  logic         dn_tx_tready,
  output logic [31:0]  dn_tx_tdata,
  output logic [3:0]   dn_tx_tkeep,
  output logic         dn_tx_tlast,
  output logic         dn_nfc_tvalid,
  input  logic         dn_nfc_tready,
  output logic [3:0]   dn_nfc_tdata,
  // ---- DANNA array native FIFO ports ----
  output logic [287:0] in_pkt_dout,
  output logic         in_pkt_empty,
  input  logic         in_pkt_rd_en,
  input  logic [511:0] out_pkt_din,
  input  logic         out_pkt_wr_en,
  output logic         out_pkt_full,
  // ---- status ----
  output logic         cb_in_fifo_prog_full,
  output logic         cb_in_fifo_prog_empty,
  output logic         cb_out_fifo_prog_full,
  output logic         cb_out_fifo_prog_empty,
  output logic         cb_nfc_paused,
  output logic [31:0]  cb_tx_frame_count,
  output logic [15:0]  cb_rx_overflow_count,
  output logic [$clog2(DN_IN_DEPTH):0]  dn_in_pkt_count,
  output logic [$clog2(DN_OUT_DEPTH):0] dn_out_pkt_count,
  output logic         dn_nfc_paused,
  output logic [15:0]  dn_rx_overflow_count,
  output logic [15:0]  dn_bad_frame_count
);
  logic buf_rst_user;

  comm_board #(
    .IN_FIFO_DEPTH(IN_FIFO_DEPTH), .IN_PROG_FULL(IN_FIFO_DEPTH - 1), .IN_PROG_EMPTY(4),
    .OUT_FIFO_DEPTH(OUT_FIFO_DEPTH), .OUT_PROG_FULL(OUT_FIFO_DEPTH - 16), .OUT_PROG_EMPTY(15),
    .WORDS_PER_FRAME(9), .NFC_THRESHOLD(CB_NFC_THRESHOLD)
  ) u_comm_board (
    .bus_clk, .sys_rst,
    .user_w_wren, .user_w_data, .user_w_full, .user_w_open,
    .user_r_rden, .user_r_data, .user_r_empty, .user_r_eof, .user_r_open,
    .user_clk(cb_user_clk),
    .tx_tvalid(cb_tx_tvalid), .tx_tready(cb_tx_tready), .tx_tdata(cb_tx_tdata),
    .tx_tkeep(cb_tx_tkeep), .tx_tlast(cb_tx_tlast),
    .rx_tvalid(cb_rx_tvalid), .rx_tdata(cb_rx_tdata), .rx_tkeep(cb_rx_tkeep),
    .rx_tlast(cb_rx_tlast),
    .nfc_tvalid(cb_nfc_tvalid), .nfc_tready(cb_nfc_tready), .nfc_tdata(cb_nfc_tdata),
    .buf_rst_user,
    .in_fifo_prog_full(cb_in_fifo_prog_full), .in_fifo_prog_empty(cb_in_fifo_prog_empty),
    .out_fifo_prog_full(cb_out_fifo_prog_full), .out_fifo_prog_empty(cb_out_fifo_prog_empty),
    .nfc_paused(cb_nfc_paused), .tx_frame_count(cb_tx_frame_count),
    .rx_overflow_count(cb_rx_overflow_count));

  danna_fpga_link #(
    .IN_PKT_W(288), .OUT_PKT_W(512), .IN_DEPTH(DN_IN_DEPTH), .OUT_DEPTH(DN_OUT_DEPTH),
    .IN_NFC_THRESHOLD(DN_NFC_THRESHOLD)
  ) u_danna_link (
    .user_clk(dn_user_clk), .buf_rst(buf_rst_user),
    .rx_tvalid(dn_rx_tvalid), .rx_tdata(dn_rx_tdata), .rx_tkeep(dn_rx_tkeep),
    .rx_tlast(dn_rx_tlast),
    .tx_tvalid(dn_tx_tvalid), .tx_tready(dn_tx_tready), .tx_tdata(dn_tx_tdata),
    .tx_tkeep(dn_tx_tkeep), .tx_tlast(dn_tx_tlast),
    .nfc_tvalid(dn_nfc_tvalid), .nfc_tready(dn_nfc_tready), .nfc_tdata(dn_nfc_tdata),
    .in_pkt_dout, .in_pkt_empty, .in_pkt_rd_en,
    .out_pkt_din, .out_pkt_wr_en, .out_pkt_full,
    .in_pkt_count(dn_in_pkt_count), .out_pkt_count(dn_out_pkt_count),
    .nfc_paused(dn_nfc_paused), .rx_overflow_count(dn_rx_overflow_count),
    .bad_frame_count(dn_bad_frame_count));
endmodule
