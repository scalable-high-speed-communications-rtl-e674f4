// comm_board: logic of the communication board FPGA.
//
// The board sits between the host PC and the DANNA FPGA. Host data arrives
// through the Xillybus PCIe core, which presents each host stream as a FIFO
// port on the PCIe bus clock (100 MHz); the DANNA FPGA is reached through an
// Aurora 8B/10B core whose user interface is AXI4-Stream on the Aurora user
// clock (156.25 MHz). Both cores are vendor IP and sit outside this module;
// their FIFO-side and user-side signals are its ports.
//
// Host -> DANNA: Xillybus 32-bit write stream -> input_packet_fifo (FWFT,
// crosses to the user clock) -> tlast_framer (TLAST on every 9th word, one
// 36-byte input packet per Aurora frame) -> Aurora transmit stream. The
// transmit stream stalls when Aurora drops tx_tready, e.g. after an XOFF
// from the partner.
// DANNA -> host: Aurora receive stream (no ready signal) -> output_packet_fifo
// (32 bit in, 64 bit out, crosses to the bus clock) -> Xillybus 64-bit read
// stream. Framing is dropped here; the host reads fixed 64-byte packets.
// nfc_controller watches the output FIFO and asks the partner to stop
// sending (XOFF) when it holds NFC_THRESHOLD words or more, and to resume
// (XON) below that. A receive word that still finds the FIFO full is lost
// and counted in rx_overflow_count.
// buffer_reset_logic empties all FIFOs while neither host file is open and
// passes the same reset on (buf_rst_user) for the DANNA FPGA's buffers.
//
// FIFO settings follow the document's table; NFC_THRESHOLD is this design's
// choice (the document only says "a certain threshold"): it leaves 64 words
// of room for the frame that completes after an XOFF and the words in flight.
module comm_board #(
  parameter int unsigned IN_FIFO_DEPTH   = 512,
  parameter int unsigned IN_PROG_FULL    = 511,
  parameter int unsigned IN_PROG_EMPTY   = 4,
  parameter int unsigned OUT_FIFO_DEPTH  = 1024,
  parameter int unsigned OUT_PROG_FULL   = 1008,
  parameter int unsigned OUT_PROG_EMPTY  = 15,
  parameter int unsigned WORDS_PER_FRAME = 9,
  parameter int unsigned NFC_THRESHOLD   = 960
) (
  // ---- PCIe bus clock domain: Xillybus FIFO ports ----
  input  logic        bus_clk,
  input  logic        sys_rst,
  input  logic        user_w_wren,
  input  logic [31:0] user_w_data,
  output logic        user_w_full,
  input  logic        user_w_open,
  input  logic        user_r_rden,
  output logic [63:0] user_r_data,
  output logic        user_r_empty,
  output logic        user_r_eof,
  input  logic        user_r_open,
  // ---- Aurora user clock domain ----
  input  logic        user_clk,
  output logic        tx_tvalid,
  input  logic        tx_tready,
  output logic [31:0] tx_tdata,
  output logic [3:0]  tx_tkeep,
  output logic        tx_tlast,
  input  logic        rx_tvalid,
  input  logic [31:0] rx_tdata,
  input  logic [3:0]  rx_tkeep,
  input  logic        rx_tlast,
  output logic        nfc_tvalid,
  input  logic        nfc_tready,
  output logic [3:0]  nfc_tdata,
  output logic        buf_rst_user,
  // ---- status ----
  output logic        in_fifo_prog_full,
  output logic        in_fifo_prog_empty,
  output logic        out_fifo_prog_full,
  output logic        out_fifo_prog_empty,
  output logic        nfc_paused,
  output logic [31:0] tx_frame_count,
  output logic [15:0] rx_overflow_count
);
  logic buf_rst_req, buf_rst_bus;

  buffer_reset_logic u_reset (
    .bus_clk, .user_clk, .sys_rst, .user_r_open, .user_w_open,
    .buf_rst_req, .buf_rst_bus, .buf_rst_user);

  // ---------------- host -> DANNA ----------------
  logic [31:0] in_dout;
  logic        in_valid, in_rd_en;

  input_packet_fifo #(
    .DATA_W(32), .DEPTH(IN_FIFO_DEPTH), .PROG_FULL(IN_PROG_FULL),
    .PROG_EMPTY(IN_PROG_EMPTY), .SYNC_STAGES(2)
  ) u_in_fifo (
    .rst(buf_rst_req),
    .wr_clk(bus_clk), .wr_en(user_w_wren), .din(user_w_data),
    .full(user_w_full), .prog_full(in_fifo_prog_full), .wr_count(),
    .rd_clk(user_clk), .rd_en(in_rd_en), .dout(in_dout), .valid(in_valid),
    .empty(), .prog_empty(in_fifo_prog_empty));

  tlast_framer #(.DATA_W(32), .WORDS_PER_FRAME(WORDS_PER_FRAME)) u_framer (
    .clk(user_clk), .rst(buf_rst_user),
    .fifo_dout(in_dout), .fifo_valid(in_valid), .fifo_rd_en(in_rd_en),
    .m_tvalid(tx_tvalid), .m_tready(tx_tready), .m_tdata(tx_tdata),
    .m_tkeep(tx_tkeep), .m_tlast(tx_tlast), .frame_count(tx_frame_count));

  // ---------------- DANNA -> host ----------------
  localparam int unsigned OCW = $clog2(OUT_FIFO_DEPTH) + 1;
  logic [OCW-1:0] out_wr_count;
  logic           out_full;

  output_packet_fifo #(
    .WR_W(32), .RD_W(64), .WR_DEPTH(OUT_FIFO_DEPTH), .PROG_FULL(OUT_PROG_FULL),
    .PROG_EMPTY(OUT_PROG_EMPTY), .SYNC_STAGES(2)
  ) u_out_fifo (
    .rst(buf_rst_req),
    .wr_clk(user_clk), .wr_en(rx_tvalid), .din(rx_tdata),
    .full(out_full), .prog_full(out_fifo_prog_full), .wr_count(out_wr_count),
    .rd_clk(bus_clk), .rd_en(user_r_rden), .dout(user_r_data),
    .empty(user_r_empty), .prog_empty(out_fifo_prog_empty), .rd_count());

  // Xillybus end-of-file flag: not used, held low as in the document
  assign user_r_eof = 1'b0;

  always_ff @(posedge user_clk) begin
    if (buf_rst_user) rx_overflow_count <= '0;
    else if (rx_tvalid && out_full && rx_overflow_count != '1)
      rx_overflow_count <= rx_overflow_count + 1'b1;
  end

  nfc_controller #(.LEVEL_W(OCW), .THRESHOLD(NFC_THRESHOLD)) u_nfc (
    .clk(user_clk), .rst(buf_rst_user), .fill_level(out_wr_count),
    .nfc_tvalid, .nfc_tready, .nfc_tdata, .paused(nfc_paused),
    .xoff_count(), .xon_count());

  // receive framing and byte enables carry no meaning for the host stream
  logic unused_rx;
  assign unused_rx = ^{rx_tkeep, rx_tlast, buf_rst_bus};
endmodule
