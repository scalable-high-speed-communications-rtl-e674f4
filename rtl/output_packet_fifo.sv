// output_packet_fifo: independent-clock, width-converting FIFO for
// DANNA-to-host output packets.
//
// Written from the Aurora receive user interface (Aurora user clock, 32-bit
// words) and read by the Xillybus read stream (PCIe bus clock, 64-bit
// words). The settings follow the document's FIFO table: 32-bit write port
// 1024 words deep, 64-bit read port (512 words), two synchroniser stages,
// standard (non fall-through) read mode with no valid flag, full flag held
// high during reset, data output reset to zero, programmable full at 1008
// and programmable empty at 15.
//
// How it works: the memory holds WR_DEPTH words of WR_W bits. The write
// pointer counts write words, the read pointer counts read words; each
// crosses to the other clock in Gray code through SYNC_STAGES flip-flops.
// A read takes RATIO consecutive write words; the word written first lands
// in the least significant bits of dout (this design's choice: with the
// little-endian host the bytes of a packet then arrive in order).
//
// Read timing (standard mode): dout changes on the rd_clk edge that samples
// rd_en with the FIFO not empty, i.e. data is valid the cycle after the
// request, as the Xillybus read-stream interface expects.
//
// Threshold units (this design's reading of the table): PROG_FULL counts
// 32-bit write words, so prog_full rises when fewer than 16 words (one
// 64-byte packet) of space remain. PROG_EMPTY also counts 32-bit words, so
// prog_empty is high while fewer than one whole packet (16 words) can be
// read. Flag latency across the clock boundary is SYNC_STAGES+1 clocks.
module output_packet_fifo
  import comm_pkg::bin2gray, comm_pkg::gray2bin;
#(
  parameter int unsigned WR_W        = 32,
  parameter int unsigned RD_W        = 64,
  parameter int unsigned WR_DEPTH    = 1024,
  parameter int unsigned PROG_FULL   = 1008,
  parameter int unsigned PROG_EMPTY  = 15,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              rst,
  // write side
  input  logic              wr_clk,
  input  logic              wr_en,
  input  logic [WR_W-1:0]   din,
  output logic              full,
  output logic              prog_full,
  output logic [$clog2(WR_DEPTH):0] wr_count,
  // read side (standard mode)
  input  logic              rd_clk,
  input  logic              rd_en,
  output logic [RD_W-1:0]   dout,
  output logic              empty,
  output logic              prog_empty,
  output logic [$clog2(WR_DEPTH*WR_W/RD_W):0] rd_count
);
  localparam int unsigned RATIO = RD_W / WR_W;
  localparam int unsigned RW    = $clog2(RATIO);          // word-in-read bits
  localparam int unsigned AW    = $clog2(WR_DEPTH);       // write address bits
  localparam int unsigned RAW   = AW - RW;                // read address bits

  logic [WR_W-1:0] mem [WR_DEPTH];

  logic wr_rst, rd_rst;
  logic [RAW:0] rd_ptr, rd_gray_q;  // read-domain pointer, binary and Gray
  reset_sync #(.STAGES(SYNC_STAGES), .HOLD_CYCLES(2)) u_wr_rst (.clk(wr_clk), .rst_in(rst), .rst_out(wr_rst));
  reset_sync #(.STAGES(SYNC_STAGES), .HOLD_CYCLES(2)) u_rd_rst (.clk(rd_clk), .rst_in(rst), .rst_out(rd_rst));

  // ---------------- write domain ----------------
  logic [AW:0]  wr_ptr, wr_gray;
  logic [RAW:0] rd_gray_sync, rd_ptr_w;
  logic [RAW:0] rd_gray_pipe [SYNC_STAGES];
  logic         wr_do;

  assign rd_ptr_w = (RAW+1)'(gray2bin(32'(rd_gray_sync)));
  // read pointer expressed in write words
  assign wr_count = wr_ptr - {rd_ptr_w, {RW{1'b0}}};
  assign wr_do    = wr_en && !full;

  always_ff @(posedge wr_clk) begin
    if (wr_do) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_ptr  <= '0;
      wr_gray <= '0;
      for (int i = 0; i < SYNC_STAGES; i++) rd_gray_pipe[i] <= '0;
    end else begin
      if (wr_do) begin
        wr_ptr  <= wr_ptr + 1'b1;
        wr_gray <= (AW+1)'(bin2gray(32'(wr_ptr + 1'b1)));
      end
      rd_gray_pipe[0] <= rd_gray_q;
      for (int i = 1; i < SYNC_STAGES; i++) rd_gray_pipe[i] <= rd_gray_pipe[i-1];
    end
  end
  assign rd_gray_sync = rd_gray_pipe[SYNC_STAGES-1];

  assign full      = wr_rst || (wr_count == (AW+1)'(WR_DEPTH));
  assign prog_full = wr_rst || (wr_count >= (AW+1)'(PROG_FULL));

  // ---------------- read domain ----------------
  logic [AW:0]  wr_gray_sync, wr_ptr_r;
  logic [AW:0]  wr_gray_pipe [SYNC_STAGES];
  logic         rd_do;
  logic [RD_W-1:0] rd_word;

  assign wr_ptr_r = (AW+1)'(gray2bin(32'(wr_gray_sync)));
  // only whole read words are readable
  assign rd_count = wr_ptr_r[AW:RW] - rd_ptr;
  assign empty    = (rd_count == '0);
  assign rd_do    = rd_en && !empty;
  assign prog_empty = (32'(rd_count) * RATIO) <= 32'(PROG_EMPTY);

  always_comb begin
    for (int j = 0; j < RATIO; j++)
      rd_word[j*WR_W +: WR_W] = mem[{rd_ptr[RAW-1:0], RW'(j)}];
  end

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_ptr    <= '0;
      rd_gray_q <= '0;
      dout      <= '0;
      for (int i = 0; i < SYNC_STAGES; i++) wr_gray_pipe[i] <= '0;
    end else begin
      wr_gray_pipe[0] <= wr_gray;
      for (int i = 1; i < SYNC_STAGES; i++) wr_gray_pipe[i] <= wr_gray_pipe[i-1];
      if (rd_do) begin
        dout      <= rd_word;
        rd_ptr    <= rd_ptr + 1'b1;
        rd_gray_q <= (RAW+1)'(bin2gray(32'(rd_ptr + 1'b1)));
      end
    end
  end
  assign wr_gray_sync = wr_gray_pipe[SYNC_STAGES-1];

endmodule
