// tlast_framer: first-word-fall-through FIFO read port -> AXI4-Stream master.
//
// The Aurora transmit user interface is AXI4-Stream with framing, so every
// input packet must become one Aurora frame. The input packet FIFO is in
// first-word-fall-through mode with a valid flag, which maps directly onto
// TVALID/TDATA; a read is issued on every TVALID/TREADY handshake. A word
// counter raises TLAST on the 9th word of each packet (the document's rule),
// which puts every frame boundary on a packet boundary. TKEEP is all ones:
// packets are whole multiples of the word size.
//
// Timing: purely combinational from FIFO to stream; the counter advances on
// each handshake and returns to 0 after the last word of a frame, or on rst
// (synchronous, active high). frame_count counts completed frames.
module tlast_framer #(
  parameter int unsigned DATA_W          = 32,
  parameter int unsigned WORDS_PER_FRAME = 9
) (
  input  logic                clk,
  input  logic                rst,
  // FIFO read port (first word fall through)
  input  logic [DATA_W-1:0]   fifo_dout,
  input  logic                fifo_valid,
  output logic                fifo_rd_en,
  // AXI4-Stream master
  output logic                m_tvalid,
  input  logic                m_tready,
  output logic [DATA_W-1:0]   m_tdata,
  output logic [DATA_W/8-1:0] m_tkeep,
  output logic                m_tlast,
  output logic [31:0]         frame_count
);
  localparam int unsigned CW = $clog2(WORDS_PER_FRAME);
  logic [CW-1:0] word_q;
  logic          beat;

  assign m_tvalid   = fifo_valid;
  assign m_tdata    = fifo_dout;
  assign m_tkeep    = '1;
  assign m_tlast    = (word_q == CW'(WORDS_PER_FRAME - 1));
  assign beat       = m_tvalid && m_tready;
  assign fifo_rd_en = beat;

  always_ff @(posedge clk) begin
    if (rst) begin
      word_q      <= '0;
      frame_count <= '0;
    end else if (beat) begin
      if (m_tlast) begin
        word_q      <= '0;
        frame_count <= frame_count + 1'b1;
      end else begin
        word_q <= word_q + 1'b1;
      end
    end
  end

  // AXI4-Stream rule: once TVALID is high it stays high, with TDATA stable,
  // until the handshake.
  a_stream_stable: assert property (@(posedge clk) disable iff (rst)
    (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata) && $stable(m_tlast)));
endmodule
