// aurora_lane_model: behavioural model (not synthesizable) of one direction
// of an Aurora 8B/10B channel as seen from the two user interfaces. It
// stands in for the vendor core pair in testbenches.
//
// Sender side: AXI4-Stream slave s_* with framing. s_tready is low while
// the channel is down, on randomly chosen stall cycles (standing in for
// clock-correction and idle insertion; one in STALL_ONE_IN cycles, 0 = none)
// and while the receiver's partner has requested XOFF - but, as in
// completion mode, only between frames: a frame in progress is finished.
// Receiver side: m_* carries the accepted beats LATENCY clocks later, with
// no ready signal (the Aurora receive interface cannot be stalled). The
// receiver's NFC requests (nfc_*, 4'hF = XOFF, 4'h0 = XON) are accepted at
// once and take effect on the sender NFC_LATENCY clocks later.
// One clock serves both ends. Counters report stalls and XOFF periods.
module aurora_lane_model #(
  parameter int unsigned LATENCY      = 8,
  parameter int unsigned NFC_LATENCY  = 8,
  parameter int unsigned STALL_ONE_IN = 0
) (
  input  logic        clk,
  input  logic        channel_up,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic [31:0] s_tdata,
  input  logic [3:0]  s_tkeep,
  input  logic        s_tlast,
  output logic        m_tvalid,
  output logic [31:0] m_tdata,
  output logic [3:0]  m_tkeep,
  output logic        m_tlast,
  input  logic        nfc_tvalid,
  output logic        nfc_tready,
  input  logic [3:0]  nfc_tdata,
  output logic        paused,
  output int          stall_cycles,
  output int          paused_cycles,
  output int          xoff_received
);
  logic        in_frame = 0, stall = 0;
  logic        pv [LATENCY];
  logic [36:0] pd [LATENCY];
  logic        nv [NFC_LATENCY];
  logic [3:0]  nd [NFC_LATENCY];

  initial begin
    paused = 0; stall_cycles = 0; paused_cycles = 0; xoff_received = 0;
    for (int i = 0; i < LATENCY; i++) begin pv[i] = 0; pd[i] = '0; end
    for (int i = 0; i < NFC_LATENCY; i++) begin nv[i] = 0; nd[i] = '0; end
  end

  assign nfc_tready = 1'b1;
  assign s_tready   = channel_up && !stall && !(paused && !in_frame);
  assign m_tvalid   = pv[LATENCY-1];
  assign {m_tlast, m_tkeep, m_tdata} = pd[LATENCY-1];

  always @(posedge clk) begin
    stall <= (STALL_ONE_IN != 0) && ($urandom_range(0, STALL_ONE_IN - 1) == 0);
    if (stall && s_tvalid) stall_cycles++;
    if (paused && s_tvalid && !in_frame) paused_cycles++;
    // data pipeline
    pv[0] <= s_tvalid && s_tready;
    pd[0] <= {s_tlast, s_tkeep, s_tdata};
    for (int i = 1; i < LATENCY; i++) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    if (s_tvalid && s_tready) in_frame <= !s_tlast;
    // flow-control pipeline
    nv[0] <= nfc_tvalid;
    nd[0] <= nfc_tdata;
    for (int i = 1; i < NFC_LATENCY; i++) begin nv[i] <= nv[i-1]; nd[i] <= nd[i-1]; end
    if (nv[NFC_LATENCY-1]) begin
      if (nd[NFC_LATENCY-1] == 4'hF) begin paused <= 1; xoff_received++; end
      else if (nd[NFC_LATENCY-1] == 4'h0) paused <= 0;
    end
  end
endmodule
