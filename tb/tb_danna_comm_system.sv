// tb_danna_comm_system: end-to-end test of the host-to-DANNA path at the
// top's default sizes. Around the top: a host model on the Xillybus FIFO
// ports, two Aurora lane models (one per direction, with stalls, latency
// and native flow control) and the DANNA stand-in on the array ports.
// The host sends numbered 36-byte input packets; the stand-in answers each
// with a 64-byte output packet; the host checks every output packet against
// the expected one, in order, with nothing lost or duplicated.
//
// Phases and the mechanisms each must trigger (each is counted, and a
// mechanism that never happens is a failure):
//   A streaming: packet framing (TLAST every 9 words), Aurora stalls;
//     checks that the path sustains far more than DANNA's 1 packet per
//     microsecond requirement (36 + 64 bytes per 1 MHz network cycle).
//   B array stalled: the DANNA input buffer fills, the DANNA FPGA sends
//     XOFF, the communication board pauses, its input FIFO fills and the
//     host sees user_w_full.
//   C host stops reading: the output FIFO fills past its threshold, the
//     board sends XOFF, the DANNA FPGA pauses, its output buffer fills and
//     the array sees out_pkt_full.
//   D buffer reset: the host leaves half a packet in the buffers and closes
//     both files; after reopening, packets are aligned again and the array
//     (not reset) keeps counting.
//   E round trip: one packet on the idle path; its latency through the
//     logic and the channel models is printed and must stay under 1 us.
// No receive word may be lost (overflow counters stay 0) in any phase.
module tb_danna_comm_system;
  timeunit 1ns; timeprecision 1ps;

  logic bus_clk = 0, user_clk = 0, sys_rst = 0;
  always #5   bus_clk  = ~bus_clk;     // 100 MHz PCIe bus clock
  always #3.2 user_clk = ~user_clk;    // 156.25 MHz Aurora user clock

  logic user_w_wren = 0, user_w_full, user_w_open = 0;
  logic [31:0] user_w_data = 0;
  logic user_r_rden = 0, user_r_empty, user_r_eof, user_r_open = 0;
  logic [63:0] user_r_data;

  logic cb_tx_tvalid, cb_tx_tready, cb_tx_tlast, cb_rx_tvalid, cb_rx_tlast;
  logic [31:0] cb_tx_tdata, cb_rx_tdata;
  logic [3:0] cb_tx_tkeep, cb_rx_tkeep, cb_nfc_tdata, dn_nfc_tdata;
  logic cb_nfc_tvalid, cb_nfc_tready, dn_nfc_tvalid, dn_nfc_tready;
  logic dn_rx_tvalid, dn_rx_tlast, dn_tx_tvalid, dn_tx_tready, dn_tx_tlast;
  logic [31:0] dn_rx_tdata, dn_tx_tdata;
  logic [3:0] dn_rx_tkeep, dn_tx_tkeep;
  logic [287:0] in_pkt_dout;
  logic in_pkt_empty, in_pkt_rd_en, out_pkt_wr_en, out_pkt_full;
  logic [511:0] out_pkt_din;
  logic cb_in_fifo_prog_full, cb_in_fifo_prog_empty, cb_out_fifo_prog_full, cb_out_fifo_prog_empty;
  logic cb_nfc_paused, dn_nfc_paused;
  logic [31:0] cb_tx_frame_count;
  logic [15:0] cb_rx_overflow_count, dn_rx_overflow_count, dn_bad_frame_count;
  logic [4:0] dn_in_pkt_count, dn_out_pkt_count;

  danna_comm_system dut (
    .bus_clk, .sys_rst, .user_w_wren, .user_w_data, .user_w_full, .user_w_open,
    .user_r_rden, .user_r_data, .user_r_empty, .user_r_eof, .user_r_open,
    .cb_user_clk(user_clk), .cb_tx_tvalid, .cb_tx_tready, .cb_tx_tdata, .cb_tx_tkeep,
    .cb_tx_tlast, .cb_rx_tvalid, .cb_rx_tdata, .cb_rx_tkeep, .cb_rx_tlast,
    .cb_nfc_tvalid, .cb_nfc_tready, .cb_nfc_tdata,
    .dn_user_clk(user_clk), .dn_rx_tvalid, .dn_rx_tdata, .dn_rx_tkeep, .dn_rx_tlast,
    .dn_tx_tvalid, .dn_tx_tready, .dn_tx_tdata, .dn_tx_tkeep, .dn_tx_tlast,
    .dn_nfc_tvalid, .dn_nfc_tready, .dn_nfc_tdata,
    .in_pkt_dout, .in_pkt_empty, .in_pkt_rd_en, .out_pkt_din, .out_pkt_wr_en, .out_pkt_full,
    .cb_in_fifo_prog_full, .cb_in_fifo_prog_empty, .cb_out_fifo_prog_full,
    .cb_out_fifo_prog_empty, .cb_nfc_paused, .cb_tx_frame_count, .cb_rx_overflow_count,
    .dn_in_pkt_count, .dn_out_pkt_count, .dn_nfc_paused, .dn_rx_overflow_count,
    .dn_bad_frame_count);

  // ---- Aurora channel: one lane model per direction ----
  int down_stalls, down_paused, down_xoffs, up_stalls, up_paused, up_xoffs;
  logic down_is_paused, up_is_paused;

  aurora_lane_model #(.LATENCY(8), .NFC_LATENCY(8), .STALL_ONE_IN(16)) u_down (
    .clk(user_clk), .channel_up(1'b1),
    .s_tvalid(cb_tx_tvalid), .s_tready(cb_tx_tready), .s_tdata(cb_tx_tdata),
    .s_tkeep(cb_tx_tkeep), .s_tlast(cb_tx_tlast),
    .m_tvalid(dn_rx_tvalid), .m_tdata(dn_rx_tdata), .m_tkeep(dn_rx_tkeep), .m_tlast(dn_rx_tlast),
    .nfc_tvalid(dn_nfc_tvalid), .nfc_tready(dn_nfc_tready), .nfc_tdata(dn_nfc_tdata),
    .paused(down_is_paused), .stall_cycles(down_stalls), .paused_cycles(down_paused),
    .xoff_received(down_xoffs));

  aurora_lane_model #(.LATENCY(8), .NFC_LATENCY(8), .STALL_ONE_IN(16)) u_up (
    .clk(user_clk), .channel_up(1'b1),
    .s_tvalid(dn_tx_tvalid), .s_tready(dn_tx_tready), .s_tdata(dn_tx_tdata),
    .s_tkeep(dn_tx_tkeep), .s_tlast(dn_tx_tlast),
    .m_tvalid(cb_rx_tvalid), .m_tdata(cb_rx_tdata), .m_tkeep(cb_rx_tkeep), .m_tlast(cb_rx_tlast),
    .nfc_tvalid(cb_nfc_tvalid), .nfc_tready(cb_nfc_tready), .nfc_tdata(cb_nfc_tdata),
    .paused(up_is_paused), .stall_cycles(up_stalls), .paused_cycles(up_paused),
    .xoff_received(up_xoffs));

  // ---- DANNA stand-in ----
  logic array_hold = 0, array_rst = 1;
  int handled;
  danna_array_model u_array (.clk(user_clk), .rst(array_rst), .hold(array_hold),
    .in_pkt_dout, .in_pkt_empty, .in_pkt_rd_en, .out_pkt_din, .out_pkt_wr_en, .out_pkt_full,
    .handled);

  // ---- checking ----
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_w_full = 0, n_out_full = 0, n_tlast = 0, n_buf_reset = 0, n_round_trip = 0;
  always @(posedge bus_clk) if (user_w_open && user_w_full) n_w_full++;
  always @(posedge user_clk) begin
    if (out_pkt_full) n_out_full++;
    if (cb_tx_tvalid && cb_tx_tready && cb_tx_tlast) n_tlast++;
  end

  // ---- host model ----
  int sent = 0, received = 0, expect_idx = 0, expect_n = 0;
  bit reader_on = 1;

  task automatic send_packets(input int count);
    logic [287:0] p;
    for (int i = 0; i < count; i++) begin
      p = u_array.make_in(sent);
      for (int w = 0; w < 9; w++) begin
        @(negedge bus_clk);
        user_w_wren = 0;
        while (user_w_full) @(negedge bus_clk);
        user_w_wren = 1; user_w_data = p[w*32 +: 32];   // written on the next posedge
      end
      sent++;
    end
    @(negedge bus_clk); user_w_wren = 0;
  endtask

  // host reader: 8 64-bit words per output packet
  logic [511:0] rx_pkt;
  int rx_word = 0;
  // host reader: 8 64-bit words per output packet. rden is raised only
  // while the FIFO is not empty, so every raised rden is a read and its data
  // is on user_r_data one clock later (standard read mode).
  initial begin
    forever begin
      @(negedge bus_clk);
      if (user_r_rden) begin
        rx_pkt[rx_word*64 +: 64] = user_r_data;
        if (rx_word == 7) begin
          rx_word = 0;
          check(rx_pkt == u_array.expected_out(u_array.make_in(expect_idx), expect_n),
                $sformatf("output packet %0d (input %0d)", received, expect_idx));
          received++; expect_idx++; expect_n++;
        end else rx_word++;
      end
      user_r_rden = reader_on && user_r_open && !user_r_empty;
    end
  end

  task automatic wait_all(input string phase);
    int guard = 0;
    while (received < sent && guard < 200000) begin @(posedge bus_clk); guard++; end
    check(received == sent, $sformatf("%s: %0d of %0d packets returned", phase, received, sent));
  endtask

  initial begin
    realtime t0, t1;
    int xoff_dn0, xoff_cb0, w_full0, out_full0;
    #1 sys_rst = 1;
    repeat (5) @(posedge bus_clk);
    @(negedge bus_clk); sys_rst = 0;
    repeat (5) @(posedge bus_clk);
    @(negedge bus_clk); user_w_open = 1; user_r_open = 1; array_rst = 0;
    repeat (20) @(posedge bus_clk);

    // ---- A: streaming and rate ----
    t0 = $realtime;
    send_packets(300);
    wait_all("A");
    t1 = $realtime;
    $display("phase A: 300 packets in %0.2f us (%0.1f packets/us)", (t1 - t0) / 1000.0,
             300.0 * 1000.0 / (t1 - t0));
    check(300.0 * 1000.0 / (t1 - t0) >= 1.0, "sustains 1 packet per us (100 MB/s)");
    check(cb_tx_frame_count == 300 && n_tlast == 300, "one Aurora frame per input packet");

    // ---- B: array stalled ----
    xoff_dn0 = down_xoffs; w_full0 = n_w_full;
    array_hold = 1;
    fork
      send_packets(80);
      begin
        wait (dn_in_pkt_count >= 12);
        repeat (3000) @(posedge user_clk);
        check(dn_in_pkt_count <= 16, "DANNA input buffer within bounds");
        array_hold = 0;
      end
    join
    wait_all("B");
    check(down_xoffs > xoff_dn0, "B: DANNA FPGA sent XOFF");
    check(n_w_full > w_full0, "B: host saw user_w_full");

    // ---- C: host stops reading ----
    xoff_cb0 = up_xoffs; out_full0 = n_out_full;
    reader_on = 0;
    fork
      send_packets(150);
      begin
        wait (cb_nfc_paused);
        repeat (4000) @(posedge user_clk);
        reader_on = 1;
      end
    join
    wait_all("C");
    check(up_xoffs > xoff_cb0, "C: board sent XOFF");
    check(n_out_full > out_full0, "C: array saw out_pkt_full");

    // ---- D: buffer reset through the host files ----
    begin
      logic [287:0] p;
      p = u_array.make_in(sent);
      for (int w = 0; w < 5; w++) begin           // half a packet
        @(negedge bus_clk); user_w_wren = 1; user_w_data = p[w*32 +: 32];
      end
      @(negedge bus_clk); user_w_wren = 0;
      repeat (100) @(posedge bus_clk);
      user_w_open = 0; user_r_open = 0;
      repeat (4) @(posedge bus_clk);
      check(user_w_full, "D: buffers held in reset while files closed");
      if (user_w_full) n_buf_reset++;
      repeat (50) @(posedge bus_clk);
      @(negedge bus_clk); user_w_open = 1; user_r_open = 1;
      repeat (30) @(posedge bus_clk);
      check(user_r_empty && dn_in_pkt_count == 0, "D: buffers empty after reset");
      // the half packet never reached the array; its sequence number is skipped
      sent++; expect_idx++;
      received++;
      send_packets(40);
      wait_all("D");
    end

    // ---- E: round trip of one packet on an idle path ----
    // Time from the host's first write to the last 64-bit read of the
    // answer. It includes both FIFO crossings, both Aurora lane models and
    // the DANNA stand-in, but not the host driver or the PCIe transfer.
    // The full host-to-host round trip measured on hardware was about 6 us,
    // so the logic's share must be a small part of that.
    repeat (200) @(posedge bus_clk);
    begin
      int r0;
      r0 = received;
      t0 = $realtime;
      send_packets(1);
      while (received == r0) @(posedge bus_clk);
      t1 = $realtime;
      $display("phase E: one-packet round trip %0.3f us (%0d bus clocks)", (t1 - t0) / 1000.0,
               int'((t1 - t0) / 10.0));
      check(t1 - t0 < 1000.0, "E: round trip through the logic under 1 us");
      n_round_trip++;
    end

    check(cb_rx_overflow_count == 0 && dn_rx_overflow_count == 0, "no receive word lost");
    check(dn_bad_frame_count == 0, "no framing errors");
    $display("mechanisms: aurora stalls %0d/%0d, DANNA XOFF %0d, board XOFF %0d, user_w_full %0d, out_pkt_full %0d, frames %0d, buffer resets %0d",
             down_stalls, up_stalls, down_xoffs, up_xoffs, n_w_full, n_out_full, n_tlast, n_buf_reset);
    check(down_stalls > 0 && up_stalls > 0, "Aurora stalls happened");
    check(down_xoffs > 0, "XOFF from DANNA FPGA happened");
    check(up_xoffs > 0, "XOFF from board happened");
    check(n_w_full > 0, "host write back-pressure happened");
    check(n_out_full > 0, "array output back-pressure happened");
    check(n_buf_reset > 0, "buffer reset happened");
    check(n_round_trip > 0, "single-packet round trip measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
