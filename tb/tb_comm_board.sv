// tb_comm_board: test of the communication board logic on its own.
// Host model on the Xillybus ports; Aurora lane models on the user side
// (the transmit lane ends in a checker, the receive lane is fed by a
// packet generator that plays the DANNA FPGA).
// Checks: every host word reaches the Aurora transmit stream in order with
// TLAST on every 9th word; every received 16-word packet reaches the host
// as 8 64-bit words, first word in the low half; when the host stops
// reading, the board sends XOFF, the sender pauses and nothing is lost, and
// XON follows when reading resumes; a sender that ignores XOFF overflows
// the output FIFO and the loss is counted; closing both host files resets
// the buffers and the loss counter.
module tb_comm_board;
  timeunit 1ns; timeprecision 1ps;
  logic bus_clk = 0, user_clk = 0, sys_rst = 0;
  always #5   bus_clk  = ~bus_clk;
  always #3.2 user_clk = ~user_clk;

  logic user_w_wren = 0, user_w_full, user_w_open = 0;
  logic [31:0] user_w_data = 0;
  logic user_r_rden = 0, user_r_empty, user_r_eof, user_r_open = 0;
  logic [63:0] user_r_data;
  logic tx_tvalid, tx_tready, tx_tlast, rx_tvalid, rx_tlast;
  logic [31:0] tx_tdata, rx_tdata;
  logic [3:0] tx_tkeep, rx_tkeep, nfc_tdata;
  logic nfc_tvalid, nfc_tready, buf_rst_user;
  logic in_fifo_prog_full, in_fifo_prog_empty, out_fifo_prog_full, out_fifo_prog_empty, nfc_paused;
  logic [31:0] tx_frame_count;
  logic [15:0] rx_overflow_count;

  comm_board dut (.bus_clk, .sys_rst, .user_w_wren, .user_w_data, .user_w_full, .user_w_open,
    .user_r_rden, .user_r_data, .user_r_empty, .user_r_eof, .user_r_open, .user_clk,
    .tx_tvalid, .tx_tready, .tx_tdata, .tx_tkeep, .tx_tlast,
    .rx_tvalid, .rx_tdata, .rx_tkeep, .rx_tlast, .nfc_tvalid, .nfc_tready, .nfc_tdata,
    .buf_rst_user, .in_fifo_prog_full, .in_fifo_prog_empty, .out_fifo_prog_full,
    .out_fifo_prog_empty, .nfc_paused, .tx_frame_count, .rx_overflow_count);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- transmit side: lane model into a checker ----
  logic t_valid, t_last; logic [31:0] t_data; logic [3:0] t_keep;
  int s0, p0, x0;
  logic unused_p;
  aurora_lane_model #(.LATENCY(6), .NFC_LATENCY(6), .STALL_ONE_IN(8)) u_tx_lane (
    .clk(user_clk), .channel_up(1'b1),
    .s_tvalid(tx_tvalid), .s_tready(tx_tready), .s_tdata(tx_tdata), .s_tkeep(tx_tkeep), .s_tlast(tx_tlast),
    .m_tvalid(t_valid), .m_tdata(t_data), .m_tkeep(t_keep), .m_tlast(t_last),
    .nfc_tvalid(1'b0), .nfc_tready(), .nfc_tdata(4'h0),
    .paused(unused_p), .stall_cycles(s0), .paused_cycles(p0), .xoff_received(x0));

  function automatic logic [31:0] host_word(int i);
    return 32'hA000_0000 ^ 32'(i * 2654435761);
  endfunction
  int tx_seen = 0, host_sent = 0;
  always @(posedge user_clk) if (t_valid) begin
    check(t_data == host_word(tx_seen), $sformatf("tx word %0d", tx_seen));
    check(t_last == (tx_seen % 9 == 8), "tx tlast every 9th word");
    tx_seen++;
  end

  // ---- receive side: generator -> lane model (obeys NFC) -> board ----
  logic g_valid = 0, g_ready, g_last = 0; logic [31:0] g_data = 0;
  logic l_valid, l_last; logic [31:0] l_data; logic [3:0] l_keep;
  logic lane_paused; int rs, rp, rx_xoffs;
  bit ignore_nfc = 0;
  aurora_lane_model #(.LATENCY(6), .NFC_LATENCY(6), .STALL_ONE_IN(0)) u_rx_lane (
    .clk(user_clk), .channel_up(1'b1),
    .s_tvalid(g_valid), .s_tready(g_ready), .s_tdata(g_data), .s_tkeep(4'hF), .s_tlast(g_last),
    .m_tvalid(l_valid), .m_tdata(l_data), .m_tkeep(l_keep), .m_tlast(l_last),
    .nfc_tvalid(nfc_tvalid), .nfc_tready(nfc_tready), .nfc_tdata(nfc_tdata),
    .paused(lane_paused), .stall_cycles(rs), .paused_cycles(rp), .xoff_received(rx_xoffs));
  // in the overflow phase the generator writes straight into the board
  logic d_valid = 0; logic [31:0] d_data = 0;
  assign rx_tvalid = ignore_nfc ? d_valid : l_valid;
  assign rx_tdata  = ignore_nfc ? d_data  : l_data;
  assign rx_tkeep  = l_keep;
  assign rx_tlast  = l_last;

  function automatic logic [31:0] dn_word(int i);
    return 32'h5000_0000 + 32'(i);
  endfunction
  int gen_sent = 0, host_rx = 0, nfc_xon = 0;
  always @(posedge user_clk) if (nfc_tvalid && nfc_tready && nfc_tdata == 4'h0) nfc_xon++;

  task automatic gen_packets(int n);
    for (int i = 0; i < n * 16; i++) begin
      @(negedge user_clk);
      g_valid = 1; g_data = dn_word(gen_sent); g_last = (gen_sent % 16 == 15);
      @(posedge user_clk); while (!g_ready) @(posedge user_clk);
      gen_sent++;
    end
    @(negedge user_clk); g_valid = 0;
  endtask

  // host reader
  bit reader_on = 1;
  initial forever begin
    @(negedge bus_clk);
    if (user_r_rden) begin
      check(user_r_data == {dn_word(2*host_rx + 1), dn_word(2*host_rx)},
            $sformatf("host read word %0d", host_rx));
      host_rx++;
    end
    user_r_rden = reader_on && user_r_open && !user_r_empty;
  end

  task automatic host_write(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge bus_clk); user_w_wren = 0;
      while (user_w_full) @(negedge bus_clk);
      user_w_wren = 1; user_w_data = host_word(host_sent); host_sent++;
    end
    @(negedge bus_clk); user_w_wren = 0;
  endtask

  initial begin
    #1 sys_rst = 1;
    repeat (4) @(posedge bus_clk);
    check(user_w_full && user_r_empty, "reset: write full, read empty");
    check(user_r_eof == 0, "eof held low");
    @(negedge bus_clk); sys_rst = 0; user_w_open = 1; user_r_open = 1;
    repeat (20) @(posedge bus_clk);
    check(!user_w_full && !buf_rst_user, "out of reset when files open");

    // both directions at once
    fork
      host_write(9 * 50);
      gen_packets(50);
    join
    repeat (300) @(posedge bus_clk);
    check(tx_seen == 9 * 50 && tx_frame_count == 50, $sformatf("tx words %0d", tx_seen));
    check(host_rx == 8 * 50, $sformatf("host words %0d", host_rx));

    // host stops reading: XOFF, no loss, XON after resuming
    reader_on = 0;
    fork
      gen_packets(70);               // 1120 words > 1024-word FIFO
      begin
        wait (nfc_paused);
        repeat (500) @(posedge user_clk);
        check(rx_xoffs >= 1 && lane_paused, "board requested XOFF, sender paused");
        check(rx_overflow_count == 0, "no loss with flow control");
        check(!out_fifo_prog_empty && !out_fifo_prog_full, "output FIFO held between the flags");
        reader_on = 1;
      end
    join
    repeat (2000) @(posedge bus_clk);
    check(nfc_xon >= 1 && !nfc_paused, "XON after draining");
    check(host_rx == 8 * 120, $sformatf("host words after pause %0d", host_rx));

    // sender that ignores flow control: overflow is counted
    reader_on = 0;
    for (int i = 0; i < 1100; i++) begin
      @(negedge user_clk); ignore_nfc = 1; d_valid = 1; d_data = 32'(i);
    end
    @(negedge user_clk); d_valid = 0;
    repeat (5) @(posedge user_clk);
    check(rx_overflow_count == 16'(1100 - 1024), $sformatf("overflow count %0d", rx_overflow_count));

    // close both files: buffers and counters reset
    @(negedge bus_clk); user_w_open = 0; user_r_open = 0;
    repeat (30) @(posedge bus_clk);
    check(buf_rst_user && user_w_full, "buffers in reset while closed");
    @(negedge bus_clk); user_w_open = 1; user_r_open = 1;
    repeat (30) @(posedge bus_clk);
    check(user_r_empty && rx_overflow_count == 0, "buffers empty after reopen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
