// tb_danna_fpga_link: test of the DANNA FPGA communication logic on its own.
// A generator plays the communication board: it sends 9-word input packets
// (TLAST on the 9th) through an Aurora lane model that obeys this side's
// NFC requests. The DANNA stand-in answers each input packet with an output
// packet; those leave through a second lane model into a checker.
// Checks: each input packet reaches the array whole and in order (the
// stand-in's answers prove it), each output packet leaves as 16 words,
// least significant word first, TLAST on the 16th; while the array is held
// the input buffer fills, XOFF is sent, the sender pauses at a frame
// boundary and no word is lost, then XON follows; the buffer reset empties
// the buffers without touching the array.
module tb_danna_fpga_link;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, buf_rst = 0;
  always #3.2 clk = ~clk;

  logic rx_tvalid, rx_tlast, tx_tvalid, tx_tready, tx_tlast, nfc_tvalid, nfc_tready;
  logic [31:0] rx_tdata, tx_tdata;
  logic [3:0] rx_tkeep, tx_tkeep, nfc_tdata;
  logic [287:0] in_pkt_dout; logic in_pkt_empty, in_pkt_rd_en;
  logic [511:0] out_pkt_din; logic out_pkt_wr_en, out_pkt_full;
  logic [4:0] in_pkt_count, out_pkt_count;
  logic nfc_paused; logic [15:0] rx_overflow_count, bad_frame_count;

  danna_fpga_link dut (.user_clk(clk), .buf_rst, .rx_tvalid, .rx_tdata, .rx_tkeep, .rx_tlast,
    .tx_tvalid, .tx_tready, .tx_tdata, .tx_tkeep, .tx_tlast, .nfc_tvalid, .nfc_tready, .nfc_tdata,
    .in_pkt_dout, .in_pkt_empty, .in_pkt_rd_en, .out_pkt_din, .out_pkt_wr_en, .out_pkt_full,
    .in_pkt_count, .out_pkt_count, .nfc_paused, .rx_overflow_count, .bad_frame_count);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // array stand-in
  logic hold = 0, arr_rst = 1; int handled;
  danna_array_model u_array (.clk, .rst(arr_rst), .hold, .in_pkt_dout, .in_pkt_empty,
    .in_pkt_rd_en, .out_pkt_din, .out_pkt_wr_en, .out_pkt_full, .handled);

  // input lane
  logic g_valid = 0, g_ready, g_last = 0; logic [31:0] g_data = 0;
  logic lp; int ls, lpc, xoffs;
  aurora_lane_model #(.LATENCY(8), .NFC_LATENCY(8), .STALL_ONE_IN(10)) u_in_lane (
    .clk, .channel_up(1'b1), .s_tvalid(g_valid), .s_tready(g_ready), .s_tdata(g_data),
    .s_tkeep(4'hF), .s_tlast(g_last), .m_tvalid(rx_tvalid), .m_tdata(rx_tdata),
    .m_tkeep(rx_tkeep), .m_tlast(rx_tlast), .nfc_tvalid, .nfc_tready, .nfc_tdata,
    .paused(lp), .stall_cycles(ls), .paused_cycles(lpc), .xoff_received(xoffs));

  // output lane into the checker
  logic o_valid, o_last; logic [31:0] o_data; logic [3:0] o_keep;
  logic op; int os, opc, ox;
  aurora_lane_model #(.LATENCY(4), .NFC_LATENCY(4), .STALL_ONE_IN(6)) u_out_lane (
    .clk, .channel_up(1'b1), .s_tvalid(tx_tvalid), .s_tready(tx_tready), .s_tdata(tx_tdata),
    .s_tkeep(tx_tkeep), .s_tlast(tx_tlast), .m_tvalid(o_valid), .m_tdata(o_data),
    .m_tkeep(o_keep), .m_tlast(o_last), .nfc_tvalid(1'b0), .nfc_tready(), .nfc_tdata(4'h0),
    .paused(op), .stall_cycles(os), .paused_cycles(opc), .xoff_received(ox));

  int out_words = 0, out_pkts = 0, sent = 0, n_xon = 0;
  logic [511:0] exp;
  always @(posedge clk) begin
    if (nfc_tvalid && nfc_tready && nfc_tdata == 4'h0) n_xon++;
    if (o_valid) begin
      exp = u_array.expected_out(u_array.make_in(out_pkts), out_pkts);
      check(o_data == exp[(out_words % 16)*32 +: 32], $sformatf("out packet %0d word %0d", out_pkts, out_words % 16));
      check(o_last == (out_words % 16 == 15) && o_keep == 4'hF, "out tlast/tkeep");
      if (out_words % 16 == 15) out_pkts++;
      out_words++;
    end
  end

  task automatic send(int n);
    logic [287:0] p;
    for (int i = 0; i < n; i++) begin
      p = u_array.make_in(sent);
      for (int w = 0; w < 9; w++) begin
        @(negedge clk); g_valid = 1; g_data = p[w*32 +: 32]; g_last = (w == 8);
        @(posedge clk); while (!g_ready) @(posedge clk);
      end
      sent++;
    end
    @(negedge clk); g_valid = 0;
  endtask

  initial begin
    #1 buf_rst = 1;
    repeat (5) @(posedge clk);
    @(negedge clk); buf_rst = 0; arr_rst = 0;
    repeat (20) @(posedge clk);
    send(40);
    repeat (1500) @(posedge clk);
    check(out_pkts == 40, $sformatf("40 packets returned (%0d)", out_pkts));
    // hold the array: XOFF, pause, no loss, then XON
    hold = 1;
    fork
      send(40);
      begin
        wait (nfc_paused);
        repeat (600) @(posedge clk);
        check(lp && xoffs >= 1, "XOFF received by the sender");
        check(in_pkt_count <= 16 && in_pkt_count >= 12, $sformatf("input buffer %0d", in_pkt_count));
        hold = 0;
      end
    join
    repeat (2000) @(posedge clk);
    check(n_xon >= 1 && !nfc_paused, "XON after draining");
    check(out_pkts == 80, $sformatf("80 packets returned (%0d)", out_pkts));
    check(rx_overflow_count == 0 && bad_frame_count == 0, "nothing lost");
    // buffer reset: packets waiting in the input buffer are discarded,
    // the array keeps its count
    hold = 1;
    send(5);
    repeat (100) @(posedge clk);
    check(in_pkt_count == 5, "5 packets waiting");
    @(negedge clk); buf_rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); buf_rst = 0;
    repeat (20) @(posedge clk);
    check(in_pkt_count == 0 && in_pkt_empty && handled == 80, "buffer reset empties the buffer only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
