// tb_tlast_framer: drives the framer from a model of a first-word-fall-
// through FIFO (random gaps) into a sink with random TREADY. Checks that
// every word passes once and in order, that TLAST is set on exactly every
// 9th word, that TKEEP is all ones, that a word is popped only on a
// handshake, and the completed-frame count; also that reset restarts the
// word count.
module tb_tlast_framer;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  logic [31:0] fifo_dout;
  logic fifo_valid, fifo_rd_en;
  logic m_tvalid, m_tready, m_tlast;
  logic [31:0] m_tdata, frame_count;
  logic [3:0] m_tkeep;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tlast_framer dut (.clk, .rst, .fifo_dout, .fifo_valid, .fifo_rd_en,
                    .m_tvalid, .m_tready, .m_tdata, .m_tkeep, .m_tlast, .frame_count);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // FWFT source: next word appears some cycles after a pop
  int src_idx = 0, gap = 0, sink_idx = 0;
  bit src_on = 0;
  assign fifo_dout  = 32'h1000_0000 + 32'(src_idx);
  assign fifo_valid = src_on && (gap == 0);
  always @(posedge clk) begin
    if (fifo_rd_en) begin
      check(fifo_valid, "pop only when valid");
      src_idx <= src_idx + 1;
      gap <= $urandom_range(0, 3) == 0 ? $urandom_range(1, 3) : 0;
    end else if (gap > 0) gap <= gap - 1;
    m_tready <= $urandom_range(0, 3) != 0;
  end

  always @(posedge clk) if (!rst && m_tvalid && m_tready) begin
    check(m_tdata == 32'h1000_0000 + 32'(sink_idx), "word order");
    check(m_tlast == ((sink_idx % 9) == 8), $sformatf("tlast at word %0d", sink_idx));
    check(m_tkeep == 4'hF, "tkeep all ones");
    sink_idx <= sink_idx + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; src_on = 1;
    wait (sink_idx >= 9 * 50);
    @(negedge clk); src_on = 0;
    repeat (3) @(posedge clk);
    check(frame_count == 32'(sink_idx / 9), $sformatf("frame count %0d", frame_count));
    // reset in the middle of a frame restarts the count
    src_on = 1;
    wait (sink_idx % 9 == 4);
    @(negedge clk); src_on = 0; rst = 1;
    @(negedge clk); rst = 0;
    sink_idx = 0; src_idx = 0;
    @(negedge clk); src_on = 1;
    wait (sink_idx >= 27);
    @(negedge clk); src_on = 0;
    check(frame_count >= 3, "frames after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
