// tb_axis_upsizer: sends 36-byte packets as 9 32-bit beats with TLAST on
// the 9th (random TVALID gaps, random TREADY at the wide side) and checks
// each 288-bit output: bytes in arrival order, all 36 byte enables set,
// TLAST set. Then sends a short 4-beat packet and checks that it is issued
// early with only 16 byte enables. Also checks full rate: with TREADY high
// and no gaps, 20 packets take 180 input clocks plus one of latency.
module tb_axis_upsizer;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [31:0] s_tdata = 0;
  logic [3:0] s_tkeep = 4'hF;
  logic m_tvalid, m_tready = 0, m_tlast;
  logic [287:0] m_tdata;
  logic [35:0] m_tkeep;
  int checks = 0, failures = 0;
  int n_out = 0;
  bit rand_ready = 1;

  always #5 clk = ~clk;

  axis_upsizer dut (.clk, .rst, .s_tvalid, .s_tready, .s_tdata, .s_tkeep, .s_tlast,
                    .m_tvalid, .m_tready, .m_tdata, .m_tkeep, .m_tlast);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] word(int p, int w);
    return {8'(p), 8'(w), 8'(p ^ 8'h5A), 8'(w * 3 + 1)};
  endfunction

  logic [287:0] exp_pkt;
  logic [35:0]  exp_keep;
  int exp_n = 0;

  always @(posedge clk) begin
    if (rand_ready) m_tready <= $urandom_range(0, 2) != 0;
    if (!rst && m_tvalid && m_tready) begin
      if (exp_n < 1000) begin
        for (int w = 0; w < 9; w++) exp_pkt[w*32 +: 32] = word(n_out, w);
        check(m_tdata == exp_pkt, $sformatf("packet %0d data", n_out));
        check(m_tkeep == '1 && m_tlast, "packet keep/last");
      end else begin
        check(m_tdata[127:0] == {word(99, 3), word(99, 2), word(99, 1), word(99, 0)}, "short data");
        check(m_tkeep == 36'h0_0000_FFFF && m_tlast, "short packet keep");
      end
      n_out <= n_out + 1;
    end
  end

  task automatic send(int p, int nbeats, bit gaps);
    for (int w = 0; w < nbeats; w++) begin
      @(negedge clk);
      while (gaps && $urandom_range(0, 3) == 0) begin s_tvalid = 0; @(negedge clk); end
      s_tvalid = 1; s_tdata = word(p, w); s_tlast = (w == nbeats - 1);
      @(posedge clk); while (!s_tready) @(posedge clk);
    end
    @(negedge clk); s_tvalid = 0; s_tlast = 0;
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int p = 0; p < 40; p++) send(p, 9, 1);
    wait (n_out == 40);
    // full rate
    rand_ready = 0; m_tready = 1;
    @(negedge clk); t0 = $time;
    for (int p = 40; p < 60; p++)
      for (int w = 0; w < 9; w++) begin
        s_tvalid = 1; s_tdata = word(p, w); s_tlast = (w == 8);
        @(posedge clk); while (!s_tready) @(posedge clk);
        #1;
      end
    s_tvalid = 0; s_tlast = 0;
    wait (n_out == 60); t1 = $time;
    check((t1 - t0) / 10 <= 9 * 20 + 2, $sformatf("full rate: %0d clocks", (t1 - t0) / 10));
    // short packet
    exp_n = 1000;
    send(99, 4, 0);
    repeat (5) @(posedge clk);
    check(n_out == 61, "short packet issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
