// tb_axis_downsizer: sends 512-bit (64-byte) packets and checks the 32-bit
// beats: 16 per packet, least significant slice first, TLAST on the 16th
// only, TKEEP all ones; random TREADY and TVALID gaps. With TREADY held high
// 20 back-to-back packets must take 320 output clocks (one beat per clock)
// plus at most two of latency.
module tb_axis_downsizer;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  logic s_tvalid = 0, s_tready, s_tlast = 1;
  logic [511:0] s_tdata = 0;
  logic [63:0] s_tkeep = '1;
  logic m_tvalid, m_tready = 0, m_tlast;
  logic [31:0] m_tdata;
  logic [3:0] m_tkeep;
  int checks = 0, failures = 0;
  int n_beats = 0;
  bit rand_ready = 1;

  always #5 clk = ~clk;

  axis_downsizer dut (.clk, .rst, .s_tvalid, .s_tready, .s_tdata, .s_tkeep, .s_tlast,
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
    return {8'(w), 8'(p), 8'(p * 7 + w), 8'hC3 ^ 8'(w)};
  endfunction

  always @(posedge clk) begin
    if (rand_ready) m_tready <= $urandom_range(0, 2) != 0;
    if (!rst && m_tvalid && m_tready) begin
      check(m_tdata == word(n_beats / 16, n_beats % 16), $sformatf("beat %0d", n_beats));
      check(m_tlast == (n_beats % 16 == 15), "tlast on 16th beat");
      check(m_tkeep == 4'hF, "tkeep");
      n_beats <= n_beats + 1;
    end
  end

  task automatic send(int p, bit gaps);
    @(negedge clk);
    while (gaps && $urandom_range(0, 2) == 0) begin s_tvalid = 0; @(negedge clk); end
    s_tvalid = 1;
    for (int w = 0; w < 16; w++) s_tdata[w*32 +: 32] = word(p, w);
    @(posedge clk); while (!s_tready) @(posedge clk);
    @(negedge clk); s_tvalid = 0;
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int p = 0; p < 30; p++) send(p, 1);
    wait (n_beats == 30 * 16);
    rand_ready = 0; m_tready = 1;
    @(negedge clk); t0 = $time;
    fork
      for (int p = 30; p < 50; p++) begin
        s_tvalid = 1;
        for (int w = 0; w < 16; w++) s_tdata[w*32 +: 32] = word(p, w);
        @(posedge clk); while (!s_tready) @(posedge clk);
        #1;
      end
    join
    s_tvalid = 0;
    wait (n_beats == 50 * 16); t1 = $time;
    check((t1 - t0) / 10 <= 320 + 2, $sformatf("full rate: %0d clocks", (t1 - t0) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
