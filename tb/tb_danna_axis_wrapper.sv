// tb_danna_axis_wrapper: checks both packet buffers of the DANNA wrapper.
// Input side: 288-bit packets offered on the AXI4-Stream slave are read
// back in order from the native FWFT port; the buffer takes exactly
// IN_DEPTH (16) packets before TREADY drops; in_pkt_count tracks occupancy;
// a beat with TLAST low is counted as a framing error. Output side: 512-bit
// packets written on the native port come out in order on the AXI4-Stream
// master with TLAST and all byte enables; out_pkt_full rises after 16.
module tb_danna_axis_wrapper;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  logic s_tvalid = 0, s_tready, s_tlast = 1;
  logic [287:0] s_tdata = 0, in_pkt_dout;
  logic in_pkt_empty, in_pkt_rd_en = 0;
  logic [511:0] out_pkt_din = 0, m_tdata;
  logic out_pkt_wr_en = 0, out_pkt_full;
  logic m_tvalid, m_tready = 0, m_tlast;
  logic [63:0] m_tkeep;
  logic [4:0] in_pkt_count, out_pkt_count;
  logic [15:0] bad_frame_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  danna_axis_wrapper dut (.clk, .rst, .s_tvalid, .s_tready, .s_tdata, .s_tlast,
    .in_pkt_dout, .in_pkt_empty, .in_pkt_rd_en, .out_pkt_din, .out_pkt_wr_en, .out_pkt_full,
    .m_tvalid, .m_tready, .m_tdata, .m_tkeep, .m_tlast, .in_pkt_count, .out_pkt_count,
    .bad_frame_count);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [287:0] ipkt(int i);
    logic [287:0] v;
    for (int k = 0; k < 9; k++) v[k*32 +: 32] = 32'(i * 1000 + k);
    return v;
  endfunction
  function automatic logic [511:0] opkt(int i);
    logic [511:0] v;
    for (int k = 0; k < 16; k++) v[k*32 +: 32] = 32'(i * 7777 + k * 3);
    return v;
  endfunction

  initial begin
    int acc;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    check(in_pkt_empty && !out_pkt_full && !m_tvalid, "empty after reset");
    // fill the input buffer
    acc = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); s_tvalid = 1; s_tdata = ipkt(i);
      @(posedge clk); if (s_tready) acc++;
    end
    @(negedge clk); s_tvalid = 0;
    check(acc == 16 && !s_tready && in_pkt_count == 16, $sformatf("input capacity %0d", acc));
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      check(!in_pkt_empty && in_pkt_dout == ipkt(i), $sformatf("input packet %0d", i));
      in_pkt_rd_en = 1; @(negedge clk); in_pkt_rd_en = 0;
    end
    check(in_pkt_empty && in_pkt_count == 0, "input drained");
    // framing error count
    @(negedge clk); s_tvalid = 1; s_tlast = 0; @(negedge clk); s_tvalid = 0; s_tlast = 1;
    check(bad_frame_count == 1, "framing error counted");
    // fill the output buffer
    acc = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); out_pkt_wr_en = !out_pkt_full; out_pkt_din = opkt(i);
      if (out_pkt_wr_en) acc++;
    end
    @(negedge clk); out_pkt_wr_en = 0;
    check(acc == 16 && out_pkt_count == 16, $sformatf("output capacity %0d", acc));
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); m_tready = $urandom_range(0, 1);
      while (!m_tready) begin @(negedge clk); m_tready = $urandom_range(0, 1); end
      check(m_tvalid && m_tdata == opkt(i) && m_tlast && m_tkeep == '1, $sformatf("output packet %0d", i));
    end
    @(negedge clk); m_tready = 0;
    check(!m_tvalid && out_pkt_count == 0, "output drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
