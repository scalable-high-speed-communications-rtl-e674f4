// tb_nfc_controller: moves the fill level of a receive buffer across the
// threshold with a slow NFC port (random TREADY delay). Checks: no request
// while below the threshold, exactly one XOFF (4'hF) when the level reaches
// the threshold, exactly one XON (4'h0) when it drops below, request held
// stable until accepted, a flip during a pending request sent afterwards,
// the paused flag and the request counters.
module tb_nfc_controller;
  timeunit 1ns; timeprecision 1ps;
  localparam int TH = 960;
  logic clk = 0, rst = 1;
  logic [10:0] fill_level = 0;
  logic nfc_tvalid, nfc_tready, paused;
  logic [3:0] nfc_tdata;
  logic [31:0] xoff_count, xon_count;
  int checks = 0, failures = 0;
  int n_xoff = 0, n_xon = 0;
  logic [3:0] last_code;

  always #5 clk = ~clk;

  nfc_controller #(.LEVEL_W(11), .THRESHOLD(TH)) dut (.clk, .rst, .fill_level, .nfc_tvalid,
    .nfc_tready, .nfc_tdata, .paused, .xoff_count, .xon_count);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    nfc_tready <= $urandom_range(0, 2) == 0;
    if (!rst && nfc_tvalid && nfc_tready) begin
      if (nfc_tdata == 4'hF) n_xoff++;
      else if (nfc_tdata == 4'h0) n_xon++;
      else check(0, "unknown NFC code");
      last_code = nfc_tdata;
    end
  end

  task automatic settle();
    repeat (30) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int l = 0; l < TH; l += 37) begin @(negedge clk); fill_level = 11'(l); end
    settle();
    check(n_xoff == 0 && n_xon == 0 && !paused, "nothing sent below threshold");
    @(negedge clk); fill_level = 11'(TH - 1);
    settle();
    check(n_xoff == 0, "no XOFF at threshold-1");
    @(negedge clk); fill_level = 11'(TH);
    settle();
    check(n_xoff == 1 && last_code == 4'hF && paused, "one XOFF at threshold");
    for (int l = TH; l < 1024; l += 5) begin @(negedge clk); fill_level = 11'(l); end
    settle();
    check(n_xoff == 1, "no repeated XOFF above threshold");
    @(negedge clk); fill_level = 11'(TH - 1);
    settle();
    check(n_xon == 1 && last_code == 4'h0 && !paused, "one XON below threshold");
    // quick flip: above then below before the first request is accepted
    @(negedge clk); fill_level = 11'(TH + 10);
    @(negedge clk); fill_level = 11'(TH - 10);
    settle();
    check(n_xoff == 2 && n_xon == 2 && last_code == 4'h0 && !paused, "flip resolves to XON");
    check(xoff_count == 2 && xon_count == 2, "request counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
