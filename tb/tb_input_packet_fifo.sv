// tb_input_packet_fifo: self-checking test of the dual-clock input FIFO.
// Writes on a 100 MHz clock, reads on a 156.25 MHz clock. Checks: reset
// values (full high, valid low, dout zero), word order under random write
// and read enables, first-word-fall-through latency (valid within
// SYNC_STAGES+3 read clocks of a write), capacity (DEPTH words in the memory
// plus one in the output register), prog_full at 511 words and prog_empty
// at 4 words or fewer.
module tb_input_packet_fifo;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 512;
  logic rst = 1, wr_clk = 0, rd_clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] din = 0, dout;
  logic full, prog_full, valid, empty, prog_empty;
  logic [9:0] wr_count;
  int checks = 0, failures = 0;

  always #5   wr_clk = ~wr_clk;
  always #3.2 rd_clk = ~rd_clk;

  input_packet_fifo dut (.rst, .wr_clk, .wr_en, .din, .full, .prog_full, .wr_count,
                         .rd_clk, .rd_en, .dout, .valid, .empty, .prog_empty);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] exp_q[$];
  int n_written, n_read;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted, lat;
    logic [31:0] w;
    #1;
    check(full == 1'b1, "full is high during reset");
    repeat (4) @(posedge wr_clk);
    check(dout == 32'h0 && valid == 1'b0, "dout 0 and valid low in reset");
    rst = 0;
    repeat (10) @(posedge wr_clk);
    check(full == 1'b0 && empty == 1'b1 && prog_empty == 1'b1, "empty after reset");

    // ---- latency of one word ----
    @(negedge wr_clk); wr_en = 1; din = 32'hCAFE_0001;
    @(negedge wr_clk); wr_en = 0;
    lat = 0;
    while (!valid && lat < 20) begin @(posedge rd_clk); lat++; end
    check(valid && dout == 32'hCAFE_0001, "first word falls through");
    check(lat <= 5, $sformatf("fall-through latency %0d read clocks", lat));
    @(negedge rd_clk); rd_en = 1; @(negedge rd_clk); rd_en = 0;
    repeat (3) @(posedge rd_clk);
    check(!valid, "valid drops after pop");

    // ---- random streaming ----
    n_written = 0; n_read = 0;
    fork
      begin
        while (n_written < 3000) begin
          @(negedge wr_clk);
          wr_en = ($urandom_range(0, 3) != 0) && !full;
          din = $urandom;
          if (wr_en) begin exp_q.push_back(din); n_written++; end
        end
        @(negedge wr_clk); wr_en = 0;
      end
      begin
        while (n_read < 3000) begin
          @(negedge rd_clk);
          rd_en = ($urandom_range(0, 2) != 0) && valid;
          if (rd_en) begin
            w = exp_q.pop_front();
            check(dout == w, $sformatf("order: got %h exp %h", dout, w));
            n_read++;
          end
        end
        @(negedge rd_clk); rd_en = 0;
      end
    join

    // ---- fill without reading ----
    repeat (10) @(posedge wr_clk);
    accepted = 0;
    for (int i = 0; i < DEPTH + 20; i++) begin
      @(negedge wr_clk);
      if (accepted == 3) begin
        wr_en = 0;
        repeat (12) @(negedge wr_clk);       // let the first word reach the output register
        check(prog_empty, "prog_empty with 3 words");
      end
      wr_en = !full; din = 32'(i);
      if (wr_en) accepted++;
      if (accepted == 510) begin
        @(posedge wr_clk); #1;
        check(!prog_full, "prog_full low at 510 words");
      end
    end
    @(negedge wr_clk); wr_en = 0;
    repeat (10) @(posedge wr_clk);
    check(accepted == DEPTH + 1, $sformatf("capacity %0d words", accepted));
    check(full && prog_full, "full and prog_full when full");
    // drain and check contents
    for (int i = 0; i < accepted; i++) begin
      @(negedge rd_clk);
      while (!valid) @(negedge rd_clk);
      check(dout == 32'(i), "fill order");
      rd_en = 1; @(negedge rd_clk); rd_en = 0;
    end
    repeat (10) @(posedge wr_clk);
    check(!full && !prog_full && empty, "empty after drain");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
