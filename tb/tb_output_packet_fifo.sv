// tb_output_packet_fifo: self-checking test of the 32-to-64-bit dual-clock
// output FIFO. Writes on a 156.25 MHz clock, reads on a 100 MHz clock.
// Checks: reset values, pairing of write words into read words (first word
// in the low half), standard read timing (dout valid the clock after rd_en),
// capacity of 1024 write words, prog_full from 1008 words, prog_empty while
// less than 16 words are readable, order under random traffic.
module tb_output_packet_fifo;
  timeunit 1ns; timeprecision 1ps;
  logic rst = 1, wr_clk = 0, rd_clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] din = 0;
  logic [63:0] dout;
  logic full, prog_full, empty, prog_empty;
  logic [10:0] wr_count;
  logic [9:0]  rd_count;
  int checks = 0, failures = 0;

  always #3.2 wr_clk = ~wr_clk;
  always #5   rd_clk = ~rd_clk;

  output_packet_fifo dut (.rst, .wr_clk, .wr_en, .din, .full, .prog_full, .wr_count,
                          .rd_clk, .rd_en, .dout, .empty, .prog_empty, .rd_count);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q[$];

  task automatic write_word(input logic [31:0] w);
    @(negedge wr_clk); wr_en = 1; din = w;
    @(negedge wr_clk); wr_en = 0;
  endtask

  task automatic read_word(output logic [63:0] w);
    @(negedge rd_clk); rd_en = 1;
    @(negedge rd_clk); rd_en = 0; w = dout;
  endtask

  initial begin
    logic [63:0] r;
    int accepted, nw, nr;
    #1;
    check(full, "full high in reset");
    repeat (4) @(posedge rd_clk);
    check(dout == 64'h0, "dout zero in reset");
    rst = 0;
    repeat (10) @(posedge rd_clk);
    check(empty && prog_empty && !full, "empty after reset");

    // one word is not readable on a 64-bit port
    write_word(32'h1111_1111);
    repeat (8) @(posedge rd_clk);
    check(empty, "half a read word stays invisible");
    write_word(32'h2222_2222);
    repeat (8) @(posedge rd_clk);
    check(!empty && rd_count == 1, "two writes make one read word");
    check(prog_empty, "prog_empty with 2 words");
    @(negedge rd_clk); rd_en = 1;
    @(posedge rd_clk); #0.5;
    check(dout == 64'h2222_2222_1111_1111, $sformatf("first word in low half: %h", dout));
    @(negedge rd_clk); rd_en = 0;

    // prog_empty threshold: 16 words readable clears it
    for (int i = 0; i < 14; i++) write_word(32'(i));
    repeat (8) @(posedge rd_clk);
    check(prog_empty, "prog_empty at 14 words");
    write_word(32'd14); write_word(32'd15);
    repeat (8) @(posedge rd_clk);
    check(!prog_empty, "prog_empty clears at 16 words");
    for (int i = 0; i < 8; i++) begin
      read_word(r);
      check(r == {32'(2*i+1), 32'(2*i)}, "pair order");
    end

    // capacity and prog_full
    repeat (8) @(posedge wr_clk);
    accepted = 0;
    for (int i = 0; i < 1100; i++) begin
      @(negedge wr_clk);
      wr_en = !full; din = 32'(i);
      if (accepted == 1007) check(!prog_full, "prog_full low at 1007");
      if (accepted == 1008) check(prog_full, "prog_full high at 1008");
      if (wr_en) accepted++;
    end
    @(negedge wr_clk); wr_en = 0;
    check(accepted == 1024, $sformatf("capacity %0d", accepted));
    for (int i = 0; i < 512; i++) begin
      read_word(r);
      check(r == {32'(2*i+1), 32'(2*i)}, "drain order");
    end
    repeat (8) @(posedge wr_clk);
    check(empty && !full && wr_count == 0, "empty after drain");

    // random traffic
    nw = 0; nr = 0;
    fork
      begin
        while (nw < 4000) begin
          @(negedge wr_clk);
          wr_en = ($urandom_range(0, 2) != 0) && !full; din = $urandom;
          if (wr_en) begin exp_q.push_back(din); nw++; end
        end
        @(negedge wr_clk); wr_en = 0;
      end
      begin
        while (nr < 2000) begin
          @(negedge rd_clk);
          rd_en = ($urandom_range(0, 1) != 0) && !empty;
          if (rd_en) begin
            logic [31:0] lo, hi;
            @(negedge rd_clk); rd_en = 0;
            lo = exp_q.pop_front(); hi = exp_q.pop_front();
            check(dout == {hi, lo}, "random order");
            nr++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
