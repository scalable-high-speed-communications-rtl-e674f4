// tb_buffer_reset_logic: checks that the buffer reset is asserted while
// neither host file is open and during a board reset, that it is released
// in each clock domain a bounded number of that domain's clocks after a file
// opens, that either file alone keeps it released, and that closing both
// asserts it again within two bus clocks.
module tb_buffer_reset_logic;
  timeunit 1ns; timeprecision 1ps;
  logic bus_clk = 0, user_clk = 0, sys_rst = 0;
  logic user_r_open = 0, user_w_open = 0;
  logic buf_rst_req, buf_rst_bus, buf_rst_user;
  int checks = 0, failures = 0;

  always #5   bus_clk = ~bus_clk;
  always #3.2 user_clk = ~user_clk;

  buffer_reset_logic dut (.bus_clk, .user_clk, .sys_rst, .user_r_open, .user_w_open,
                          .buf_rst_req, .buf_rst_bus, .buf_rst_user);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure_release(input string what);
    int nb, nu;
    nb = 0; nu = 0;
    fork
      begin while (buf_rst_bus)  begin @(posedge bus_clk);  nb++; end end
      begin while (buf_rst_user) begin @(posedge user_clk); nu++; end end
    join
    // 1 request register + 2 synchroniser stages + 4 hold cycles (+1 margin)
    check(nb >= 6 && nb <= 9, $sformatf("%s: bus release after %0d clocks", what, nb));
    check(nu >= 6 && nu <= 10, $sformatf("%s: user release after %0d clocks", what, nu));
  endtask

  initial begin
    #0.5 sys_rst = 1;
    repeat (2) @(posedge bus_clk);
    #1;
    check(buf_rst_req && buf_rst_bus && buf_rst_user, "reset during sys_rst");
    repeat (5) @(posedge bus_clk);
    @(negedge bus_clk); sys_rst = 0;
    repeat (20) @(posedge bus_clk);
    check(buf_rst_bus && buf_rst_user, "held while no file open");
    // open the write file only
    @(negedge bus_clk); user_w_open = 1;
    measure_release("write open");
    repeat (20) @(posedge bus_clk);
    check(!buf_rst_bus && !buf_rst_user, "stays released");
    // open read, close write: still one file open
    @(negedge bus_clk); user_r_open = 1;
    @(negedge bus_clk); user_w_open = 0;
    repeat (20) @(posedge bus_clk);
    check(!buf_rst_req && !buf_rst_bus && !buf_rst_user, "read file alone keeps it released");
    // close both
    @(negedge bus_clk); user_r_open = 0;
    @(posedge bus_clk); #1;
    check(buf_rst_req && buf_rst_bus && buf_rst_user, "close both asserts reset at once");
    repeat (20) @(posedge bus_clk);
    check(buf_rst_bus && buf_rst_user, "held while closed");
    @(negedge bus_clk); user_r_open = 1;
    measure_release("read open");
    // board reset overrides open files
    @(negedge bus_clk); sys_rst = 1; #1;
    check(buf_rst_req && buf_rst_bus && buf_rst_user, "sys_rst asserts");
    @(negedge bus_clk); sys_rst = 0;
    measure_release("after sys_rst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
