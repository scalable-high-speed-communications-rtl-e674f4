// buffer_reset_logic: software-controlled reset of the communication buffers.
//
// Following the document, the buffers are reset whenever neither Xillybus
// device file (the host's read stream nor its write stream) is open, so the
// host clears every communication buffer by closing and reopening both
// files. A board reset (sys_rst) also resets them (this design's addition so
// that the FIFOs start empty at power-up). The DANNA array itself is not
// reset here; that takes a reset command packet.
//
// The combined request is formed in the PCIe bus clock domain, where the
// Xillybus open flags live, registered once, and then bridged into each
// clock domain with reset_sync (asynchronous assertion, synchronous release
// after two synchroniser stages plus HOLD_CYCLES). buf_rst_bus serves logic
// on the bus clock, buf_rst_user logic on the Aurora user clock (also sent
// on to the DANNA FPGA); buf_rst_req is the raw registered request for
// resets of FIFOs that synchronise internally.
module buffer_reset_logic #(
  parameter int unsigned HOLD_CYCLES = 4
) (
  input  logic bus_clk,
  input  logic user_clk,
  input  logic sys_rst,
  input  logic user_r_open,
  input  logic user_w_open,
  output logic buf_rst_req,
  output logic buf_rst_bus,
  output logic buf_rst_user
);
  always_ff @(posedge bus_clk or posedge sys_rst) begin
    if (sys_rst) buf_rst_req <= 1'b1;
    else         buf_rst_req <= !(user_r_open || user_w_open);
  end

  reset_sync #(.STAGES(2), .HOLD_CYCLES(HOLD_CYCLES)) u_bus  (.clk(bus_clk),  .rst_in(buf_rst_req), .rst_out(buf_rst_bus));
  reset_sync #(.STAGES(2), .HOLD_CYCLES(HOLD_CYCLES)) u_user (.clk(user_clk), .rst_in(buf_rst_req), .rst_out(buf_rst_user));
endmodule
