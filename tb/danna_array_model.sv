// danna_array_model: behavioural stand-in (not synthesizable) for the DANNA
// array and its packet-handling interface, used by the end-to-end
// testbenches. It reads one 36-byte input packet at a time from the native
// FWFT port and answers each with one 64-byte output packet built by
// expected_out() below: timestamp = number of packets handled before it,
// output weight k = input byte 1+k (the 32 fire weights of a fire command),
// shift data = the input packet's first 16 bytes, status = 0,
// configuration ID = {input opcode, 8'hA5}. make_in() generates the
// input packets the testbenches send. While hold is high it reads
// nothing, which lets a testbench fill the buffers in front of it.
module danna_array_model (
  input  logic         clk,
  input  logic         rst,
  input  logic         hold,
  input  logic [287:0] in_pkt_dout,
  input  logic         in_pkt_empty,
  output logic         in_pkt_rd_en,
  output logic [511:0] out_pkt_din,
  output logic         out_pkt_wr_en,
  input  logic         out_pkt_full,
  output int           handled
);
  import comm_pkg::in_pkt_t, comm_pkg::out_pkt_t;

  // Output packet returned for input packet `in` after `n` packets.
  function automatic logic [511:0] expected_out(input logic [287:0] in, input int n);
    in_pkt_t  ip;
    out_pkt_t op;
    ip = in_pkt_t'(in);
    op = '0;
    op.timestamp  = 64'(n);
    for (int k = 0; k < 32; k++) op.out_weights[k] = ip.payload[k];
    op.shift_data = in[127:0];
    op.status     = 8'h00;
    op.config_id  = {ip.opcode, 8'hA5};
    return op;
  endfunction

  // Input packet number i, for testbenches: opcode 8'h05 (standing for a
  // fire command) and 35 payload bytes derived from i.
  function automatic logic [287:0] make_in(input int i);
    in_pkt_t ip;
    ip.opcode = 8'h05;
    for (int k = 0; k < 35; k++) ip.payload[k] = 8'((i * 37 + k * 11 + (i >> 8)) & 8'hFF);
    return ip;
  endfunction

  logic have_out = 0;
  logic [511:0] out_q = '0;

  assign in_pkt_rd_en  = !rst && !hold && !have_out && !in_pkt_empty;
  assign out_pkt_wr_en = !rst && have_out && !out_pkt_full;
  assign out_pkt_din   = out_q;

  initial handled = 0;

  always @(posedge clk) begin
    if (rst) begin
      have_out <= 0;
      handled  <= 0;
    end else begin
      if (out_pkt_wr_en) have_out <= 0;
      if (in_pkt_rd_en) begin
        out_q    <= expected_out(in_pkt_dout, handled);
        have_out <= 1;
        handled  <= handled + 1;
      end
    end
  end
endmodule
