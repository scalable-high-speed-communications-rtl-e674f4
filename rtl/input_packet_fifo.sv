// input_packet_fifo: independent-clock FIFO for host-to-DANNA input packets.
//
// Sits between the Xillybus write stream (PCIe bus clock, 100 MHz) and the
// Aurora transmit user interface (Aurora user clock, 156.25 MHz). The
// settings follow the document's FIFO table: 32-bit write and read ports,
// 512 words, two synchroniser stages, first-word-fall-through read mode with
// an active-high valid flag, full flag held high during reset, data output
// reset to zero, programmable full at 511 words and programmable empty at
// 4 words.
//
// How it works: a dual-clock memory with binary read/write pointers one bit
// wider than the address. Each pointer crosses to the other domain in Gray
// code through SYNC_STAGES flip-flops. The read side prefetches the head word
// into an output register, so dout/valid show the next word without a read
// request (first-word fall-through); rd_en pops it. The output register adds
// one word of storage, so the FIFO holds DEPTH+1 words at most.
//
// Flag timing: full, prog_full and wr_count are exact for the writer's own
// writes and lag reads by SYNC_STAGES+1 write clocks; empty/valid/prog_empty
// lag writes by SYNC_STAGES+1 read clocks. prog_full: wr_count >= PROG_FULL.
// prog_empty: words on the read side (including the output register)
// <= PROG_EMPTY. Writes while full and reads while not valid are ignored.
//
// rst is asynchronous, active high, and is synchronised into each domain
// inside the FIFO (the "reset synchronisation" option of the table).
module input_packet_fifo
  import comm_pkg::bin2gray, comm_pkg::gray2bin;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned DEPTH       = 512,
  parameter int unsigned PROG_FULL   = 511,
  parameter int unsigned PROG_EMPTY  = 4,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              rst,
  // write side
  input  logic              wr_clk,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] din,
  output logic              full,
  output logic              prog_full,
  output logic [$clog2(DEPTH):0] wr_count,
  // read side (first word fall through)
  input  logic              rd_clk,
  input  logic              rd_en,
  output logic [DATA_W-1:0] dout,
  output logic              valid,
  output logic              empty,
  output logic              prog_empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];

  logic wr_rst, rd_rst;
  logic [AW:0] rd_ptr, rd_gray_q;   // read-domain pointer, binary and Gray
  reset_sync #(.STAGES(SYNC_STAGES), .HOLD_CYCLES(2)) u_wr_rst (.clk(wr_clk), .rst_in(rst), .rst_out(wr_rst));
  reset_sync #(.STAGES(SYNC_STAGES), .HOLD_CYCLES(2)) u_rd_rst (.clk(rd_clk), .rst_in(rst), .rst_out(rd_rst));

  // ---------------- write domain ----------------
  logic [AW:0] wr_ptr, wr_gray, rd_gray_sync, rd_ptr_w;
  logic [AW:0] rd_gray_pipe [SYNC_STAGES];
  logic        wr_do;

  assign rd_ptr_w = (AW+1)'(gray2bin(32'(rd_gray_sync)));
  assign wr_count = wr_ptr - rd_ptr_w;
  assign wr_do    = wr_en && !full;

  always_ff @(posedge wr_clk) begin
    if (wr_do) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_ptr  <= '0;
      wr_gray <= '0;
      for (int i = 0; i < SYNC_STAGES; i++) rd_gray_pipe[i] <= '0;
    end else begin
      if (wr_do) begin
        wr_ptr  <= wr_ptr + 1'b1;
        wr_gray <= (AW+1)'(bin2gray(32'(wr_ptr + 1'b1)));
      end
      rd_gray_pipe[0] <= rd_gray_q;
      for (int i = 1; i < SYNC_STAGES; i++) rd_gray_pipe[i] <= rd_gray_pipe[i-1];
    end
  end
  assign rd_gray_sync = rd_gray_pipe[SYNC_STAGES-1];

  // full and prog_full read 1 while the write side is in reset
  assign full      = wr_rst || (wr_count == (AW+1)'(DEPTH));
  assign prog_full = wr_rst || (wr_count >= (AW+1)'(PROG_FULL));

  // ---------------- read domain ----------------
  logic [AW:0] wr_gray_sync, wr_ptr_r, ram_count;
  logic [AW:0] wr_gray_pipe [SYNC_STAGES];
  logic        ram_empty, load;

  assign wr_ptr_r  = (AW+1)'(gray2bin(32'(wr_gray_sync)));
  assign ram_count = wr_ptr_r - rd_ptr;
  assign ram_empty = (ram_count == '0);
  // refill the output register when it is empty or being popped
  assign load      = !ram_empty && (!valid || rd_en);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_ptr    <= '0;
      rd_gray_q <= '0;
      valid     <= 1'b0;
      dout      <= '0;
      for (int i = 0; i < SYNC_STAGES; i++) wr_gray_pipe[i] <= '0;
    end else begin
      wr_gray_pipe[0] <= wr_gray;
      for (int i = 1; i < SYNC_STAGES; i++) wr_gray_pipe[i] <= wr_gray_pipe[i-1];
      if (load) begin
        dout      <= mem[rd_ptr[AW-1:0]];
        valid     <= 1'b1;
        rd_ptr    <= rd_ptr + 1'b1;
        rd_gray_q <= (AW+1)'(bin2gray(32'(rd_ptr + 1'b1)));
      end else if (rd_en) begin
        valid <= 1'b0;
      end
    end
  end
  assign wr_gray_sync = wr_gray_pipe[SYNC_STAGES-1];

  assign empty      = !valid;
  assign prog_empty = (32'(ram_count) + 32'(valid)) <= 32'(PROG_EMPTY);

endmodule
