// sync_fifo: single-clock FIFO with first-word-fall-through read.
//
// Helper for the packet buffers of the DANNA AXI4-Stream wrapper. DEPTH
// entries of W bits; dout shows the head entry whenever empty is low, rd_en
// pops it. Writes while full and reads while empty are ignored. count is the
// exact occupancy. rst is synchronous, active high.
module sync_fifo #(
  parameter int unsigned W     = 288,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr_en,
  input  logic [W-1:0]           din,
  output logic                   full,
  input  logic                   rd_en,
  output logic [W-1:0]           dout,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_ptr, rd_ptr;
  logic         wr_do, rd_do;

  assign count = wr_ptr - rd_ptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign wr_do = wr_en && !full;
  assign rd_do = rd_en && !empty;
  assign dout  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_do) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr_do) wr_ptr <= wr_ptr + 1'b1;
      if (rd_do) rd_ptr <= rd_ptr + 1'b1;
    end
  end
endmodule
