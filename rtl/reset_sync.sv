// reset_sync: reset bridge for one clock domain.
//
// The output asserts at once (asynchronously) when rst_in rises and deasserts
// synchronously, STAGES clock edges after rst_in falls, followed by a further
// HOLD_CYCLES edges so that logic in the domain sees a reset pulse of a
// guaranteed minimum length. Active-high in and out. Both parameters are this
// design's choices.
module reset_sync #(
  parameter int unsigned STAGES      = 2,
  parameter int unsigned HOLD_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic [STAGES-1:0] sync_q;
  localparam int unsigned CW = $clog2(HOLD_CYCLES + 1) + 1;
  logic [CW-1:0] hold_q;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) sync_q <= '1;
    else        sync_q <= {sync_q[STAGES-2:0], 1'b0};
  end

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) begin
      hold_q  <= '0;
      rst_out <= 1'b1;
    end else if (sync_q[STAGES-1]) begin
      hold_q  <= '0;
      rst_out <= 1'b1;
    end else if (hold_q != CW'(HOLD_CYCLES)) begin
      hold_q  <= hold_q + 1'b1;
      rst_out <= 1'b1;
    end else begin
      rst_out <= 1'b0;
    end
  end
endmodule
