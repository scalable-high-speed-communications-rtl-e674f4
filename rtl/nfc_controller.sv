// nfc_controller: requester for Aurora native flow control (NFC).
//
// The Aurora receive user interface has no TREADY: the receiver cannot
// stall the sender word by word. Instead, as the document describes, the
// receiver asks its channel partner to stop sending (XOFF) when its receive
// buffer fills past a threshold and to resume (XON) once the buffer drains
// below the same threshold. The Aurora core is set to completion mode, so
// the partner finishes the frame in progress before it pauses; the
// threshold must leave room for that frame and the words in flight.
//
// Interface: fill_level is the receive buffer occupancy in any unit,
// compared with THRESHOLD (>= means above). The request leaves on the
// core's NFC port as an AXI4-Stream style transfer: nfc_tvalid is held with
// nfc_tdata = XOFF (4'hF) or XON (4'h0) until nfc_tready. Only changes of
// state are requested; a change that happens while a request is pending is
// sent after it. paused is the state last requested. rst is synchronous,
// active high; after reset the partner is assumed to be sending (XON).
module nfc_controller
  import comm_pkg::NFC_XON, comm_pkg::NFC_XOFF;
#(
  parameter int unsigned LEVEL_W   = 11,
  parameter int unsigned THRESHOLD = 960
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [LEVEL_W-1:0] fill_level,
  output logic               nfc_tvalid,
  input  logic               nfc_tready,
  output logic [3:0]         nfc_tdata,
  output logic               paused,
  output logic [31:0]        xoff_count,
  output logic [31:0]        xon_count
);
  logic above;
  assign above = (32'(fill_level) >= 32'(THRESHOLD));

  always_ff @(posedge clk) begin
    if (rst) begin
      nfc_tvalid <= 1'b0;
      nfc_tdata  <= NFC_XON;
      paused     <= 1'b0;
      xoff_count <= '0;
      xon_count  <= '0;
    end else if (nfc_tvalid) begin
      if (nfc_tready) nfc_tvalid <= 1'b0;
    end else if (above != paused) begin
      nfc_tvalid <= 1'b1;
      nfc_tdata  <= above ? NFC_XOFF : NFC_XON;
      paused     <= above;
      if (above) xoff_count <= xoff_count + 1'b1;
      else       xon_count  <= xon_count + 1'b1;
    end
  end

  a_nfc_hold: assert property (@(posedge clk) disable iff (rst)
    (nfc_tvalid && !nfc_tready) |=> (nfc_tvalid && $stable(nfc_tdata)));
endmodule
