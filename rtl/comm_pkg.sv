// comm_pkg: constants and types shared by the host-to-DANNA communication path.
//
// The communication path carries fixed-size packets: 36-byte input packets
// from the host to the DANNA array and 64-byte output packets back. The
// board-to-board buses are 32 bits wide, so an input packet is 9 bus words
// and an output packet 16 bus words; on the host side the output stream is
// 64 bits wide (8 words per packet). Packet bytes travel in address order,
// byte 0 first, and inside every bus word the lower-numbered byte sits in the
// lower bits (little-endian, as on the AXI4-Stream bus and on the host).
//
// The output packet layout (timestamp, 32 output weights, 16 bytes of shift
// data, status flags, configuration ID) follows the document's description;
// the position of the flags inside the status byte is this design's choice.
// The Aurora native-flow-control codes are the ones the Aurora 8B/10B core
// uses on its NFC port: 4'h0 requests XON, 4'hF requests XOFF.
package comm_pkg;

  localparam int unsigned BUS_W          = 32;   // board bus width (bits)
  localparam int unsigned HOST_RD_W      = 64;   // host read stream width (bits)
  localparam int unsigned IN_PKT_BYTES   = 36;   // input packet size
  localparam int unsigned OUT_PKT_BYTES  = 64;   // output packet size
  localparam int unsigned IN_PKT_W       = IN_PKT_BYTES * 8;       // 288
  localparam int unsigned OUT_PKT_W      = OUT_PKT_BYTES * 8;      // 512
  localparam int unsigned IN_PKT_WORDS   = IN_PKT_W / BUS_W;       // 9
  localparam int unsigned OUT_PKT_WORDS  = OUT_PKT_W / BUS_W;      // 16

  // Aurora native flow control request codes (NFC_NB field)
  localparam logic [3:0] NFC_XON  = 4'h0;
  localparam logic [3:0] NFC_XOFF = 4'hF;

  // Status flag bits inside the output packet status byte
  localparam int unsigned STATUS_HALT_BIT  = 0;
  localparam int unsigned STATUS_SHIFT_BIT = 1;

  // 64-byte output packet. Packed structs list the most significant field
  // first, so the field at byte 0 (timestamp) is last here.
  typedef struct packed {
    logic [15:0]       config_id;     // bytes 62..63
    logic [7:0]        status;        // byte  61
    logic [7:0]        unused1;       // byte  60
    logic [127:0]      shift_data;    // bytes 44..59, one bit per column
    logic [31:0]       unused4;       // bytes 40..43
    logic [31:0][7:0]  out_weights;   // bytes 8..39, weight k at byte 8+k
    logic [63:0]       timestamp;     // bytes 0..7
  } out_pkt_t;

  // 36-byte input packet: an 8-bit opcode in byte 0 and 35 bytes whose
  // meaning depends on the opcode (for a fire command: 32 8-bit weights).
  typedef struct packed {
    logic [34:0][7:0]  payload;       // bytes 1..35, payload[k] at byte 1+k
    logic [7:0]        opcode;        // byte 0
  } in_pkt_t;

  function automatic logic [31:0] bin2gray(input logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [31:0] gray2bin(input logic [31:0] g);
    logic [31:0] b;
    b[31] = g[31];
    for (int i = 30; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
