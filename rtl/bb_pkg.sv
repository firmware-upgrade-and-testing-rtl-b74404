// bb_pkg: types, constants and helper functions shared by the BusyBox RTL.
//
// Holds the D-RORC command codes, the serial frame constants of the
// BusyBox <-> D-RORC link (2 start bits, 16 data bits, parity, stop, each
// bit five clock-A cycles), the layout of the 48-bit D-RORC reply and the
// Hamming(8,4) encoder used for BusyBox commands. Command codes, frame
// format and message layout follow the published protocol; the placement of
// the Hamming check bits is inferred from captured command words.
package bb_pkg;

  // Command types sent from the BusyBox to the D-RORCs.
  typedef enum logic [3:0] {
    CMD_REQUEST_EVENT_ID = 4'b0100,
    CMD_RESEND_LAST      = 4'b0101,
    CMD_FORCE_POP        = 4'b0110,
    CMD_FORCE_REQUEST_ID = 4'b0111
  } cmd_t;

  localparam int unsigned FRAME_BITS = 20;  // S1 S2 D0..D15 P S
  localparam logic START1 = 1'b0;
  localparam logic START2 = 1'b1;
  localparam logic STOP   = 1'b0;
  localparam logic IDLE   = 1'b1;

  // Reply from one D-RORC, 48 bits.
  typedef struct packed {
    logic [3:0]  req_id;    // 47:44
    logic [11:0] bcid;      // 43:32
    logic [23:0] orbit;     // 31:8
    logic [7:0]  drorc_id;  // 7:0
  } drorc_msg_t;

  // Event identifier as carried in the CDH: bunch crossing and orbit.
  typedef struct packed {
    logic [11:0] bcid;
    logic [23:0] orbit;
  } event_id_t;

  // Hamming(8,4) codeword. Bit i holds Hamming position i+1:
  // p1 p2 d0 p4 d1 d2 d3, and bit 7 is even parity over bits 6:0.
  function automatic logic [7:0] ham84_enc(input logic [3:0] d);
    logic [7:0] c;
    c[0] = d[0] ^ d[1] ^ d[3];
    c[1] = d[0] ^ d[2] ^ d[3];
    c[2] = d[0];
    c[3] = d[1] ^ d[2] ^ d[3];
    c[4] = d[1];
    c[5] = d[2];
    c[6] = d[3];
    c[7] = ^c[6:0];
    return c;
  endfunction

  // 16-bit BusyBox command word: encoded command in 15:8, request ID in 7:0.
  function automatic logic [15:0] bb_cmd_word(input logic [3:0] cmd, input logic [3:0] req_id);
    return {ham84_enc(cmd), ham84_enc(req_id)};
  endfunction

endpackage
