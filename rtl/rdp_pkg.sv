// rdp_pkg: types and constants shared by the DPR link-layer protocol blocks.
//
// Every protocol message travels in the payload of one Ethernet frame with
// EtherType RDP_ETHERTYPE. The payload starts with a 6-byte header:
//   byte 0     message type (msg_t)
//   byte 1     reserved, sent as 0
//   bytes 2-3  sequence number, big endian (DATA: packet number 1..N;
//              ACK: number of the last packet accepted)
//   bytes 4-5  value, big endian (N_MSG: N; P_MSG: P; DATA: number of
//              bitstream bytes that follow; NAME: number of name bytes)
// The message set (name request, N, P, data packet, ACK, NACK) follows the
// protocol state machines of the design; the byte layout, EtherType and type
// codes are this design's own choice.
//
// crc32_byte() is the reflected Ethernet CRC-32 (polynomial 0x04C11DB7,
// processed LSB first as 0xEDB88320). Starting from 32'hFFFF_FFFF, running it
// over a whole frame including its FCS leaves the residue CRC32_RESIDUE.
package rdp_pkg;

  localparam logic [15:0] RDP_ETHERTYPE = 16'h88B5;  // IEEE local experimental
  localparam int unsigned HDR_BYTES     = 6;
  localparam int unsigned ETH_MAX_PAYLOAD = 1500;
  localparam int unsigned ETH_MIN_PAYLOAD = 46;
  // largest number of bitstream bytes one DATA message can carry
  localparam int unsigned MAX_DATA      = ETH_MAX_PAYLOAD - HDR_BYTES;
  localparam logic [31:0] CRC32_RESIDUE = 32'hDEBB_20E3;

  typedef enum logic [7:0] {
    MSG_NAME = 8'h01,  // target -> server: identity of the wanted bitstream
    MSG_N    = 8'h02,  // server -> target: total number of packets N
    MSG_P    = 8'h03,  // target -> server: burst size P
    MSG_DATA = 8'h04,  // server -> target: one packet of bitstream data
    MSG_ACK  = 8'h05,  // target -> server: burst received, send the next
    MSG_NACK = 8'h06   // target -> server: error, restart the bitstream
  } msg_t;

  // trace characters sent on the serial line by the target
  localparam logic [7:0] TR_NAME    = "R";  // name request sent
  localparam logic [7:0] TR_N       = "N";  // N received, session opened
  localparam logic [7:0] TR_ACK     = "A";  // burst acknowledged
  localparam logic [7:0] TR_NACK    = "E";  // error detected, NACK sent
  localparam logic [7:0] TR_DONE    = "D";  // N-th packet received
  localparam logic [7:0] TR_TIMEOUT = "T";  // timer expired

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'h0, d};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

endpackage
