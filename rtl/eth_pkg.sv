// eth_pkg: types, constants and functions shared by the UDP/IPv4-over-RMII
// transmitter and receiver, the connection state machine and the payload
// packers of the robot and controller designs.
//
// Frame layout on the wire (each byte sent least-significant di-bit first,
// which is what the LAN8720A RMII interface expects):
//   8 bytes preamble + SFD (55 55 55 55 55 55 55 D5)
//  14 bytes MAC header (destination MAC, source MAC, EtherType 0x0800)
//  20 bytes IPv4 header (no options)
//   8 bytes UDP header (UDP checksum left at zero)
//   N bytes payload
//   4 bytes CRC-32 over MAC header .. payload, least significant byte first
// The sensor payload used between the two boards is 548 bytes: distance in
// bits [33:0] and 150 pixel records of {rgb444, address17} above it.
//
// The field values and the payload layout follow the original design; the
// CRC is written in the usual reflected form, this design's choice.
package eth_pkg;

  localparam int unsigned PREAMBLE_BYTES = 8;
  localparam int unsigned MAC_BYTES      = 14;
  localparam int unsigned IP_BYTES       = 20;
  localparam int unsigned UDP_BYTES      = 8;
  localparam int unsigned CRC_BYTES      = 4;
  localparam int unsigned HDR_BYTES      = MAC_BYTES + IP_BYTES + UDP_BYTES;  // 42

  localparam logic [7:0]  SFD_BYTE       = 8'hD5;
  localparam logic [7:0]  PREAMBLE_BYTE  = 8'h55;
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'h11;
  localparam logic [7:0]  IP_TTL         = 8'hFF;

  // Payload shared by both boards.
  localparam int unsigned PAYLOAD_BYTES_DEFAULT = 548;
  localparam int unsigned SENSOR_BITS    = 34;
  localparam int unsigned PIX_ADDR_BITS  = 17;
  localparam int unsigned PIX_RGB_BITS   = 12;
  localparam int unsigned PIX_REC_BITS   = PIX_ADDR_BITS + PIX_RGB_BITS;    // 29
  localparam int unsigned PIXELS_PER_PKT = 150;
  localparam int unsigned CAMERA_BITS    = PIXELS_PER_PKT * PIX_REC_BITS;  // 4350
  localparam int unsigned FRAME_W        = 320;
  localparam int unsigned FRAME_H        = 240;
  localparam int unsigned FRAME_PIXELS   = FRAME_W * FRAME_H;               // 76800

  // Robot commands carried in the low 3 bits of the command payload.
  typedef enum logic [2:0] {
    CMD_STOP     = 3'd0,
    CMD_FORWARD  = 3'd1,
    CMD_BACKWARD = 3'd2,
    CMD_RIGHT    = 3'd3,
    CMD_LEFT     = 3'd4
  } cmd_e;

  // Standard Ethernet CRC-32, reflected form (polynomial 0x04C11DB7 bit
  // reversed). Start from all ones; the FCS is the inverted final value.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] data);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ data[i]) c = (c >> 1) ^ 32'hEDB88320;
      else                c = c >> 1;
    end
    return c;
  endfunction

  // One's-complement 16-bit sum with end-around carry (for the IP checksum).
  function automatic logic [15:0] ones_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
