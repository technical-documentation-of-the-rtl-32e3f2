// mk3_pkg: constants, types and helper functions shared by the Mark III
// capture/Ethernet FPGA design.
//
// Holds the packet geometry (64 channels x 3 bytes x 5 frames = 960 data
// bytes per network packet), the fixed UDP port 32767, the protocol
// constants of the Ethernet/IPv4/UDP/ARP/BOOTP frames the design emits, the
// request numbers understood on the control port, and three pure functions:
// a byte-wise Ethernet CRC-32 step, the IPv4 header checksum and the byte
// generator for the common 42-byte Ethernet+IPv4+UDP header.
// Packet sizes, the port number and the request numbers follow the
// documentation of the array; IP flags/TTL, the BOOTP transaction id and the
// PROM version string are this design's own choices.
package mk3_pkg;

  // ---- acquisition geometry ----
  localparam int unsigned ADC_LINES         = 32;   // PCM1802 DOUT lines (stereo each)
  localparam int unsigned CHANNELS          = 64;   // microphones
  localparam int unsigned SAMPLE_BITS       = 24;
  localparam int unsigned BYTES_PER_SAMPLE  = 3;
  localparam int unsigned FRAMES_PER_PACKET = 5;
  localparam int unsigned FRAME_BYTES       = CHANNELS * BYTES_PER_SAMPLE;          // 192
  localparam int unsigned DATA_BYTES        = FRAME_BYTES * FRAMES_PER_PACKET;      // 960
  localparam int unsigned DATA_WORDS32      = DATA_BYTES / 4;                       // 240

  // ---- UDP data/control payload ----
  localparam logic [15:0] ARRAY_UDP_PORT    = 16'd32767;
  localparam int unsigned DATA_PAYLOAD      = DATA_BYTES + 4;                       // 964
  localparam logic [7:0]  DATA_PACKET_TYPE  = 8'h86;
  localparam int unsigned RESP_PAYLOAD      = 14;

  // ---- frame framing ----
  localparam int unsigned ETH_HDR   = 14;
  localparam int unsigned IP_HDR    = 20;
  localparam int unsigned UDP_HDR   = 8;
  localparam int unsigned HDR_BYTES = ETH_HDR + IP_HDR + UDP_HDR;                   // 42
  localparam int unsigned MIN_FRAME = 60;   // without FCS
  localparam logic [15:0] ETHTYPE_IP  = 16'h0800;
  localparam logic [15:0] ETHTYPE_ARP = 16'h0806;
  localparam logic [7:0]  IP_PROTO_UDP = 8'd17;
  localparam logic [7:0]  IP_TTL       = 8'd64;
  localparam logic [15:0] BOOTP_SERVER_PORT = 16'd67;
  localparam logic [15:0] BOOTP_CLIENT_PORT = 16'd68;
  localparam logic [31:0] BOOTP_XID    = 32'h4D4B3303;          // "MK3" + 3
  localparam int unsigned BOOTP_MSG    = 300;
  localparam logic [63:0] PROM_VERSION = "MK3-V2.0";
  localparam logic [31:0] CRC_RESIDUE  = 32'hDEBB20E3;          // register after data+FCS

  // ---- control requests (second byte of the UDP control message) ----
  typedef enum logic [7:0] {
    REQ_SLAVE_MODE    = 8'd1,
    REQ_STATUS_SLAVE  = 8'd2,
    REQ_ID            = 8'd3,
    REQ_CAPTURE       = 8'd4,
    REQ_STATUS_CAPT   = 8'd5,
    REQ_OLD_PACKET    = 8'd6,
    REQ_DOUBLE_FREQ   = 8'd7,
    REQ_STATUS_FREQ   = 8'd8,
    REQ_RANGE_PACKETS = 8'd9
  } request_e;

  // response type codes (type_request(2:0))
  localparam logic [2:0] RESP_SLAVE   = 3'b010;
  localparam logic [2:0] RESP_ID      = 3'b011;
  localparam logic [2:0] RESP_CAPTURE = 3'b101;
  localparam logic [2:0] RESP_ERROR   = 3'b110;
  localparam logic [2:0] RESP_FREQ    = 3'b111;
  localparam logic [9:0] ERROR_CODE_N = 10'b0001101110;          // 'n'

  // Ethernet CRC-32 (reflected, polynomial 0x04C11DB7), one byte, LSB first.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++)
      c = (c[0] ^ b[i]) ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

  // IPv4 header checksum for a 20-byte header with flags DF, TTL 64.
  function automatic logic [15:0] ip_checksum(input logic [15:0] total_len,
                                              input logic [15:0] ident,
                                              input logic [7:0]  proto,
                                              input logic [31:0] src,
                                              input logic [31:0] dst);
    logic [31:0] s;
    s = 32'h4500 + 32'(total_len) + 32'(ident) + 32'h4000 + 32'({IP_TTL, proto})
        + 32'(src[31:16]) + 32'(src[15:0]) + 32'(dst[31:16]) + 32'(dst[15:0]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    return ~s[15:0];
  endfunction

  // Byte idx (0..41) of an Ethernet II + IPv4 + UDP header.
  function automatic logic [7:0] eth_ip_udp_byte(input int unsigned idx,
                                                 input logic [47:0] dmac,
                                                 input logic [47:0] smac,
                                                 input logic [31:0] sip,
                                                 input logic [31:0] dip,
                                                 input logic [15:0] ident,
                                                 input logic [15:0] sport,
                                                 input logic [15:0] dport,
                                                 input logic [15:0] payload_len);
    logic [15:0] ip_len, udp_len, csum;
    logic [7:0]  b;
    ip_len  = payload_len + 16'(IP_HDR + UDP_HDR);
    udp_len = payload_len + 16'(UDP_HDR);
    csum    = ip_checksum(ip_len, ident, IP_PROTO_UDP, sip, dip);
    b = 8'h00;
    case (idx)
      0:  b = dmac[47:40];  1: b = dmac[39:32];  2: b = dmac[31:24];
      3:  b = dmac[23:16];  4: b = dmac[15:8];   5: b = dmac[7:0];
      6:  b = smac[47:40];  7: b = smac[39:32];  8: b = smac[31:24];
      9:  b = smac[23:16]; 10: b = smac[15:8];  11: b = smac[7:0];
      12: b = ETHTYPE_IP[15:8]; 13: b = ETHTYPE_IP[7:0];
      14: b = 8'h45;        15: b = 8'h00;
      16: b = ip_len[15:8]; 17: b = ip_len[7:0];
      18: b = ident[15:8];  19: b = ident[7:0];
      20: b = 8'h40;        21: b = 8'h00;
      22: b = IP_TTL;       23: b = IP_PROTO_UDP;
      24: b = csum[15:8];   25: b = csum[7:0];
      26: b = sip[31:24];   27: b = sip[23:16];  28: b = sip[15:8];  29: b = sip[7:0];
      30: b = dip[31:24];   31: b = dip[23:16];  32: b = dip[15:8];  33: b = dip[7:0];
      34: b = sport[15:8];  35: b = sport[7:0];
      36: b = dport[15:8];  37: b = dport[7:0];
      38: b = udp_len[15:8]; 39: b = udp_len[7:0];
      default: b = 8'h00;   // UDP checksum 0 = not used
    endcase
    return b;
  endfunction

endpackage
