// capture_udp_frame: wraps one buffered packet of samples in a UDP frame.
//
// start_capture_udp (the packet-ready pulse from sram_interface) latches the
// addresses and numero_packets and raises buzzy and req_capture_udp_frame.
// When mux4_1 grants select_capture_udp_frame the 1006-byte frame is
// streamed on data_capture_udp_out/en_data_capture_udp_out, one byte per
// clkd2_capture_udp strobe (the half-rate byte enable of the transmit path):
//   Ethernet II header (14), IPv4 header (20, identification = packet
//   number), UDP header (8, ports 32767 -> 32767, checksum 0) and the
//   964-byte payload: type 0x86, packet number low byte then high byte,
//   one reserved byte, then the 960 sample bytes.
// The sample bytes are read from the buffer of sram_interface through
// addr_capture_udp/en_data_capture_udp_in, issued in the clock cycle
// between two strobes so the registered read data is ready for the next
// strobe. No FCS: crc32 appends it.
// The field list, port 32767 and the payload size 964 follow the
// documentation; the packet number byte order (little-endian, as in the
// control messages), IP flags/TTL and the identification field are this
// design's own choices.
module capture_udp_frame
  import mk3_pkg::*;
(
  input  logic        clk_capture_udp,
  input  logic        clkd2_capture_udp,
  input  logic        reset,
  input  logic        start_capture_udp,
  input  logic        select_capture_udp_frame,
  input  logic [7:0]  data_capture_udp_in,
  input  logic [47:0] source_mac,
  input  logic [47:0] destination_mac,
  input  logic [31:0] source_ip,
  input  logic [31:0] destination_ip,
  input  logic [10:0] numero_packets,
  output logic        buzzy,
  output logic        en_data_capture_udp_in,
  output logic        req_capture_udp_frame,
  output logic        en_data_capture_udp_out,
  output logic [9:0]  addr_capture_udp,
  output logic [7:0]  data_capture_udp_out
);
  localparam int unsigned LEN = HDR_BYTES + DATA_PAYLOAD;   // 1006
  localparam int unsigned PAY = HDR_BYTES + 4;              // first sample byte

  logic [9:0]  idx;
  logic [47:0] dmac, smac;
  logic [31:0] dip, sip;
  logic [10:0] pkt;

  frame_seq #(.LEN(LEN)) u_seq (
    .clk(clk_capture_udp), .ce(clkd2_capture_udp), .reset(reset),
    .start(start_capture_udp), .select(select_capture_udp_frame),
    .busy(buzzy), .req(req_capture_udp_frame), .en(en_data_capture_udp_out), .idx(idx));

  always_ff @(posedge clk_capture_udp)
    if (start_capture_udp && !buzzy) begin
      dmac <= destination_mac; smac <= source_mac;
      dip  <= destination_ip;  sip  <= source_ip;
      pkt  <= numero_packets;
    end

  assign en_data_capture_udp_in = en_data_capture_udp_out && !clkd2_capture_udp && (idx >= 10'(PAY));
  assign addr_capture_udp       = idx - 10'(PAY);

  always_comb begin
    if (idx < 10'(HDR_BYTES))
      data_capture_udp_out = eth_ip_udp_byte(32'(idx), dmac, smac, sip, dip, {5'b0, pkt},
                                             ARRAY_UDP_PORT, ARRAY_UDP_PORT, 16'(DATA_PAYLOAD));
    else if (idx == 10'(HDR_BYTES))     data_capture_udp_out = DATA_PACKET_TYPE;
    else if (idx == 10'(HDR_BYTES + 1)) data_capture_udp_out = pkt[7:0];
    else if (idx == 10'(HDR_BYTES + 2)) data_capture_udp_out = {5'b0, pkt[10:8]};
    else if (idx == 10'(HDR_BYTES + 3)) data_capture_udp_out = 8'h00;
    else                                data_capture_udp_out = data_capture_udp_in;
  end
endmodule
