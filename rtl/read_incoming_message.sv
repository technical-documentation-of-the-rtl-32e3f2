// read_incoming_message: decodes received frames and acts on them.
//
// On recv_packet_msg the module reads the stored frame (up to the first 32
// words, never past end_addr_msg) into a header register file and decodes:
//  - ARP request for my_ip: req_arp pulse, src_ip_arp_req/ip_sender/
//    mac_sender = the requester's addresses.
//  - BOOTP reply (UDP to port 68, op 2) whose transaction id equals id:
//    req_bootp pulse with bootp_ip = the offered address (yiaddr).
//  - UDP to port 32767 addressed to my_ip: a control message whose byte 1
//    is the request number and bytes 2-3 (4-5) its little-endian argument:
//      01 slave mode on/off -> sync_slave_on (argument low byte non-zero)
//      02 slave status      -> response type 010, data 0..01 if slave
//      03 array ID          -> response type 011, data array_id (MAC 9:0)
//      04 capture on/off    -> start_capture; switching on also pulses
//                              priority_sender, naming this sender as the
//                              destination of the data stream
//      05 capture status    -> response type 101
//      06 old packet        -> request_old_packet with old_numero_packet
//      07 double rate on/off-> double_frq_ad
//      08 rate status       -> response type 111
//      09 packet range      -> request_old_packet for first..last, one
//                              after each select_request_old_packet
//    Requests 06 and 09 while capture is off answer type 110 with 'n'.
//    Responses are one-cycle req_response_request pulses with
//    type_response_request/data_request; mac_sender/ip_sender hold the
//    requester's addresses.
// A frame arriving while arp_frame_buzzy or response_request_buzzy is high
// is ignored. mac_sender/ip_sender change only when a frame is accepted.
// The request set, the response codes and the ignore rule follow the
// documentation. A range whose end is missing or lower than its start is
// served as a single packet; a new 06/09 while a range is still being
// served is ignored; the argument byte order follows the host control
// program; array_id (the low ten MAC bits) is an extra input needed by
// request 03. These are this
// design's own choices.
module read_incoming_message
  import mk3_pkg::*;
(
  input  logic        clk_mem_read,
  input  logic        reset,
  input  logic        arp_frame_buzzy,
  input  logic        select_request_old_packet,
  input  logic        response_request_buzzy,
  input  logic        recv_packet_msg,
  input  logic [15:0] data_incoming_msg_mem,
  input  logic [31:0] my_ip,
  input  logic [9:0]  array_id,
  input  logic [31:0] id,
  input  logic [7:0]  end_addr_msg,
  output logic        enable_incoming_msg_mem,
  output logic [7:0]  addr_incoming_msg_mem,
  output logic        req_arp,
  output logic        req_bootp,
  output logic        sync_slave_on,
  output logic        double_frq_ad,
  output logic        start_capture,
  output logic        request_old_packet,
  output logic        req_response_request,
  output logic        priority_sender,
  output logic [31:0] src_ip_arp_req,
  output logic [31:0] bootp_ip,
  output logic [10:0] old_numero_packet,
  output logic [2:0]  type_response_request,
  output logic [9:0]  data_request,
  output logic [31:0] ip_sender,
  output logic [47:0] mac_sender
);
  typedef enum logic [1:0] {M_IDLE, M_READ, M_WAIT, M_DECODE} mstate_e;
  mstate_e st;

  logic        clk;
  logic [15:0] hdr [32];
  logic [4:0]  rd, last, rd_d;
  logic        vld_d;
  logic [10:0] range_last;
  logic        capt_on;

  assign clk = clk_mem_read;

  // header fields (word offsets: Ethernet 0-6, IPv4 7-16, UDP 17-20, payload 21-)
  logic [15:0] ethtype, dport;
  logic [31:0] ip_src, ip_dst, arp_spa, arp_tpa, xid, yiaddr;
  logic [47:0] eth_src, arp_sha;
  logic [7:0]  req_no, arg_lo;
  logic [10:0] arg1, arg2;
  logic        is_ip_udp, frame_long;

  assign ethtype   = hdr[6];
  assign eth_src   = {hdr[3], hdr[4], hdr[5]};
  assign arp_sha   = {hdr[11], hdr[12], hdr[13]};
  assign arp_spa   = {hdr[14], hdr[15]};
  assign arp_tpa   = {hdr[19], hdr[20]};
  assign is_ip_udp = (ethtype == ETHTYPE_IP) && (hdr[7][15:8] == 8'h45) && (hdr[11][7:0] == IP_PROTO_UDP);
  assign ip_src    = {hdr[13], hdr[14]};
  assign ip_dst    = {hdr[15], hdr[16]};
  assign dport     = hdr[18];
  assign xid       = {hdr[23], hdr[24]};
  assign yiaddr    = {hdr[29], hdr[30]};
  assign req_no    = hdr[21][7:0];
  assign arg_lo    = hdr[22][15:8];
  assign arg1      = {hdr[22][2:0], hdr[22][15:8]};
  assign arg2      = {hdr[23][2:0], hdr[23][15:8]};
  assign frame_long = (last >= 5'd23);

  assign capt_on = start_capture;

  always_ff @(posedge clk) begin
    req_arp <= 1'b0; req_bootp <= 1'b0; req_response_request <= 1'b0; priority_sender <= 1'b0;
    vld_d   <= 1'b0;
    if (reset) begin
      st <= M_IDLE; rd <= '0; last <= '0; rd_d <= '0;
      sync_slave_on <= 1'b0; double_frq_ad <= 1'b0; start_capture <= 1'b0;
      request_old_packet <= 1'b0; old_numero_packet <= '0; range_last <= '0;
      src_ip_arp_req <= '0; bootp_ip <= '0; type_response_request <= '0; data_request <= '0;
      ip_sender <= '0; mac_sender <= '0;
      for (int i = 0; i < 32; i++) hdr[i] <= '0;
    end else begin
      // retransmission requests, one packet per acknowledge
      if (request_old_packet && select_request_old_packet) begin
        if (old_numero_packet == range_last) request_old_packet <= 1'b0;
        else old_numero_packet <= old_numero_packet + 1'b1;
      end
      if (vld_d) hdr[rd_d] <= data_incoming_msg_mem;
      case (st)
        M_IDLE: if (recv_packet_msg && !arp_frame_buzzy && !response_request_buzzy) begin
          for (int i = 0; i < 32; i++) hdr[i] <= '0;
          last <= (end_addr_msg > 8'd31) ? 5'd31 : end_addr_msg[4:0];
          rd   <= '0;
          st   <= M_READ;
        end
        M_READ: begin
          vld_d <= 1'b1;
          rd_d  <= rd;
          if (rd == last) st <= M_WAIT;
          else rd <= rd + 1'b1;
        end
        M_WAIT: st <= M_DECODE;
        default: begin   // M_DECODE
          st <= M_IDLE;
          if (ethtype == ETHTYPE_ARP && hdr[10] == 16'h0001 && arp_tpa == my_ip && my_ip != '0) begin
            req_arp        <= 1'b1;
            src_ip_arp_req <= arp_spa;
            ip_sender      <= arp_spa;
            mac_sender     <= arp_sha;
          end else if (is_ip_udp && dport == BOOTP_CLIENT_PORT && hdr[21][15:8] == 8'd2 && xid == id) begin
            req_bootp <= 1'b1;
            bootp_ip  <= yiaddr;
          end else if (is_ip_udp && dport == ARRAY_UDP_PORT && ip_dst == my_ip && my_ip != '0) begin
            ip_sender  <= ip_src;
            mac_sender <= eth_src;
            case (req_no)
              REQ_SLAVE_MODE:   sync_slave_on <= (arg_lo != 8'h00);
              REQ_STATUS_SLAVE: begin
                req_response_request <= 1'b1; type_response_request <= RESP_SLAVE;
                data_request <= {9'b0, sync_slave_on};
              end
              REQ_ID: begin
                req_response_request <= 1'b1; type_response_request <= RESP_ID;
                data_request <= array_id;
              end
              REQ_CAPTURE: begin
                start_capture <= (arg_lo != 8'h00);
                if (arg_lo != 8'h00) priority_sender <= 1'b1;
              end
              REQ_STATUS_CAPT: begin
                req_response_request <= 1'b1; type_response_request <= RESP_CAPTURE;
                data_request <= {9'b0, capt_on};
              end
              REQ_OLD_PACKET, REQ_RANGE_PACKETS: begin
                if (!capt_on) begin
                  req_response_request <= 1'b1; type_response_request <= RESP_ERROR;
                  data_request <= ERROR_CODE_N;
                end else if (!request_old_packet) begin
                  request_old_packet <= 1'b1;
                  old_numero_packet  <= arg1;
                  range_last <= (req_no == REQ_RANGE_PACKETS && frame_long && arg2 > arg1) ? arg2 : arg1;
                end
              end
              REQ_DOUBLE_FREQ: double_frq_ad <= (arg_lo != 8'h00);
              REQ_STATUS_FREQ: begin
                req_response_request <= 1'b1; type_response_request <= RESP_FREQ;
                data_request <= {9'b0, double_frq_ad};
              end
              default: ;
            endcase
          end
        end
      endcase
    end
  end

  assign enable_incoming_msg_mem = (st == M_READ);
  assign addr_incoming_msg_mem   = {3'b000, rd};
endmodule
