// mk3_top: FPGA of the Microphone Array Mark III motherboard.
//
// Sixty-four microphones are digitised by 32 stereo PCM1802 converters on
// eight microboards. This design clocks the converters, collects their
// 24-bit samples five frames at a time, keeps the last 2048 such packets in
// a 2 MB external SRAM ring and streams every packet to one host as a UDP
// datagram over a 100 Mbit/s MII PHY. The host controls it with small UDP
// requests (capture on/off, sample-rate doubling, master/slave clocking,
// status, retransmission of old packets); the array obtains its IP address
// by BOOTP at start-up and answers ARP requests.
//
// Blocks: capture (converter clocks and sample buffer), sram_interface
// (SRAM ring, retransmission), capture_udp_frame / bootp / arp /
// response_status (frame generators), mux4_1 -> crc32 -> tx_frame (transmit
// path to the PHY), incoming_message -> read_incoming_message (receive path
// and request decoder). This module adds the seconds counter, the half-rate
// byte strobe ce of the transmit path and the start-up state machine: it
// sends a BOOTP request, waits BOOTP_RETRY_S seconds for the reply and
// repeats until one arrives; the offered address becomes my_ip. The data
// stream goes to the computer that last switched capture on.
//
// Clocks: clk = 25 MHz system and MII transmit clock; rx_clk = MII receive
// clock; cap_clk = 33.8688 MHz capture clock; cap_clk_slave = capture clock
// received from a master board. reset is active high. The SRAM data bus is
// split into sram_io_o/sram_io_i/sram_io_oe (sram_io_o[0] = io01).
// status_* outputs show the control state (the board's LEDs).
// sync_slave_on both selects the capture clock (through the multiplexer in
// capture) and is reported as data by request 02, so a linter flags it as
// used synchronously and as a clock-path signal; that is intended.
// The block structure, the clocks and the control protocol follow the
// documentation; the retry period, the split SRAM bus and the status
// outputs are this design's own choices.
module mk3_top
  import mk3_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 25_000_000,
  parameter int unsigned BOOTP_RETRY_S = 4
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [47:0] mac_address,
  // converters
  input  logic        cap_clk,
  input  logic        cap_clk_slave,
  input  logic        sync_cap_clk_slave,
  output logic        sync_cap_clk_master,
  input  logic [ADC_LINES-1:0] std_in,
  output logic        scki,
  output logic        lrck,
  output logic        bck,
  // external SRAM
  output logic        sram_r_w,
  output logic        sram_oe,
  output logic        sram_ce,
  output logic [18:0] sram_addr,
  output logic [3:0][7:0] sram_io_o,
  output logic        sram_io_oe,
  input  logic [3:0][7:0] sram_io_i,
  // MII to the PHY
  output logic        tx_en,
  output logic [3:0]  txd,
  input  logic        rx_clk,
  input  logic        rx_dv,
  input  logic [3:0]  rxd,
  // status
  output logic        status_ip_valid,
  output logic        status_capture,
  output logic        status_slave,
  output logic        status_double,
  output logic [31:0] status_my_ip
);
  // ---------------- half-rate byte strobe and seconds (Comptetemps) ----------------
  logic ce;
  logic [$clog2(CLK_HZ)-1:0] tick;
  logic [7:0] seconds;

  always_ff @(posedge clk) begin
    if (reset) begin
      ce <= 1'b0; tick <= '0; seconds <= '0;
    end else begin
      ce <= ~ce;
      if (tick == ($bits(tick))'(CLK_HZ - 1)) begin
        tick    <= '0;
        seconds <= seconds + 1'b1;
      end else tick <= tick + 1'b1;
    end
  end

  // ---------------- interconnect ----------------
  logic        req_arp, req_bootp, sync_slave_on, double_frq_ad, start_capture;
  logic        request_old_packet, req_response_request, priority_sender;
  logic [31:0] src_ip_arp_req, bootp_ip, ip_sender;
  logic [47:0] mac_sender;
  logic [10:0] old_numero_packet;
  logic [2:0]  type_response_request;
  logic [9:0]  data_request;
  logic        select_request_old_packet;

  logic        start_capture_slv, start_capture_slv_s, capture_running, packet_ready;
  logic        en_data_capture;
  logic [8:0]  addr_capture;
  logic [15:0] data_capture;

  logic        en_data_capture_udp, packet_ready_capture_udp, capture_udp_buzzy;
  logic [9:0]  addr_capture_udp;
  logic [7:0]  data_capture_udp;
  logic [10:0] numero_packet_capture_udp;

  logic [3:0]  req, sel, en;
  logic [7:0]  d [4];
  logic        bootp_buzzy, arp_buzzy, resp_buzzy;
  logic        en_mux, en_crc, tx_frame_ready;
  logic [7:0]  data_mux, data_crc;

  logic        recv_packet, enable_msg_mem;
  logic [7:0]  addr_msg_mem, end_addr;
  logic [15:0] data_msg_mem;

  // ---------------- start-up: BOOTP until an address is obtained ----------------
  typedef enum logic [1:0] {B_REQ, B_WAIT, B_RUN} boot_e;
  boot_e       boot_st;
  logic        start_bootp;
  logic [7:0]  boot_t0;
  logic [31:0] my_ip;

  always_ff @(posedge clk) begin
    start_bootp <= 1'b0;
    if (reset) begin
      boot_st <= B_REQ; boot_t0 <= '0; my_ip <= '0;
    end else begin
      case (boot_st)
        B_REQ: if (!bootp_buzzy) begin
          start_bootp <= 1'b1;
          boot_t0     <= seconds;
          boot_st     <= B_WAIT;
        end
        B_WAIT: begin
          if (req_bootp) begin
            my_ip   <= bootp_ip;
            boot_st <= B_RUN;
          end else if (seconds - boot_t0 >= 8'(BOOTP_RETRY_S)) boot_st <= B_REQ;
        end
        default: ;
      endcase
    end
  end

  // destination of the data stream: the computer that switched capture on
  logic [47:0] data_dst_mac;
  logic [31:0] data_dst_ip;
  always_ff @(posedge clk)
    if (reset) begin
      data_dst_mac <= '1; data_dst_ip <= '1;
    end else if (priority_sender) begin
      data_dst_mac <= mac_sender; data_dst_ip <= ip_sender;
    end

  // ---------------- capture ----------------
  capture u_capture (
    .cap_clk(cap_clk), .cap_clk_slave(cap_clk_slave), .sync_cap_clk_slave(sync_cap_clk_slave),
    .sync_slave(sync_slave_on), .low_reset(~reset), .start_capture(start_capture),
    .double_frq_ad(double_frq_ad), .std_in(std_in),
    .clk_capture_mem(clk), .enable_capture_mem(en_data_capture), .addr_capture_mem(addr_capture),
    .data_capture_mem(data_capture), .sync_cap_clk_master(sync_cap_clk_master),
    .scki(scki), .lrck(lrck), .bck(bck), .start_capture_slv(start_capture_slv),
    .packet_ready(packet_ready));

  bit_sync u_slv_sync (.clk(clk), .d(start_capture_slv), .q(start_capture_slv_s));
  assign capture_running = sync_slave_on ? start_capture_slv_s : start_capture;

  // ---------------- SRAM ring ----------------
  sram_interface u_sram (
    .clk_sram_interface(clk), .reset_sram_interface(reset), .start_capture(capture_running),
    .packet_ready_capture(packet_ready), .en_data_capture(en_data_capture),
    .addr_capture(addr_capture), .data_capture(data_capture),
    .sram_r_w(sram_r_w), .sram_oe(sram_oe), .sram_ce(sram_ce), .sram_addr(sram_addr),
    .sram_io_o(sram_io_o), .sram_io_oe(sram_io_oe), .sram_io_i(sram_io_i),
    .en_data_capture_udp(en_data_capture_udp), .addr_capture_udp(addr_capture_udp),
    .data_capture_udp(data_capture_udp), .packet_ready_capture_udp(packet_ready_capture_udp),
    .numero_packet_capture_udp(numero_packet_capture_udp), .capture_udp_buzzy(capture_udp_buzzy),
    .request_old_packet(request_old_packet), .old_numero_packet(old_numero_packet),
    .select_request_old_packet(select_request_old_packet));

  // ---------------- frame generators ----------------
  bootp u_bootp (
    .clk_bootp(clk), .ce(ce), .reset(reset), .start_bootp(start_bootp),
    .select_bootp_frame(sel[0]), .source_mac(mac_address), .seconds(seconds),
    .buzzy(bootp_buzzy), .req_bootp_frame(req[0]), .en_data_bootp_out(en[0]),
    .data_bootp_out(d[0]));

  arp u_arp (
    .clk_arp(clk), .ce(ce), .reset(reset), .start_arp(req_arp), .select_arp_frame(sel[1]),
    .source_mac(mac_address), .destination_mac(mac_sender), .source_ip(my_ip),
    .destination_ip(src_ip_arp_req), .buzzy(arp_buzzy), .req_arp_frame(req[1]),
    .en_data_arp_out(en[1]), .data_arp_out(d[1]));

  response_status u_resp (
    .clk_response_status(clk), .ce(ce), .reset(reset), .start_response_status(req_response_request),
    .select_response_status_frame(sel[2]), .type_request(type_response_request),
    .data_request(data_request), .source_mac(mac_address), .destination_mac(mac_sender),
    .source_ip(my_ip), .destination_ip(ip_sender), .buzzy(resp_buzzy),
    .req_response_status_frame(req[2]), .en_data_response_status_out(en[2]),
    .data_response_status_out(d[2]));

  capture_udp_frame u_cudp (
    .clk_capture_udp(clk), .clkd2_capture_udp(ce), .reset(reset),
    .start_capture_udp(packet_ready_capture_udp), .select_capture_udp_frame(sel[3]),
    .data_capture_udp_in(data_capture_udp), .source_mac(mac_address),
    .destination_mac(data_dst_mac), .source_ip(my_ip), .destination_ip(data_dst_ip),
    .numero_packets(numero_packet_capture_udp), .buzzy(capture_udp_buzzy),
    .en_data_capture_udp_in(en_data_capture_udp), .req_capture_udp_frame(req[3]),
    .en_data_capture_udp_out(en[3]), .addr_capture_udp(addr_capture_udp),
    .data_capture_udp_out(d[3]));

  // ---------------- transmit path ----------------
  mux4_1 u_mux (
    .clk_mux(clk), .ce(ce), .reset(reset), .tx_frame_ready(tx_frame_ready),
    .req_in_0(req[0]), .en_d_in_0(en[0]), .req_in_1(req[1]), .en_d_in_1(en[1]),
    .req_in_2(req[2]), .en_d_in_2(en[2]), .req_in_3(req[3]), .en_d_in_3(en[3]),
    .d_in_0(d[0]), .d_in_1(d[1]), .d_in_2(d[2]), .d_in_3(d[3]),
    .select_0(sel[0]), .select_1(sel[1]), .select_2(sel[2]), .select_3(sel[3]),
    .en_data_mux_out(en_mux), .data_mux_out(data_mux));

  crc32 u_crc (
    .clk_crc32(clk), .ce(ce), .reset(reset), .en_data_crc32_in(en_mux), .data_crc32_in(data_mux),
    .en_data_crc32_out(en_crc), .data_crc32_out(data_crc));

  tx_frame u_tx (
    .clk_tx(clk), .ce(ce), .reset(reset), .en_data_tx_in(en_crc), .data_tx_in(data_crc),
    .en_data_tx_out(tx_en), .data_tx_out(txd), .tx_frame_ready(tx_frame_ready));

  // ---------------- receive path ----------------
  incoming_message u_rx (
    .reset(reset), .clk_incoming_message_mem(clk), .enable_incoming_message_mem(enable_msg_mem),
    .addr_incoming_message_mem(addr_msg_mem), .data_incoming_message_mem(data_msg_mem),
    .rx_clk(rx_clk), .rx_dv(rx_dv), .rxd(rxd), .sa(mac_address),
    .recv_packet(recv_packet), .end_addr(end_addr));

  read_incoming_message u_rd (
    .clk_mem_read(clk), .reset(reset), .arp_frame_buzzy(arp_buzzy),
    .select_request_old_packet(select_request_old_packet), .response_request_buzzy(resp_buzzy),
    .recv_packet_msg(recv_packet), .data_incoming_msg_mem(data_msg_mem), .my_ip(my_ip),
    .array_id(mac_address[9:0]), .id(BOOTP_XID), .end_addr_msg(end_addr),
    .enable_incoming_msg_mem(enable_msg_mem), .req_arp(req_arp), .req_bootp(req_bootp),
    .sync_slave_on(sync_slave_on), .double_frq_ad(double_frq_ad), .start_capture(start_capture),
    .request_old_packet(request_old_packet), .req_response_request(req_response_request),
    .priority_sender(priority_sender), .addr_incoming_msg_mem(addr_msg_mem),
    .src_ip_arp_req(src_ip_arp_req), .bootp_ip(bootp_ip), .old_numero_packet(old_numero_packet),
    .type_response_request(type_response_request), .data_request(data_request),
    .ip_sender(ip_sender), .mac_sender(mac_sender));

  assign status_ip_valid = (boot_st == B_RUN);
  assign status_capture  = capture_running;
  assign status_slave    = sync_slave_on;
  assign status_double   = double_frq_ad;
  assign status_my_ip    = my_ip;
endmodule
