// response_status: builds the UDP answer to a control request.
//
// start_response_status latches the addresses, type_request and
// data_request and raises buzzy and req_response_status_frame; after
// select_response_status_frame the frame is streamed one byte per ce
// strobe: Ethernet/IPv4/UDP header (ports 32767 -> 32767) and a 14-byte
// payload, padded to 60 bytes:
//   byte 0: type_request (2 slave status, 3 ID, 5 capture status,
//           6 error, 7 frequency-multiplier status)
//   byte 2: data_request[7:0], byte 3: data_request[9:8]
//   bytes 6..13: PROM version string (ID answers)
// The response types and the 10-bit data follow the documentation; the
// byte positions match the host control program (type in byte 0, value
// in bytes 2-3, version text in bytes 6-13). The version string and the
// padding are this design's own choices.
module response_status
  import mk3_pkg::*;
(
  input  logic        clk_response_status,
  input  logic        ce,
  input  logic        reset,
  input  logic        start_response_status,
  input  logic        select_response_status_frame,
  input  logic [2:0]  type_request,
  input  logic [9:0]  data_request,
  input  logic [47:0] source_mac,
  input  logic [47:0] destination_mac,
  input  logic [31:0] source_ip,
  input  logic [31:0] destination_ip,
  output logic        buzzy,
  output logic        req_response_status_frame,
  output logic        en_data_response_status_out,
  output logic [7:0]  data_response_status_out
);
  logic [5:0]  idx;
  logic [47:0] dmac, smac;
  logic [31:0] dip, sip;
  logic [2:0]  rtype;
  logic [9:0]  rdata;

  frame_seq #(.LEN(MIN_FRAME)) u_seq (
    .clk(clk_response_status), .ce(ce), .reset(reset), .start(start_response_status),
    .select(select_response_status_frame), .busy(buzzy), .req(req_response_status_frame),
    .en(en_data_response_status_out), .idx(idx));

  always_ff @(posedge clk_response_status)
    if (start_response_status && !buzzy) begin
      dmac  <= destination_mac; smac <= source_mac;
      dip   <= destination_ip;  sip  <= source_ip;
      rtype <= type_request;    rdata <= data_request;
    end

  always_comb begin
    logic [7:0] p;
    p = 8'(idx) - 8'(HDR_BYTES);
    if (idx < 6'(HDR_BYTES))
      data_response_status_out = eth_ip_udp_byte(32'(idx), dmac, smac, sip, dip, 16'h0,
                                                 ARRAY_UDP_PORT, ARRAY_UDP_PORT, 16'(RESP_PAYLOAD));
    else begin
      case (p)
        0:  data_response_status_out = {5'b0, rtype};
        2:  data_response_status_out = rdata[7:0];
        3:  data_response_status_out = {6'b0, rdata[9:8]};
        6:  data_response_status_out = PROM_VERSION[63:56];
        7:  data_response_status_out = PROM_VERSION[55:48];
        8:  data_response_status_out = PROM_VERSION[47:40];
        9:  data_response_status_out = PROM_VERSION[39:32];
        10: data_response_status_out = PROM_VERSION[31:24];
        11: data_response_status_out = PROM_VERSION[23:16];
        12: data_response_status_out = PROM_VERSION[15:8];
        13: data_response_status_out = PROM_VERSION[7:0];
        default: data_response_status_out = 8'h00;
      endcase
    end
  end
endmodule
