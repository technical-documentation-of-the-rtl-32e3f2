// bootp: builds the BOOTP request that asks for the array's IP address.
//
// start_bootp latches source_mac and seconds and raises buzzy and
// req_bootp_frame; after select_bootp_frame the 342-byte frame is streamed
// on data_bootp_out/en_data_bootp_out, one byte per ce strobe:
// broadcast Ethernet header, IPv4 0.0.0.0 -> 255.255.255.255, UDP 68 -> 67
// and a 300-byte BOOTP message (op 1, Ethernet hardware type, transaction id
// BOOTP_XID, secs = seconds since power-up, broadcast flag, chaddr =
// source_mac, vendor area starting with the 99.130.83.99 cookie and the end
// option). read_incoming_message accepts only replies with the same id.
// The module's role and its inputs follow the documentation; the message
// fields are standard BOOTP, and the fixed transaction id and the flags are
// this design's own choices.
module bootp
  import mk3_pkg::*;
(
  input  logic        clk_bootp,
  input  logic        ce,
  input  logic        reset,
  input  logic        start_bootp,
  input  logic        select_bootp_frame,
  input  logic [47:0] source_mac,
  input  logic [7:0]  seconds,
  output logic        buzzy,
  output logic        req_bootp_frame,
  output logic        en_data_bootp_out,
  output logic [7:0]  data_bootp_out
);
  localparam int unsigned LEN = HDR_BYTES + BOOTP_MSG;   // 342

  logic [8:0]  idx;
  logic [47:0] smac;
  logic [7:0]  secs;

  frame_seq #(.LEN(LEN)) u_seq (
    .clk(clk_bootp), .ce(ce), .reset(reset), .start(start_bootp), .select(select_bootp_frame),
    .busy(buzzy), .req(req_bootp_frame), .en(en_data_bootp_out), .idx(idx));

  always_ff @(posedge clk_bootp)
    if (start_bootp && !buzzy) begin
      smac <= source_mac;
      secs <= seconds;
    end

  function automatic logic [7:0] bootp_byte(input int unsigned p);
    logic [7:0] b;
    b = 8'h00;
    case (p)
      0: b = 8'd1;  1: b = 8'd1;  2: b = 8'd6;  3: b = 8'd0;
      4: b = BOOTP_XID[31:24]; 5: b = BOOTP_XID[23:16]; 6: b = BOOTP_XID[15:8]; 7: b = BOOTP_XID[7:0];
      8: b = 8'h00; 9: b = secs;
      10: b = 8'h80;                       // broadcast reply wanted
      28: b = smac[47:40]; 29: b = smac[39:32]; 30: b = smac[31:24];
      31: b = smac[23:16]; 32: b = smac[15:8];  33: b = smac[7:0];
      236: b = 8'd99; 237: b = 8'd130; 238: b = 8'd83; 239: b = 8'd99;
      240: b = 8'hFF;
      default: b = 8'h00;
    endcase
    return b;
  endfunction

  always_comb begin
    if (idx < 9'(HDR_BYTES))
      data_bootp_out = eth_ip_udp_byte(32'(idx), 48'hFFFF_FFFF_FFFF, smac, 32'h0, 32'hFFFF_FFFF,
                                       16'h0, BOOTP_CLIENT_PORT, BOOTP_SERVER_PORT, 16'(BOOTP_MSG));
    else
      data_bootp_out = bootp_byte(32'(idx) - HDR_BYTES);
  end
endmodule
