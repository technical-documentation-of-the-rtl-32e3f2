// arp: builds the ARP reply to a request for the array's IP address.
//
// start_arp latches the four addresses and raises buzzy and req_arp_frame;
// after select_arp_frame the 60-byte frame (42 bytes of Ethernet + ARP,
// padded with zeros to the Ethernet minimum) is streamed on
// data_arp_out/en_data_arp_out, one byte per ce strobe. source_* are the
// array's own addresses (sender fields), destination_* those of the
// requesting computer (Ethernet destination and target fields).
// The module's role and inputs follow the documentation; the frame is a
// standard IPv4-over-Ethernet ARP reply and the padding is this design's
// own choice.
module arp
  import mk3_pkg::*;
(
  input  logic        clk_arp,
  input  logic        ce,
  input  logic        reset,
  input  logic        start_arp,
  input  logic        select_arp_frame,
  input  logic [47:0] source_mac,
  input  logic [47:0] destination_mac,
  input  logic [31:0] source_ip,
  input  logic [31:0] destination_ip,
  output logic        buzzy,
  output logic        req_arp_frame,
  output logic        en_data_arp_out,
  output logic [7:0]  data_arp_out
);
  logic [5:0]  idx;
  logic [47:0] dmac, smac;
  logic [31:0] dip, sip;

  frame_seq #(.LEN(MIN_FRAME)) u_seq (
    .clk(clk_arp), .ce(ce), .reset(reset), .start(start_arp), .select(select_arp_frame),
    .busy(buzzy), .req(req_arp_frame), .en(en_data_arp_out), .idx(idx));

  always_ff @(posedge clk_arp)
    if (start_arp && !buzzy) begin
      dmac <= destination_mac; smac <= source_mac;
      dip  <= destination_ip;  sip  <= source_ip;
    end

  always_comb begin
    case (idx)
      0:  data_arp_out = dmac[47:40];  1: data_arp_out = dmac[39:32];  2: data_arp_out = dmac[31:24];
      3:  data_arp_out = dmac[23:16];  4: data_arp_out = dmac[15:8];   5: data_arp_out = dmac[7:0];
      6:  data_arp_out = smac[47:40];  7: data_arp_out = smac[39:32];  8: data_arp_out = smac[31:24];
      9:  data_arp_out = smac[23:16]; 10: data_arp_out = smac[15:8];  11: data_arp_out = smac[7:0];
      12: data_arp_out = ETHTYPE_ARP[15:8]; 13: data_arp_out = ETHTYPE_ARP[7:0];
      14: data_arp_out = 8'h00; 15: data_arp_out = 8'h01;          // hardware: Ethernet
      16: data_arp_out = 8'h08; 17: data_arp_out = 8'h00;          // protocol: IPv4
      18: data_arp_out = 8'd6;  19: data_arp_out = 8'd4;
      20: data_arp_out = 8'h00; 21: data_arp_out = 8'h02;          // reply
      22: data_arp_out = smac[47:40]; 23: data_arp_out = smac[39:32]; 24: data_arp_out = smac[31:24];
      25: data_arp_out = smac[23:16]; 26: data_arp_out = smac[15:8];  27: data_arp_out = smac[7:0];
      28: data_arp_out = sip[31:24];  29: data_arp_out = sip[23:16];  30: data_arp_out = sip[15:8];
      31: data_arp_out = sip[7:0];
      32: data_arp_out = dmac[47:40]; 33: data_arp_out = dmac[39:32]; 34: data_arp_out = dmac[31:24];
      35: data_arp_out = dmac[23:16]; 36: data_arp_out = dmac[15:8];  37: data_arp_out = dmac[7:0];
      38: data_arp_out = dip[31:24];  39: data_arp_out = dip[23:16];  40: data_arp_out = dip[15:8];
      41: data_arp_out = dip[7:0];
      default: data_arp_out = 8'h00;
    endcase
  end
endmodule
