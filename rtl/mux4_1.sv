// mux4_1: gives one of the four frame generators the transmit path.
//
// Inputs 0..3 are bootp, arp, response_status and capture_udp_frame. When
// the transmitter is idle (tx_frame_ready) and no grant is held, the
// lowest-numbered input with req_in_x high receives select_x on the next
// ce strobe. The grant is held until that generator drops its request at
// the end of its frame. While a grant is held, en_d_in_x/d_in_x of the
// selected input are passed straight (combinationally) to en_data_mux_out/
// data_mux_out, which feed crc32.
// Request/select handshake, tx_frame_ready and the direct connection of the
// selected data follow the documentation; the fixed priority is this
// design's own choice (the control frames are short, the data frame waits
// at most one of them).
module mux4_1 (
  input  logic       clk_mux,
  input  logic       ce,
  input  logic       reset,
  input  logic       tx_frame_ready,
  input  logic       req_in_0,
  input  logic       en_d_in_0,
  input  logic       req_in_1,
  input  logic       en_d_in_1,
  input  logic       req_in_2,
  input  logic       en_d_in_2,
  input  logic       req_in_3,
  input  logic       en_d_in_3,
  input  logic [7:0] d_in_0,
  input  logic [7:0] d_in_1,
  input  logic [7:0] d_in_2,
  input  logic [7:0] d_in_3,
  output logic       select_0,
  output logic       select_1,
  output logic       select_2,
  output logic       select_3,
  output logic       en_data_mux_out,
  output logic [7:0] data_mux_out
);
  logic [3:0] req, en;
  logic [7:0] d [4];
  logic       active;
  logic [1:0] gnt;

  assign req = {req_in_3, req_in_2, req_in_1, req_in_0};
  assign en  = {en_d_in_3, en_d_in_2, en_d_in_1, en_d_in_0};
  assign d[0] = d_in_0;
  assign d[1] = d_in_1;
  assign d[2] = d_in_2;
  assign d[3] = d_in_3;

  always_ff @(posedge clk_mux) begin
    if (reset) begin
      active <= 1'b0;
      gnt    <= '0;
    end else if (ce) begin
      if (active) begin
        if (!req[gnt]) active <= 1'b0;
      end else if (tx_frame_ready && |req) begin
        active <= 1'b1;
        if      (req[0]) gnt <= 2'd0;
        else if (req[1]) gnt <= 2'd1;
        else if (req[2]) gnt <= 2'd2;
        else             gnt <= 2'd3;
      end
    end
  end

  assign select_0 = active && (gnt == 2'd0);
  assign select_1 = active && (gnt == 2'd1);
  assign select_2 = active && (gnt == 2'd2);
  assign select_3 = active && (gnt == 2'd3);
  assign en_data_mux_out = active && en[gnt];
  assign data_mux_out    = active ? d[gnt] : 8'h00;

  // only one generator may drive the path
  a_onehot: assert property (@(posedge clk_mux) disable iff (reset)
                             $onehot0({select_3, select_2, select_1, select_0}));
endmodule
