// incoming_message: MII receiver, address filter, CRC check and frame store.
//
// In the rx_clk domain the module waits for the 0x5 preamble nibbles and
// the 0xD start delimiter, assembles bytes (low nibble first) while rx_dv
// is high, checks the destination address against sa (the broadcast
// address is accepted too, so ARP requests and broadcast BOOTP replies get
// through) and runs the Ethernet CRC-32 over the whole frame including the
// FCS. Bytes, FCS included, are stored as big-endian 16-bit words (byte 2w
// in bits 15:8) in a 256-word dual-port memory; longer frames keep their
// first 512 bytes.
// When rx_dv falls and the frame passed both checks, end_addr is set to
// the word holding the last byte before the FCS and recv_packet pulses for
// one clk_incoming_message_mem cycle. The reader then fetches words with
// enable_incoming_message_mem/addr_incoming_message_mem, data one cycle
// later. A following frame rewrites the memory from word 0; the reader
// (one word per clock) stays ahead of the writer (one word per four rx
// clocks), which starts at least 20 byte times after recv_packet.
// The filter, CRC check, memory interface and port names follow the
// documentation; broadcast acceptance, truncation and the synchronous
// reset input are this design's own choices.
module incoming_message
  import mk3_pkg::*;
(
  input  logic        reset,
  input  logic        clk_incoming_message_mem,
  input  logic        enable_incoming_message_mem,
  input  logic [7:0]  addr_incoming_message_mem,
  output logic [15:0] data_incoming_message_mem,
  input  logic        rx_clk,
  input  logic        rx_dv,
  input  logic [3:0]  rxd,
  input  logic [47:0] sa,
  output logic        recv_packet,
  output logic [7:0]  end_addr
);
  typedef enum logic [1:0] {R_IDLE, R_PRE, R_DATA, R_DROP} rstate_e;
  rstate_e st;

  logic        rst_rx;
  logic        half;
  logic [3:0]  lo;
  logic [9:0]  bcnt;          // bytes received (saturates)
  logic [31:0] crc;
  logic        mac_ok, bc_ok;
  logic [7:0]  hi_byte;
  logic        we;
  logic [7:0]  waddr;
  logic [15:0] wdata;
  logic        good_evt;
  logic [7:0]  byte_in, sa_byte;
  logic [9:0]  nbytes;

  bit_sync u_rst (.clk(rx_clk), .d(reset), .q(rst_rx));

  assign byte_in = {rxd, lo};
  always_comb begin
    case (bcnt[2:0])
      3'd0:    sa_byte = sa[47:40];
      3'd1:    sa_byte = sa[39:32];
      3'd2:    sa_byte = sa[31:24];
      3'd3:    sa_byte = sa[23:16];
      3'd4:    sa_byte = sa[15:8];
      default: sa_byte = sa[7:0];
    endcase
  end
  assign nbytes = bcnt - 10'd4;      // bytes before the FCS

  always_ff @(posedge rx_clk) begin
    we       <= 1'b0;
    good_evt <= 1'b0;
    if (rst_rx) begin
      st <= R_IDLE; half <= 1'b0; bcnt <= '0; crc <= '1; mac_ok <= 1'b0; bc_ok <= 1'b0;
      end_addr <= '0;
    end else begin
      case (st)
        R_IDLE: if (rx_dv) st <= (rxd == 4'h5) ? R_PRE : R_DROP;
        R_PRE: begin
          if (!rx_dv) st <= R_IDLE;
          else if (rxd == 4'hD) begin
            st <= R_DATA; half <= 1'b0; bcnt <= '0; crc <= '1; mac_ok <= 1'b1; bc_ok <= 1'b1;
          end else if (rxd != 4'h5) st <= R_DROP;
        end
        R_DATA: begin
          if (rx_dv) begin
            if (!half) begin
              lo   <= rxd;
              half <= 1'b1;
            end else begin
              half <= 1'b0;
              crc  <= crc32_byte(crc, byte_in);
              if (bcnt < 10'd6) begin
                if (byte_in != sa_byte) mac_ok <= 1'b0;
                if (byte_in != 8'hFF)   bc_ok  <= 1'b0;
              end
              if (!bcnt[0]) hi_byte <= byte_in;
              else if (bcnt < 10'd512) begin
                we <= 1'b1; waddr <= bcnt[8:1]; wdata <= {hi_byte, byte_in};
              end
              if (bcnt != 10'h3FF) bcnt <= bcnt + 1'b1;
            end
          end else begin
            st <= R_IDLE;
            if (bcnt[0] && bcnt < 10'd512) begin
              we <= 1'b1; waddr <= bcnt[8:1]; wdata <= {hi_byte, 8'h00};
            end
            if (!half && crc == CRC_RESIDUE && (mac_ok || bc_ok) && bcnt >= 10'd64) begin
              good_evt <= 1'b1;
              end_addr <= (nbytes > 10'd512) ? 8'd255 : 8'((nbytes - 10'd1) >> 1);
            end
          end
        end
        default: if (!rx_dv) st <= R_IDLE;   // R_DROP
      endcase
    end
  end

  dpram #(.WIDTH(16), .DEPTH(256)) u_mem (
    .wclk(rx_clk), .we(we), .waddr(waddr), .wdata(wdata),
    .rclk(clk_incoming_message_mem), .re(enable_incoming_message_mem),
    .raddr(addr_incoming_message_mem), .rdata(data_incoming_message_mem));

  toggle_sync u_evt (.src_clk(rx_clk), .src_pulse(good_evt),
                     .dst_clk(clk_incoming_message_mem), .dst_pulse(recv_packet));
endmodule
