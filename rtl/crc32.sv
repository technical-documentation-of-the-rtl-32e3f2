// crc32: appends the Ethernet frame check sequence.
//
// Bytes arriving with en_data_crc32_in on a ce strobe are passed on,
// registered (one strobe of latency), to data_crc32_out/en_data_crc32_out
// while the CRC-32 (polynomial 0x04C11DB7, reflected, initial value all
// ones) is updated. The first strobe without en_data_crc32_in ends the
// frame: the complemented CRC follows as four more bytes, least
// significant byte first, and the register is re-initialised. The input
// frame must be contiguous (one byte per strobe).
// The function follows the documentation; the CRC is the standard IEEE
// 802.3 one and the end-of-frame rule is this design's own choice.
module crc32
  import mk3_pkg::*;
(
  input  logic       clk_crc32,
  input  logic       ce,
  input  logic       reset,
  input  logic       en_data_crc32_in,
  input  logic [7:0] data_crc32_in,
  output logic       en_data_crc32_out,
  output logic [7:0] data_crc32_out
);
  logic [31:0] crc;
  logic        in_frame;
  logic [1:0]  tail;        // FCS bytes already sent
  logic        in_tail;

  always_ff @(posedge clk_crc32) begin
    if (reset) begin
      crc <= '1; in_frame <= 1'b0; in_tail <= 1'b0; tail <= '0;
      en_data_crc32_out <= 1'b0; data_crc32_out <= '0;
    end else if (ce) begin
      if (en_data_crc32_in && !in_tail) begin
        crc               <= crc32_byte(crc, data_crc32_in);
        in_frame          <= 1'b1;
        en_data_crc32_out <= 1'b1;
        data_crc32_out    <= data_crc32_in;
      end else if (in_frame || in_tail) begin
        in_frame          <= 1'b0;
        en_data_crc32_out <= 1'b1;
        case (tail)
          2'd0:    data_crc32_out <= ~crc[7:0];
          2'd1:    data_crc32_out <= ~crc[15:8];
          2'd2:    data_crc32_out <= ~crc[23:16];
          default: data_crc32_out <= ~crc[31:24];
        endcase
        tail    <= tail + 1'b1;
        in_tail <= (tail != 2'd3);
        if (tail == 2'd3) crc <= '1;
      end else begin
        en_data_crc32_out <= 1'b0;
      end
    end
  end
endmodule
