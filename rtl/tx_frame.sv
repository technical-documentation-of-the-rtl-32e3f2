// tx_frame: preamble insertion and byte-to-nibble conversion for the MII.
//
// Bytes written with en_data_tx_in on a ce strobe (one every two clocks)
// enter a 16-byte FIFO. When the first byte of a frame is present the
// transmitter sends the preamble, seven 0x55 bytes and the 0xD5 start
// delimiter (16 nibbles), then the frame, one nibble per clk_tx cycle, low
// nibble first, on data_tx_out with en_data_tx_out (TX_EN) high. Input and
// output rates are equal, so the FIFO runs empty exactly at the end of the
// frame; the transmitter then keeps TX_EN low for the 96-bit inter-frame
// gap (24 clocks). tx_frame_ready is high when nothing is queued or being
// sent and the gap has passed; mux4_1 starts the next frame only then.
// The preamble and the 8-to-4 bit conversion follow the documentation; the
// FIFO, the nibble order of the MII standard and the inter-frame gap are
// this design's own choices.
module tx_frame #(
  parameter int unsigned IFG_CLKS = 24
) (
  input  logic       clk_tx,
  input  logic       ce,
  input  logic       reset,
  input  logic       en_data_tx_in,
  input  logic [7:0] data_tx_in,
  output logic       en_data_tx_out,
  output logic [3:0] data_tx_out,
  output logic       tx_frame_ready
);
  typedef enum logic [1:0] {T_IDLE, T_PRE, T_DATA, T_IFG} tstate_e;
  tstate_e st;

  logic [7:0] fifo [16];
  logic [4:0] wr_ptr, rd_ptr;
  logic       empty;
  logic [4:0] cnt;
  logic       half;          // 0: low nibble next, 1: high nibble next

  assign empty = (wr_ptr == rd_ptr);

  always_ff @(posedge clk_tx) begin
    if (reset) begin
      wr_ptr <= '0;
    end else if (ce && en_data_tx_in) begin
      fifo[wr_ptr[3:0]] <= data_tx_in;
      wr_ptr <= wr_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk_tx) begin
    if (reset) begin
      st <= T_IDLE; rd_ptr <= '0; cnt <= '0; half <= 1'b0;
      en_data_tx_out <= 1'b0; data_tx_out <= '0;
    end else begin
      case (st)
        T_IDLE: begin
          en_data_tx_out <= 1'b0;
          cnt <= '0;
          if (!empty) st <= T_PRE;
        end
        T_PRE: begin
          en_data_tx_out <= 1'b1;
          data_tx_out    <= (cnt == 5'd15) ? 4'hD : 4'h5;
          cnt            <= cnt + 1'b1;
          half           <= 1'b0;
          if (cnt == 5'd15) st <= T_DATA;
        end
        T_DATA: begin
          if (!half && empty) begin
            en_data_tx_out <= 1'b0;
            cnt <= '0;
            st  <= T_IFG;
          end else begin
            en_data_tx_out <= 1'b1;
            data_tx_out    <= half ? fifo[rd_ptr[3:0]][7:4] : fifo[rd_ptr[3:0]][3:0];
            if (half) rd_ptr <= rd_ptr + 1'b1;
            half <= ~half;
          end
        end
        default: begin   // T_IFG
          en_data_tx_out <= 1'b0;
          if (cnt == 5'(IFG_CLKS - 1)) st <= T_IDLE;
          else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end

  assign tx_frame_ready = (st == T_IDLE) && empty;

  a_no_overflow: assert property (@(posedge clk_tx) disable iff (reset)
                                  (ce && en_data_tx_in) |-> (5'(wr_ptr - rd_ptr) < 5'd16));
endmodule
