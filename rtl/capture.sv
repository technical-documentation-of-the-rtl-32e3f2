// capture: clock generation and sample capture for the 32 PCM1802 converters.
//
// From the 33.8688 MHz capture clock the module derives the three converter
// clocks. At the base rate of 22.05 kHz SCKI = clk/3 (512 fs), BCK = clk/32
// (48 fs) and LRCK = clk/1536 (fs); with double_frq_ad the rate is 44.1 kHz
// with SCKI = clk/2 (384 fs), BCK = clk/16 and LRCK = clk/768. The converters
// run as slaves in left-justified 24-bit format: LRCK high carries the left
// channel, the MSB is valid on the first BCK rising edge after an LRCK edge,
// and the FPGA samples the 32 DOUT lines (std_in) on every BCK rising edge.
//
// After each 24-bit word the 32 samples of that channel are written, three
// bytes each, MSB byte first, into a 960-byte dual-port buffer laid out as
// frame f (0..4), microphone m (0..63), byte k: address f*192 + m*3 + k.
// Microphone m = 2*line + channel (std01 left is microphone 0, std01 right
// microphone 1, ...). When the fifth frame is stored, packet_ready pulses for
// one clk_capture_mem cycle and the buffer is refilled from address 0; the
// reader is expected to drain it faster than it refills (about 11 us of
// margin at 44.1 kHz before byte 0 is rewritten).
//
// Read port (clk_capture_mem domain): enable_capture_mem/addr_capture_mem
// give data_capture_mem one cycle later; byte 2w is in bits 15:8.
//
// Master/slave synchronisation: in master mode a rising start_capture emits
// the first sync "top" (dividers reset), a second top a few cycles later
// (capture starts at the next frame), and a falling start_capture emits the
// third top (capture stops at the next frame boundary; a partial packet is
// dropped). sync_cap_clk_master carries these one-cycle pulses to slave
// boards. With sync_slave high, the module runs from cap_clk_slave and
// counts the tops received on sync_cap_clk_slave (reset, start, stop) in the
// same way; start_capture_slv is high while a slave capture is running.
// sync_slave selects the clock through a plain multiplexer (a clock buffer
// multiplexer on an FPGA) and must only change while capture is stopped;
// this is why the linter sees sync_slave used both as data and in a clock
// path.
//
// The clock ratios, formats and port names follow the documentation; the
// memory byte order, channel numbering, sync pulse spacing, the SCKI duty
// cycle (1/3 high at the base rate) and active-low synchronous low_reset are
// this design's own choices.
module capture
  import mk3_pkg::*;
#(
  parameter int unsigned SYNC_GAP = 4   // cycles between the reset and start tops
) (
  input  logic        cap_clk,
  input  logic        cap_clk_slave,
  input  logic        sync_cap_clk_slave,
  input  logic        sync_slave,
  input  logic        low_reset,
  input  logic        start_capture,
  input  logic        double_frq_ad,
  input  logic [ADC_LINES-1:0] std_in,        // std01 = std[0] ... std32 = std[31]
  input  logic        clk_capture_mem,
  input  logic        enable_capture_mem,
  input  logic [8:0]  addr_capture_mem,
  output logic [15:0] data_capture_mem,
  output logic        sync_cap_clk_master,
  output logic        scki,
  output logic        lrck,
  output logic        bck,
  output logic        start_capture_slv,
  output logic        packet_ready
);

  // ---------------- clock selection and control synchronisers ----------------
  logic clk;
  assign clk = sync_slave ? cap_clk_slave : cap_clk;

  logic rst_n, s_start, s_double, s_slave;
  bit_sync u_rst (.clk(clk), .d(low_reset),     .q(rst_n));
  bit_sync u_st  (.clk(clk), .d(start_capture), .q(s_start));
  bit_sync u_dbl (.clk(clk), .d(double_frq_ad), .q(s_double));
  bit_sync u_slv (.clk(clk), .d(sync_slave),    .q(s_slave));

  // ---------------- sync tops: reset dividers / start / stop ----------------
  typedef enum logic [1:0] {M_IDLE, M_GAP, M_RUN} mseq_e;
  mseq_e mseq;
  logic [$clog2(SYNC_GAP+1)-1:0] gap_cnt;
  logic start_d, sync_in_d;
  logic [1:0] top_cnt;            // slave: which top comes next
  logic div_reset, cap_on_evt, cap_off_evt;
  logic capturing;

  always_ff @(posedge clk) begin
    div_reset   <= 1'b0;
    cap_on_evt  <= 1'b0;
    cap_off_evt <= 1'b0;
    sync_cap_clk_master <= 1'b0;
    if (!rst_n) begin
      mseq <= M_IDLE; gap_cnt <= '0; start_d <= 1'b0; sync_in_d <= 1'b0; top_cnt <= 2'd0;
    end else begin
      start_d   <= s_start;
      sync_in_d <= sync_cap_clk_slave;
      if (s_slave) begin
        mseq <= M_IDLE;
        if (sync_cap_clk_slave && !sync_in_d) begin
          case (top_cnt)
            2'd0:    begin div_reset   <= 1'b1; top_cnt <= 2'd1; end
            2'd1:    begin cap_on_evt  <= 1'b1; top_cnt <= 2'd2; end
            default: begin cap_off_evt <= 1'b1; top_cnt <= 2'd0; end
          endcase
        end
      end else begin
        top_cnt <= 2'd0;
        case (mseq)
          M_IDLE: if (s_start && !start_d) begin
            sync_cap_clk_master <= 1'b1; div_reset <= 1'b1;
            gap_cnt <= '0; mseq <= M_GAP;
          end
          M_GAP: if (gap_cnt == ($bits(gap_cnt))'(SYNC_GAP - 1)) begin
            sync_cap_clk_master <= 1'b1; cap_on_evt <= 1'b1; mseq <= M_RUN;
          end else gap_cnt <= gap_cnt + 1'b1;
          default: if (!s_start) begin
            sync_cap_clk_master <= 1'b1; cap_off_evt <= 1'b1; mseq <= M_IDLE;
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk)
    if (!rst_n || cap_off_evt) capturing <= 1'b0;
    else if (cap_on_evt)       capturing <= 1'b1;

  assign start_capture_slv = capturing & s_slave;

  // ---------------- converter clock dividers ----------------
  logic [4:0] sub;        // cap_clk cycles within one BCK period
  logic [5:0] bck_idx;    // BCK periods within one LRCK period (0..47)
  logic [1:0] sck_cnt;
  logic [4:0] sub_last, sub_half;
  logic       sample_tick;

  assign sub_last = s_double ? 5'd15 : 5'd31;
  assign sub_half = s_double ? 5'd7  : 5'd15;
  assign sample_tick = (sub == sub_half);   // BCK rises on this edge

  always_ff @(posedge clk) begin
    if (!rst_n || div_reset) begin
      // park two BCK periods before a frame: the next edge drops BCK with
      // LRCK low, so the converters see LRCK low for one full BCK period
      // and then frame 0 starts with LRCK rising as BCK falls
      sub <= sub_last; bck_idx <= 6'd46; sck_cnt <= '0;
      bck <= 1'b1; lrck <= 1'b0; scki <= 1'b0;
    end else begin
      if (sub == sub_last) begin
        sub <= '0;
        bck <= 1'b0;
        bck_idx <= (bck_idx == 6'd47) ? 6'd0 : bck_idx + 1'b1;
        lrck    <= (bck_idx == 6'd47) || (bck_idx < 6'd23);
      end else begin
        sub <= sub + 1'b1;
        if (sample_tick) bck <= 1'b1;
      end
      if (s_double) begin
        sck_cnt <= {1'b0, ~sck_cnt[0]};
        scki    <= sck_cnt[0];
      end else begin
        sck_cnt <= (sck_cnt == 2'd2) ? 2'd0 : sck_cnt + 1'b1;
        scki    <= (sck_cnt == 2'd2);
      end
    end
  end

  // ---------------- deserialisers ----------------
  logic [SAMPLE_BITS-1:0] shreg [ADC_LINES];
  logic [SAMPLE_BITS-1:0] hold  [ADC_LINES];
  logic word_done, hold_ch;

  always_ff @(posedge clk) begin
    word_done <= 1'b0;
    if (sample_tick) begin
      for (int l = 0; l < ADC_LINES; l++) shreg[l] <= {shreg[l][SAMPLE_BITS-2:0], std_in[l]};
      if (bck_idx == 6'd23 || bck_idx == 6'd47) begin
        for (int l = 0; l < ADC_LINES; l++) hold[l] <= {shreg[l][SAMPLE_BITS-2:0], std_in[l]};
        hold_ch   <= (bck_idx == 6'd47);
        word_done <= 1'b1;
      end
    end
  end

  // ---------------- buffer writer ----------------
  logic       frame_rec;        // current frame is being recorded
  logic [2:0] frame;            // 0..4 within the packet
  logic       wr_busy;
  logic [4:0] wline;
  logic [1:0] wbyte;
  logic [9:0] wbase, waddr;
  logic [7:0] wdata;
  logic       wlast;
  logic       pkt_evt;

  assign waddr = wbase + 10'({wline, 2'b00}) + 10'({wline, 1'b0}) + 10'(wbyte);
  always_comb begin
    case (wbyte)
      2'd0:    wdata = hold[wline][23:16];
      2'd1:    wdata = hold[wline][15:8];
      default: wdata = hold[wline][7:0];
    endcase
  end
  assign wlast = (wline == 5'(ADC_LINES - 1)) && (wbyte == 2'd2);

  always_ff @(posedge clk) begin
    pkt_evt <= 1'b0;
    if (!rst_n) begin
      frame_rec <= 1'b0; frame <= '0; wr_busy <= 1'b0; wline <= '0; wbyte <= '0; wbase <= '0;
    end else begin
      // a frame is recorded only if capture is on when its first bit arrives
      if (sample_tick && bck_idx == 6'd0) begin
        frame_rec <= capturing;
        if (!capturing) frame <= '0;
      end
      if (word_done && frame_rec) begin
        wr_busy <= 1'b1;
        wline   <= '0;
        wbyte   <= '0;
        wbase   <= 10'(frame * FRAME_BYTES) + (hold_ch ? 10'd3 : 10'd0);
      end else if (wr_busy) begin
        if (wlast) begin
          wr_busy <= 1'b0;
          if (hold_ch) begin
            if (frame == 3'(FRAMES_PER_PACKET - 1)) begin
              frame   <= '0;
              pkt_evt <= 1'b1;
            end else frame <= frame + 1'b1;
          end
        end else if (wbyte == 2'd2) begin
          wbyte <= '0;
          wline <= wline + 1'b1;
        end else wbyte <= wbyte + 1'b1;
      end
    end
  end

  logic [7:0] q_even, q_odd;
  dpram #(.WIDTH(8), .DEPTH(512)) u_even (
    .wclk(clk), .we(wr_busy && !waddr[0]), .waddr(waddr[9:1]), .wdata(wdata),
    .rclk(clk_capture_mem), .re(enable_capture_mem), .raddr(addr_capture_mem), .rdata(q_even));
  dpram #(.WIDTH(8), .DEPTH(512)) u_odd (
    .wclk(clk), .we(wr_busy && waddr[0]), .waddr(waddr[9:1]), .wdata(wdata),
    .rclk(clk_capture_mem), .re(enable_capture_mem), .raddr(addr_capture_mem), .rdata(q_odd));
  assign data_capture_mem = {q_even, q_odd};

  toggle_sync u_pkt (.src_clk(clk), .src_pulse(pkt_evt), .dst_clk(clk_capture_mem),
                     .dst_pulse(packet_ready));

endmodule
