// sram_interface: external SRAM ring buffer between capture and transmission.
//
// The four 512Kx8 SRAMs form one 512Kx32 memory (sram_addr 18:0). Each
// 960-byte packet occupies a 256-word slot: address = {packet number (11
// bits), word (8 bits)}, so the ring holds the last 2048 packets (about
// 0.46 s at 22.05 kHz) for retransmission.
//
// Operation, in priority order:
//  1. packet_ready_capture: copy the 480 16-bit words of the capture buffer
//     (4 clocks per 32-bit word, fast enough to stay ahead of the capture
//     block overwriting frame 0 with the next packet at 44.1 kHz)
//     into slot wr_pkt (two 16-bit words per 32-bit SRAM word, the first in
//     bits 31:16, i.e. on sram_io01/02), then mark wr_pkt as the packet to
//     send and advance wr_pkt.
//  2. read the newest packet back into the free half of the UDP buffer
//     (two 1024-byte halves used in turn), then, once capture_udp_frame is
//     not busy (capture_udp_buzzy low), pulse packet_ready_capture_udp with
//     numero_packet_capture_udp and hand that half over. The next read-back
//     thus overlaps the transmission of the previous packet, which keeps up
//     with 44.1 kHz (one packet per 2834 clocks; copy 960 + read-back 720
//     clocks on the SRAM, about 2060 clocks on the wire).
//  3. request_old_packet: latch old_numero_packet, acknowledge with a
//     one-cycle select_request_old_packet, and read that slot back the same
//     way.
// A read-back that is under way when a new capture packet arrives is
// abandoned and restarted after the copy, so captured data is never lost;
// if the previous packet had not yet been handed on it is then skipped in
// favour of the newest one (it can still be asked for as an old packet).
//
// SRAM timing: asynchronous SRAM, active-low sram_ce and sram_oe, sram_r_w
// high = read. A write drives address and data for one set-up cycle, holds
// sram_r_w low for ACC_CYCLES cycles and keeps the data one more cycle; a
// read holds the address with sram_oe low for ACC_CYCLES cycles and samples
// on the last. ACC_CYCLES = 2 gives 80 ns at 25 MHz for the 70 ns parts.
// The bidirectional data bus is split into _o/_i with sram_io_oe as the
// tri-state enable (sram_io[0] is sram_io01 = bits 31:24).
//
// The ring layout, the port names and the read-back into a buffer read by
// capture_udp_frame follow the documentation. The two-half UDP buffer, the priorities, the
// abandon-and-restart rule, the set-up/hold timing and running everything
// on one clock (the documentation's half-rate and 90-degree clocks are not
// needed here) are this design's own choices.
module sram_interface
  import mk3_pkg::*;
#(
  parameter int unsigned ACC_CYCLES = 2
) (
  input  logic        clk_sram_interface,
  input  logic        reset_sram_interface,
  input  logic        start_capture,
  // capture buffer (read side)
  input  logic        packet_ready_capture,
  output logic        en_data_capture,
  output logic [8:0]  addr_capture,
  input  logic [15:0] data_capture,
  // external SRAM
  output logic        sram_r_w,
  output logic        sram_oe,
  output logic        sram_ce,
  output logic [18:0] sram_addr,
  output logic [3:0][7:0] sram_io_o,
  output logic        sram_io_oe,
  input  logic [3:0][7:0] sram_io_i,
  // UDP buffer towards capture_udp_frame
  input  logic        en_data_capture_udp,
  input  logic [9:0]  addr_capture_udp,
  output logic [7:0]  data_capture_udp,
  output logic        packet_ready_capture_udp,
  output logic [10:0] numero_packet_capture_udp,
  input  logic        capture_udp_buzzy,
  // retransmission requests
  input  logic        request_old_packet,
  input  logic [10:0] old_numero_packet,
  output logic        select_request_old_packet
);
  localparam int unsigned CW = $clog2(ACC_CYCLES + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_CRD_A, S_CRD_B, S_CRD_C, S_W_SETUP, S_W_PULSE, S_W_HOLD,
    S_R_ADDR, S_R_WAIT, S_R_DONE
  } state_e;

  logic clk;
  assign clk = clk_sram_interface;

  state_e      st;
  logic        pend_wr, pend_cur, pend_old, rb_is_old;
  logic [10:0] wr_pkt, cur_pkt, old_pkt, rb_pkt;
  logic [7:0]  word;           // 32-bit word within the slot
  logic [15:0] hi_half, hi_cap;
  logic [31:0] nxt;            // next word, prefetched during a write
  logic [1:0]  pf;             // prefetch step within the write
  logic        writing, reading;
  logic [31:0] wdata;
  logic [CW-1:0] acc;
  logic        buf_we;
  logic [31:0] buf_wdata;
  logic [8:0]  buf_waddr;
  logic        fill_bank, tx_bank, hand_pend;
  logic [10:0] hand_pkt;

  always_ff @(posedge clk) begin
    select_request_old_packet <= 1'b0;
    packet_ready_capture_udp  <= 1'b0;
    buf_we <= 1'b0;
    if (reset_sram_interface) begin
      st <= S_IDLE; pend_wr <= 1'b0; pend_cur <= 1'b0; pend_old <= 1'b0; rb_is_old <= 1'b0;
      wr_pkt <= '0; cur_pkt <= '0; old_pkt <= '0; rb_pkt <= '0; word <= '0; acc <= '0;
      wdata <= '0; numero_packet_capture_udp <= '0;
      fill_bank <= 1'b0; tx_bank <= 1'b1; hand_pend <= 1'b0; hand_pkt <= '0;
    end else begin
      // hand a finished half over as soon as the frame generator is free
      if (hand_pend && !capture_udp_buzzy && !packet_ready_capture_udp) begin
        packet_ready_capture_udp  <= 1'b1;
        numero_packet_capture_udp <= hand_pkt;
        tx_bank   <= fill_bank;
        fill_bank <= ~fill_bank;
        hand_pend <= 1'b0;
      end
      if (request_old_packet && !pend_old && !select_request_old_packet) begin
        pend_old <= 1'b1;
        old_pkt  <= old_numero_packet;
        select_request_old_packet <= 1'b1;
      end
      case (st)
        S_IDLE: begin
          word <= '0;
          if (pend_wr) begin
            pend_wr <= 1'b0;
            st <= S_CRD_A;
          end else if (pend_cur && !hand_pend) begin
            rb_pkt <= cur_pkt; rb_is_old <= 1'b0; st <= S_R_ADDR;
          end else if (pend_old && !hand_pend) begin
            rb_pkt <= old_pkt; rb_is_old <= 1'b1; st <= S_R_ADDR;
          end
        end
        // ---- copy one 32-bit word from the capture buffer ----
        S_CRD_A: st <= S_CRD_B;                       // addr 2w issued
        S_CRD_B: st <= S_CRD_C;                       // addr 2w+1 issued
        S_CRD_C: begin wdata <= {hi_cap, data_capture}; st <= S_W_SETUP; end
        S_W_SETUP: begin acc <= '0; st <= S_W_PULSE; end
        S_W_PULSE: if (acc == CW'(ACC_CYCLES - 1)) st <= S_W_HOLD; else acc <= acc + 1'b1;
        S_W_HOLD: begin
          wdata <= nxt;
          if (word == 8'(DATA_WORDS32 - 1)) begin
            cur_pkt  <= wr_pkt;
            wr_pkt   <= wr_pkt + 1'b1;
            pend_cur <= 1'b1;
            st       <= S_IDLE;
          end else begin
            word <= word + 1'b1;
            st   <= S_W_SETUP;
          end
        end
        // ---- read one 32-bit word back into the UDP buffer ----
        S_R_ADDR: begin acc <= '0; st <= S_R_WAIT; end
        S_R_WAIT: begin
          if (pend_wr || (packet_ready_capture && start_capture)) st <= S_IDLE;  // abandon
          else if (acc == CW'(ACC_CYCLES - 1)) begin
            buf_we    <= 1'b1;
            buf_waddr <= {fill_bank, word};
            buf_wdata <= sram_io_i;
            st <= S_R_DONE;
          end else acc <= acc + 1'b1;
        end
        S_R_DONE: begin
          if (word == 8'(DATA_WORDS32 - 1)) begin
            hand_pend <= 1'b1;
            hand_pkt  <= rb_pkt;
            if (rb_is_old) pend_old <= 1'b0; else pend_cur <= 1'b0;
            st <= S_IDLE;
          end else begin
            word <= word + 1'b1;
            st   <= S_R_ADDR;
          end
        end
        default: st <= S_IDLE;
      endcase
      if (packet_ready_capture && start_capture) pend_wr <= 1'b1;
    end
  end

  // capture buffer reads: the first word through S_CRD_A..C, every further
  // word prefetched while the previous one is written (16-bit word 2w+2 in
  // the set-up cycle, 2w+3 in the next), so a 32-bit word costs 4 clocks
  always_ff @(posedge clk) begin
    if (!writing || st == S_W_HOLD) pf <= '0;
    else if (pf != 2'd3) pf <= pf + 1'b1;
    if (writing && pf == 2'd1) hi_half <= data_capture;
    if (writing && pf == 2'd2) nxt <= {hi_half, data_capture};
  end
  assign en_data_capture = (st == S_CRD_A) || (st == S_CRD_B) || (writing && pf < 2'd2);
  assign addr_capture    = writing ? {word + 8'd1, (pf == 2'd1)} : {word, (st == S_CRD_B)};

  // SRAM pins
  assign writing    = (st == S_W_SETUP) || (st == S_W_PULSE) || (st == S_W_HOLD);
  assign reading    = (st == S_R_ADDR) || (st == S_R_WAIT);
  assign sram_ce    = ~(writing || reading);
  assign sram_oe    = ~reading;
  assign sram_r_w   = ~(st == S_W_PULSE);
  assign sram_addr  = {(writing ? wr_pkt : rb_pkt), word};
  assign sram_io_o  = wdata;
  assign sram_io_oe = writing;

  always_ff @(posedge clk) if (st == S_CRD_B) hi_cap <= data_capture;

  // UDP byte buffer: two halves of 256 x 32, written a word at a time into
  // fill_bank, read a byte at a time from tx_bank
  logic [31:0] buf_q;
  logic [1:0]  bsel;
  dpram #(.WIDTH(32), .DEPTH(512)) u_buf (
    .wclk(clk), .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata),
    .rclk(clk), .re(en_data_capture_udp), .raddr({tx_bank, addr_capture_udp[9:2]}),
    .rdata(buf_q));
  always_ff @(posedge clk)
    if (en_data_capture_udp) bsel <= addr_capture_udp[1:0];
  always_comb begin
    case (bsel)
      2'd0:    data_capture_udp = buf_q[31:24];
      2'd1:    data_capture_udp = buf_q[23:16];
      2'd2:    data_capture_udp = buf_q[15:8];
      default: data_capture_udp = buf_q[7:0];
    endcase
  end
endmodule
