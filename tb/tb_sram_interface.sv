// tb_sram_interface: drives sram_interface with a model of the capture
// buffer and the behavioural SRAM model. It checks that each captured
// packet lands in its 256-word slot of the SRAM (two 16-bit words per
// 32-bit word), that the packet is read back into the UDP buffer with the
// right number, that nothing is read back while capture_udp_frame is busy,
// that old packets are fetched on request and acknowledged, that a
// read-back interrupted by a new capture packet still completes, that
// packets are ignored with capture off, that write and read-back together
// fit in one packet period at the doubled rate (2835 clocks at 25 MHz), and
// that the SRAM write timing is respected. Finally 2045 packets are
// streamed at the 44.1 kHz pace (one per 2834.5 clocks) against a
// transmitter that is busy 2060 clocks per packet: none may be skipped,
// the packet number wraps from 2047 to 0 and slot 0 is reused.
// The ring layout follows the documentation; priorities, the two-half
// buffer and the timing budget checked are this design's own choices.
module tb_sram_interface;
  logic clk = 0, reset = 1, start_capture = 0, pr = 0, busy_man = 0, req_old = 0;
  logic busy, emulate_tx = 0;
  int tx_left = 0;
  logic [10:0] old_num = 0;
  logic en_cap; logic [8:0] addr_cap; logic [15:0] q_cap;
  logic r_w, oe, ce, io_oe; logic [18:0] sa; logic [3:0][7:0] io_o, io_i;
  logic en_udp = 0; logic [9:0] addr_udp = 0; logic [7:0] q_udp;
  logic ready_udp, sel_old; logic [10:0] num_udp;
  logic [15:0] cap_mem [512];
  int checks = 0, failures = 0;

  sram_interface dut (.clk_sram_interface(clk), .reset_sram_interface(reset),
    .start_capture(start_capture), .packet_ready_capture(pr), .en_data_capture(en_cap),
    .addr_capture(addr_cap), .data_capture(q_cap), .sram_r_w(r_w), .sram_oe(oe), .sram_ce(ce),
    .sram_addr(sa), .sram_io_o(io_o), .sram_io_oe(io_oe), .sram_io_i(io_i),
    .en_data_capture_udp(en_udp), .addr_capture_udp(addr_udp), .data_capture_udp(q_udp),
    .packet_ready_capture_udp(ready_udp), .numero_packet_capture_udp(num_udp),
    .capture_udp_buzzy(busy), .request_old_packet(req_old), .old_numero_packet(old_num),
    .select_request_old_packet(sel_old));

  sram_model u_sram (.r_w(r_w), .oe(oe), .ce(ce), .addr(sa), .dq_in(io_o), .dq_oe(io_oe),
                     .dq_out(io_i));

  always #20 clk = ~clk;
  // transmitter model for the streaming phase: busy for 2060 clocks (one
  // 1006-byte frame with FCS, preamble and gap) after each hand-over
  always @(posedge clk)
    if (emulate_tx && ready_udp) tx_left <= 2060;
    else if (tx_left > 0)        tx_left <= tx_left - 1;
  assign busy = busy_man || (tx_left > 0);
  always @(posedge clk) if (en_cap) q_cap <= cap_mem[addr_cap];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] pkts [8][480];
  int ready_count = 0; logic [10:0] ready_nums[$];
  always @(posedge clk) if (ready_udp) begin ready_count++; ready_nums.push_back(num_udp); end
  int ack_count = 0;
  always @(posedge clk) if (sel_old) ack_count++;

  task automatic fill(input int p);
    for (int i = 0; i < 480; i++) begin pkts[p][i] = 16'($urandom); cap_mem[i] = pkts[p][i]; end
  endtask
  task automatic pulse_ready();
    @(negedge clk); pr = 1; @(negedge clk); pr = 0;
  endtask
  task automatic wait_ready(output int cycles);
    int n0;
    n0 = ready_count; cycles = 0;
    while (ready_count == n0 && cycles < 20000) begin @(posedge clk); cycles++; end
  endtask
  task automatic check_buffer(input int p, input string name);
    int bad;
    bad = 0;
    for (int i = 0; i < 960; i++) begin
      logic [7:0] e;
      @(negedge clk); en_udp = 1; addr_udp = 10'(i);
      @(negedge clk); en_udp = 0;
      e = i[0] ? pkts[p][i/2][7:0] : pkts[p][i/2][15:8];
      if (q_udp != e) bad++;
    end
    check(bad == 0, $sformatf("%s: UDP buffer holds packet %0d (%0d bad bytes)", name, p, bad));
  endtask
  task automatic check_slot(input int slot, input int p);
    int bad;
    bad = 0;
    for (int w = 0; w < 240; w++)
      if (u_sram.peek({11'(slot), 8'(w)}) != {pkts[p][2*w], pkts[p][2*w+1]}) bad++;
    check(bad == 0, $sformatf("SRAM slot %0d holds packet %0d (%0d bad words)", slot, p, bad));
  endtask

  initial begin
    int cyc;
    repeat (4) @(negedge clk);
    reset = 0;
    // capture off: ignored
    fill(7); pulse_ready();
    repeat (3000) @(posedge clk);
    check(ready_count == 0 && u_sram.writes == 0, "packet ignored while capture is off");
    start_capture = 1;
    fill(0); pulse_ready(); wait_ready(cyc);
    check(num_udp == 0, "first packet number 0");
    check(cyc < 2835, $sformatf("write + read-back in %0d clocks", cyc));
    check_slot(0, 0); check_buffer(0, "packet 0");
    fill(1); pulse_ready(); wait_ready(cyc);
    check(num_udp == 1, "second packet number 1");
    check_slot(1, 1); check_buffer(1, "packet 1");
    // busy: written but not read back
    busy_man = 1;
    fill(2); pulse_ready();
    repeat (3000) @(posedge clk);
    check(ready_count == 2, "no read-back while capture_udp_frame is busy");
    check_slot(2, 2);
    busy_man = 0; wait_ready(cyc);
    check(num_udp == 2, "read-back after busy falls");
    check_buffer(2, "packet 2");
    // old packet
    @(negedge clk); req_old = 1; old_num = 11'd0;
    while (!sel_old) @(negedge clk);
    @(negedge clk); req_old = 0;
    wait_ready(cyc);
    check(num_udp == 0 && ack_count == 1, "old packet 0 fetched");
    check_buffer(0, "old packet 0");
    // old packet read-back interrupted by a capture packet
    @(negedge clk); req_old = 1; old_num = 11'd1;
    while (!sel_old) @(negedge clk);
    @(negedge clk); req_old = 0;
    repeat (200) @(negedge clk);
    fill(3); pulse_ready();
    ready_nums = {};
    wait_ready(cyc); wait_ready(cyc);
    check(ready_nums.size() == 2 && ready_nums[0] == 11'd3 && ready_nums[1] == 11'd1,
          "interrupted read-back: new packet 3 then old packet 1");
    check_slot(3, 3); check_buffer(1, "old packet 1 after interruption");
    // streaming at 44.1 kHz pacing (2834.5 clocks per packet) through the
    // end of the ring: every packet handed over, numbers wrap 2047 -> 0
    ready_nums = {};
    emulate_tx = 1;
    for (int p = 4; p <= 2048; p++) begin
      cap_mem[0] = 16'(p);
      pulse_ready();
      repeat (p % 2 ? 2833 : 2832) @(negedge clk);
    end
    repeat (4000) @(negedge clk);
    begin
      int bad;
      bad = 0;
      foreach (ready_nums[i]) if (ready_nums[i] != 11'((4 + i) % 2048)) bad++;
      check(ready_nums.size() == 2045 && bad == 0,
            $sformatf("2045 streamed packets handed over in order (%0d, %0d out of order)", ready_nums.size(), bad));
    end
    check(ready_nums.size() > 0 && ready_nums[ready_nums.size() - 1] == 11'd0, "packet number wraps to 0");
    check(u_sram.peek(19'h0)[31:16] == 16'd2048, "slot 0 overwritten by the 2049th packet");
    check_slot(1, 1);
    check(u_sram.violations == 0, $sformatf("SRAM write timing (%0d violations)", u_sram.violations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
