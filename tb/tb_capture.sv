// tb_capture: a master capture block with 32 converter models, plus a
// second capture block as slave (clocked by the master's capture clock and
// synchronised by its sync pulses, reading the same DOUT lines).
// Checks: SCKI/BCK/LRCK periods of 3/32/1536 capture clocks at the base
// rate and 2/16/768 with double_frq_ad; every sample of each packet read
// back through the memory port (line, channel and hash fields, frame
// counter advancing by one per frame and by five per packet); the
// packet_ready period (5 LRCK periods); two sync tops on start and one on
// stop; the slave following start and stop with start_capture_slv and
// storing the same packets; no packets after stop.
// Expected clock ratios and the 5-frame packet follow the documentation;
// the buffer layout and sync spacing checked are this design's own choices.
module tb_capture;
  import tb_util_pkg::*;
  logic cclk = 0, mclk = 0, low_reset = 0, start = 0, dbl = 0;
  logic [31:0] std_l;
  logic [15:0] q_m, q_s;
  logic en_m = 0, en_s = 0; logic [8:0] addr_m = 0, addr_s = 0;
  logic sync_m, sync_s_unused, scki, lrck, bck, slv_m, slv_s, pr_m, pr_s;
  logic scki_s, lrck_s, bck_s;
  int checks = 0, failures = 0;

  capture master (.cap_clk(cclk), .cap_clk_slave(1'b0), .sync_cap_clk_slave(1'b0),
    .sync_slave(1'b0), .low_reset(low_reset), .start_capture(start), .double_frq_ad(dbl),
    .std_in(std_l), .clk_capture_mem(mclk), .enable_capture_mem(en_m), .addr_capture_mem(addr_m),
    .data_capture_mem(q_m), .sync_cap_clk_master(sync_m), .scki(scki), .lrck(lrck), .bck(bck),
    .start_capture_slv(slv_m), .packet_ready(pr_m));

  capture slave (.cap_clk(1'b0), .cap_clk_slave(cclk), .sync_cap_clk_slave(sync_m),
    .sync_slave(1'b1), .low_reset(low_reset), .start_capture(1'b0), .double_frq_ad(dbl),
    .std_in(std_l), .clk_capture_mem(mclk), .enable_capture_mem(en_s), .addr_capture_mem(addr_s),
    .data_capture_mem(q_s), .sync_cap_clk_master(sync_s_unused), .scki(scki_s), .lrck(lrck_s),
    .bck(bck_s), .start_capture_slv(slv_s), .packet_ready(pr_s));

  for (genvar l = 0; l < 32; l++) begin : g_adc
    pcm1802_model #(.LINE(l)) adc (.scki(scki), .bck(bck), .lrck(lrck), .dout(std_l[l]));
  end

  always #14.7637 cclk = ~cclk;     // 33.8688 MHz
  always #20 mclk = ~mclk;          // 25 MHz

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // clock period measurement in capture-clock cycles
  int ccount = 0, t_lr = 0, t_bck = 0, t_sck = 0, p_lr = 0, p_bck = 0, p_sck = 0;
  logic lr_d = 0, bck_d = 0, sck_d = 0;
  always @(posedge cclk) begin
    ccount++;
    if (lrck && !lr_d) begin p_lr = ccount - t_lr; t_lr = ccount; end
    if (bck && !bck_d) begin p_bck = ccount - t_bck; t_bck = ccount; end
    if (scki && !sck_d) begin p_sck = ccount - t_sck; t_sck = ccount; end
    lr_d <= lrck; bck_d <= bck; sck_d <= scki;
  end
  int sync_pulses = 0;
  always @(posedge cclk) if (low_reset && sync_m) sync_pulses++;

  int pr_count = 0, ps_count = 0; realtime pr_t[$];
  always @(posedge mclk) begin
    if (pr_m) begin pr_count++; pr_t.push_back($realtime); end
    if (pr_s) ps_count++;
  end

  // read one packet from the master (and slave) buffer right after packet_ready
  logic [15:0] pk_m [480], pk_s [480];
  task automatic read_packet();
    for (int w = 0; w < 480; w++) begin
      @(negedge mclk); en_m = 1; addr_m = 9'(w); en_s = 1; addr_s = 9'(w);
      @(negedge mclk); en_m = 0; en_s = 0;
      pk_m[w] = q_m; pk_s[w] = q_s;
    end
  endtask

  int last_n = -1;
  task automatic check_packet(input string name, input bit cmp_slave);
    int bad, n0, bad_s;
    logic [7:0] b [960];
    bad = 0; bad_s = 0;
    for (int w = 0; w < 480; w++) begin
      b[2*w] = pk_m[w][15:8]; b[2*w+1] = pk_m[w][7:0];
      if (cmp_slave && pk_s[w] != pk_m[w]) bad_s++;
    end
    begin
      logic [23:0] s0;
      s0 = {b[0], b[1], b[2]};
      n0 = s0[17:8];
    end
    for (int f = 0; f < 5; f++)
      for (int m = 0; m < 64; m++) begin
        logic [23:0] s;
        int base;
        base = f * 192 + m * 3;
        s = {b[base], b[base+1], b[base+2]};
        if (s != adc_sample(m / 2, m % 2, (n0 + f) % 1024)) begin
          if (bad < 4) $display("INFO %s f%0d m%0d got %h exp %h", name, f, m, s, adc_sample(m / 2, m % 2, (n0 + f) % 1024));
          bad++;
        end
      end
    check(bad == 0, $sformatf("%s: all 320 samples (%0d wrong)", name, bad));
    if (last_n >= 0) check(n0 == (last_n + 5) % 1024, $sformatf("%s: frame counter %0d follows %0d", name, n0, last_n));
    last_n = n0;
    if (cmp_slave) check(bad_s == 0, $sformatf("%s: slave holds the same packet (%0d words differ)", name, bad_s));
  endtask

  task automatic wait_pr();
    int n0, k;
    n0 = pr_count; k = 0;
    while (pr_count == n0 && k < 20000) begin @(posedge mclk); k++; end
    check(k < 20000, "packet_ready arrives");
  endtask

  initial begin
    repeat (10) @(posedge cclk);
    low_reset = 1;
    repeat (4000) @(posedge cclk);
    check(p_lr == 1536 && p_bck == 32 && p_sck == 3,
          $sformatf("base-rate clocks LRCK %0d BCK %0d SCKI %0d", p_lr, p_bck, p_sck));
    start = 1;
    repeat (20) @(posedge cclk);
    check(sync_pulses == 2, $sformatf("two sync tops on start (%0d)", sync_pulses));
    check(slv_s && !slv_m, "slave capture running, master reports no slave capture");
    for (int p = 0; p < 3; p++) begin
      wait_pr(); read_packet();
      check_packet($sformatf("base packet %0d", p), 1);
    end
    check(ps_count >= 3, "slave packets");
    check(pr_t.size() >= 3 && (pr_t[2] - pr_t[1]) > 226000 && (pr_t[2] - pr_t[1]) < 228000,
          $sformatf("packet period %0t", pr_t[2] - pr_t[1]));
    // stop, switch to double rate, restart
    start = 0;
    repeat (20) @(posedge cclk);
    check(sync_pulses == 3, "third sync top on stop");
    check(!slv_s, "slave stops");
    begin
      int n0;
      n0 = pr_count;
      repeat (20000) @(posedge cclk);
      check(pr_count == n0, "no packets after stop");
    end
    dbl = 1;
    repeat (200) @(posedge cclk);
    start = 1;
    repeat (2000) @(posedge cclk);
    check(p_lr == 768 && p_bck == 16 && p_sck == 2,
          $sformatf("double-rate clocks LRCK %0d BCK %0d SCKI %0d", p_lr, p_bck, p_sck));
    last_n = -1; pr_t = {};
    for (int p = 0; p < 3; p++) begin
      wait_pr(); read_packet();
      check_packet($sformatf("double packet %0d", p), 1);
    end
    check(pr_t.size() >= 3 && (pr_t[2] - pr_t[1]) > 113000 && (pr_t[2] - pr_t[1]) < 114000,
          $sformatf("double-rate packet period %0t", pr_t[2] - pr_t[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge cclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
