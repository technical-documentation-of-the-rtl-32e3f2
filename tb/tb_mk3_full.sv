// tb_mk3_full: the whole design at its default parameters (25 MHz system
// clock, one second = 25,000,000 clocks, BOOTP retry after 4 s).
//
// Same surroundings as tb_mk3_top (converter models, SRAM model, MII
// driver and monitor). Short sequence: the first BOOTP request after reset
// is checked and answered, the address is taken over, capture is switched
// on and three data packets are checked sample by sample, with their
// packet interval of 5 frames at 22.05 kHz (5669 clocks); capture status
// is read back. The BOOTP retry is not waited for here (4 s of simulated
// time); tb_mk3_top covers it with a shorter second.
// The protocol steps follow the documentation; the test addresses are the
// test's own.
module tb_mk3_full;
  import tb_util_pkg::*;
  localparam logic [47:0] MY_MAC = 48'h02_4D_4B_33_01_2A, HOST_MAC = 48'h00_11_22_33_44_55;
  localparam logic [31:0] MY_IP = 32'h0A00_0002, HOST_IP = 32'h0A00_0001;

  logic clk = 0, rx_clk = 0, cclk = 0, reset = 1;
  logic sync_in = 0;
  logic rx_dv = 0; logic [3:0] rxd = 0;
  logic [31:0] std_l;
  logic scki, lrck, bck, sync_out, tx_en;
  logic [3:0] txd;
  logic sram_r_w, sram_oe, sram_ce, sram_io_oe;
  logic [18:0] sram_addr;
  logic [3:0][7:0] sram_io_o, sram_io_i;
  logic [31:0] dq_out;
  logic st_ip, st_cap, st_slave, st_dbl; logic [31:0] st_my_ip;
  int checks = 0, failures = 0;

  mk3_top dut (
    .clk(clk), .reset(reset), .mac_address(MY_MAC),
    .cap_clk(cclk), .cap_clk_slave(cclk), .sync_cap_clk_slave(sync_in),
    .sync_cap_clk_master(sync_out), .std_in(std_l), .scki(scki), .lrck(lrck), .bck(bck),
    .sram_r_w(sram_r_w), .sram_oe(sram_oe), .sram_ce(sram_ce), .sram_addr(sram_addr),
    .sram_io_o(sram_io_o), .sram_io_oe(sram_io_oe), .sram_io_i(sram_io_i),
    .tx_en(tx_en), .txd(txd), .rx_clk(rx_clk), .rx_dv(rx_dv), .rxd(rxd),
    .status_ip_valid(st_ip), .status_capture(st_cap), .status_slave(st_slave),
    .status_double(st_dbl), .status_my_ip(st_my_ip));

  sram_model u_sram (.r_w(sram_r_w), .oe(sram_oe), .ce(sram_ce), .addr(sram_addr),
    .dq_in(sram_io_o), .dq_oe(sram_io_oe), .dq_out(dq_out));
  assign sram_io_i = dq_out;

  for (genvar l = 0; l < 32; l++) begin : g_adc
    pcm1802_model #(.LINE(l)) adc (.scki(scki), .bck(bck), .lrck(lrck), .dout(std_l[l]));
  end

  always #20 clk = ~clk;
  initial begin #7; forever #20 rx_clk = ~rx_clk; end
  always #14.7637 cclk = ~cclk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_bootp = 0, n_arp = 0, n_resp = 0, n_data = 0, n_retx = 0, n_bad_frame = 0;
  int n_data_bad = 0, n_retx_bad = 0, n_other = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  longint bootp_t[$], data_t[$];
  logic [7:0] last_resp [$];       // payload of the last response
  int resp_seen = 0;
  byteq_t last_bootp, last_arp;
  byteq_t store [int];
  int last_num = -1, last_n0 = -1, data_since = 0;

  // ---------------- MII transmit monitor ----------------
  logic [3:0] nib [$];
  logic tx_en_d = 0;
  always @(posedge clk) begin
    if (tx_en) nib.push_back(txd);
    if (tx_en_d && !tx_en) begin
      process(nib);
      nib = {};
    end
    tx_en_d <= tx_en;
  end

  function automatic void data_frame(input byteq_t f, input longint t);
    int num, n0, bad;
    byteq_t pay;
    for (int i = 42; i < f.size(); i++) pay.push_back(f[i]);
    num = {pay[2], pay[1]};
    if (store.exists(num)) begin
      n_retx++;
      if (pay != store[num]) begin n_retx_bad++; $display("FAIL: retransmitted packet %0d differs", num); end
      return;
    end
    n_data++; data_since++;
    data_t.push_back(t);
    bad = 0;
    if ({f[0], f[1], f[2], f[3], f[4], f[5]} != HOST_MAC) bad++;
    if ({f[30], f[31], f[32], f[33]} != HOST_IP || {f[26], f[27], f[28], f[29]} != MY_IP) bad++;
    if (pay.size() != 964 || pay[0] != 8'h86) bad++;
    if (!ip_hdr_ok(f, 14)) bad++;
    if (bad == 0) begin
      logic [23:0] s0;
      s0 = {pay[4], pay[5], pay[6]};
      n0 = s0[17:8];
      for (int fr = 0; fr < 5; fr++)
        for (int m = 0; m < 64; m++) begin
          int b;
          b = 4 + fr * 192 + m * 3;
          if ({pay[b], pay[b+1], pay[b+2]} != adc_sample(m / 2, m % 2, (n0 + fr) % 1024)) bad++;
        end
      if (last_num >= 0 && num != ((last_num + 1) % 2048)) begin
        bad++; $display("FAIL: packet number %0d after %0d", num, last_num);
      end
      if (last_n0 >= 0 && n0 != (last_n0 + 5) % 1024) begin
        bad++; $display("FAIL: frame counter %0d after %0d", n0, last_n0);
      end
      last_num = num; last_n0 = n0;
    end
    if (bad != 0) begin n_data_bad++; $display("FAIL: data packet %0d has %0d errors", num, bad); end
    store[num] = pay;
  endfunction

  function automatic void process(input logic [3:0] q[$]);
    byteq_t f;
    logic [31:0] c;
    int n;
    if (q.size() < 16 + 128 || q.size() % 2 != 0) begin n_bad_frame++; $display("FAIL: short frame"); return; end
    for (int i = 0; i < 15; i++) if (q[i] != 4'h5) begin n_bad_frame++; $display("FAIL: preamble"); return; end
    if (q[15] != 4'hD) begin n_bad_frame++; $display("FAIL: SFD"); return; end
    for (int i = 16; i < q.size(); i += 2) f.push_back({q[i+1], q[i]});
    n = f.size();
    c = {f[n-1], f[n-2], f[n-3], f[n-4]};
    repeat (4) void'(f.pop_back());
    if (c != fcs(f)) begin n_bad_frame++; $display("FAIL: FCS"); return; end
    if ({f[6], f[7], f[8], f[9], f[10], f[11]} != MY_MAC) begin n_bad_frame++; $display("FAIL: source MAC"); return; end
    if ({f[12], f[13]} == 16'h0806) begin n_arp++; last_arp = f; end
    else if ({f[12], f[13]} == 16'h0800 && f[23] == 8'd17) begin
      if ({f[36], f[37]} == 16'd67) begin n_bootp++; last_bootp = f; bootp_t.push_back(cyc); end
      else if ({f[34], f[35]} == 16'd32767 && {f[38], f[39]} == 16'd8 + 16'd964) data_frame(f, cyc);
      else if ({f[34], f[35]} == 16'd32767) begin
        n_resp++; last_resp = {};
        for (int i = 42; i < 56; i++) last_resp.push_back(f[i]);
      end else n_other++;
    end else n_other++;
  endfunction

  // ---------------- MII receive driver ----------------
  task automatic send_mii(input byteq_t q);
    logic [31:0] c;
    c = fcs(q);
    q.push_back(c[7:0]); q.push_back(c[15:8]); q.push_back(c[23:16]); q.push_back(c[31:24]);
    @(negedge rx_clk);
    rx_dv = 1;
    for (int i = 0; i < 15; i++) begin rxd = 4'h5; @(negedge rx_clk); end
    rxd = 4'hD; @(negedge rx_clk);
    foreach (q[i]) begin
      rxd = q[i][3:0]; @(negedge rx_clk);
      rxd = q[i][7:4]; @(negedge rx_clk);
    end
    rx_dv = 0; rxd = 0;
    repeat (24) @(negedge rx_clk);
  endtask

  task automatic control(input logic [7:0] req_no, input logic [15:0] a1, input logic [15:0] a2 = 16'h0);
    byteq_t pay;
    pay = {8'h00, req_no, a1[7:0], a1[15:8], a2[7:0], a2[15:8]};
    send_mii(pad60(udp_frame(MY_MAC, HOST_MAC, HOST_IP, MY_IP, 16'h1, 16'd32767, 16'd32767, pay)));
  endtask

  // send a request and wait for its response; check type and value
  int n_resp_ok = 0;
  task automatic ask(input logic [7:0] req_no, input logic [7:0] typ, input logic [9:0] val, input string name);
    int r0, k;
    r0 = n_resp; k = 0;
    control(req_no, 16'h0);
    while (n_resp == r0 && k < 20000) begin @(posedge clk); k++; end
    check(n_resp == r0 + 1 && last_resp[0] == typ && {last_resp[3][1:0], last_resp[2]} == val,
          $sformatf("%s: response type %0d value %0d", name, last_resp[0], {last_resp[3][1:0], last_resp[2]}));
    if (n_resp == r0 + 1 && last_resp[0] == typ) n_resp_ok++;
  endtask

  task automatic wait_data(input int n);
    int k;
    k = 0;
    data_since = 0;
    while (data_since < n && k < 40000 * n) begin @(posedge clk); k++; end
    check(data_since >= n, $sformatf("%0d data packets arrive", n));
  endtask

  task automatic sync_top();
    @(posedge cclk); sync_in <= 1; @(posedge cclk); sync_in <= 0;
    repeat (20) @(posedge cclk);
  endtask

  // period check over the data packets received since index i0
  int n_rate_ok = 0;
  task automatic check_rate(input int i0, input real per, input string name);
    longint dt;
    int bad;
    bad = 0;
    for (int i = i0 + 1; i < data_t.size(); i++) begin
      dt = data_t[i] - data_t[i-1];
      if (dt < longint'(per) - 40 || dt > longint'(per) + 40) begin
        bad++; $display("INFO %s interval %0d", name, dt);
      end
    end
    check(bad == 0 && data_t.size() > i0 + 2, $sformatf("%s: packet interval %0.1f clocks", name, per));
    if (bad == 0) n_rate_ok++;
  endtask

  initial begin
    repeat (20) @(posedge clk);
    reset = 0;
    wait (n_bootp == 1);
    check({last_bootp[0], last_bootp[1], last_bootp[2], last_bootp[3], last_bootp[4], last_bootp[5]} == 48'hFFFF_FFFF_FFFF &&
          {last_bootp[34], last_bootp[35]} == 16'd68 &&
          {last_bootp[46], last_bootp[47], last_bootp[48], last_bootp[49]} == 32'h4D4B3303,
          "BOOTP request");
    begin
      byteq_t pay;
      pay = {8'd2, 8'd1, 8'd6, 8'd0};
      push32(pay, 32'h4D4B3303); push32(pay, 32'h0); push32(pay, 32'h0); push32(pay, MY_IP);
      while (pay.size() < 300) pay.push_back(8'h00);
      send_mii(udp_frame(48'hFFFF_FFFF_FFFF, HOST_MAC, HOST_IP, 32'hFFFF_FFFF, 16'h9, 16'd67, 16'd68, pay));
    end
    repeat (200) @(posedge clk);
    check(st_ip && st_my_ip == MY_IP, "BOOTP reply sets the address");
    control(8'd4, 16'd1);
    wait_data(4);
    check_rate(1, 226.757e-6 * 25e6, "22.05 kHz");
    ask(8'd5, 8'd5, 10'd1, "capture status (on)");
    check(n_data >= 4 && n_data_bad == 0, $sformatf("data packets: %0d, %0d bad", n_data, n_data_bad));
    check(n_bad_frame == 0 && n_other == 0, $sformatf("%0d bad and %0d unknown frames", n_bad_frame, n_other));
    check(u_sram.violations == 0 && u_sram.writes > 0, "SRAM writes without violations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
