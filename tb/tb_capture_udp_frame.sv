// tb_capture_udp_frame: checks the data frame generator: a 1006-byte frame with ports 32767, identification and payload header (0x86, packet number little-endian, reserved byte) followed by the 960 bytes read from the packet buffer in order.
// A frame is started, the grant is given after a random delay, the bytes
// presented with the enable on each strobe are collected and compared with
// a frame the testbench builds on its own. The testbench also checks that
// the request rises with start and falls after the last byte, that the
// frame is contiguous, that no byte appears before the grant and that a
// start while busy is ignored.
// Port 32767, type 0x86 and the 964-byte payload follow the documentation;
// the header details checked are this design's own choices.
module tb_capture_udp_frame;
  import tb_util_pkg::*;
  logic clk = 0, ce = 0, reset = 1, start = 0, sel = 0;
  logic buzzy, req, en; logic [7:0] data;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [47:0] smac, dmac; logic [31:0] sip, dip; logic [10:0] pkt;
  logic en_rd; logic [9:0] addr_rd; logic [7:0] q_rd;
  logic [7:0] buffer [1024];
  always @(posedge clk) if (en_rd) q_rd <= buffer[addr_rd];   // registered read, as the buffer
  capture_udp_frame dut (.clk_capture_udp(clk), .clkd2_capture_udp(ce), .reset(reset),
    .start_capture_udp(start), .select_capture_udp_frame(sel), .data_capture_udp_in(q_rd),
    .source_mac(smac), .destination_mac(dmac), .source_ip(sip), .destination_ip(dip),
    .numero_packets(pkt), .buzzy(buzzy), .en_data_capture_udp_in(en_rd),
    .req_capture_udp_frame(req), .en_data_capture_udp_out(en), .addr_capture_udp(addr_rd),
    .data_capture_udp_out(data));

  byteq_t got;
  bit     gap_seen, early;
  always @(posedge clk) if (ce && !reset) begin
    if (en) begin
      if (got.size() > 0 && gap_seen) check(0, "frame not contiguous");
      if (!sel) early = 1;
      got.push_back(data);
    end else if (got.size() > 0) gap_seen = 1;
  end

  // run one frame; fields must be set by the caller beforehand
  task automatic run_frame(output byteq_t frame);
    got = {}; gap_seen = 0; early = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(req && buzzy, "request and busy after start");
    repeat ($urandom_range(2, 20)) @(negedge clk);
    check(got.size() == 0, "nothing sent before the grant");
    sel = 1;
    while (req) @(negedge clk);
    sel = 0;
    check(!buzzy, "busy falls with the request");
    check(!early, "no byte without grant");
    repeat (6) @(negedge clk);
    frame = got;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    reset = 0;
    for (int k = 0; k < 3; k++) begin
      automatic byteq_t f, e, pay;
      smac = {$urandom, $urandom}; dmac = {$urandom, $urandom}; sip = $urandom; dip = $urandom;
      pkt = (k == 0) ? 11'd2047 : 11'($urandom);
      foreach (buffer[i]) buffer[i] = 8'($urandom);
      pay = {8'h86, pkt[7:0], 8'(pkt[10:8]), 8'h00};
      for (int i = 0; i < 960; i++) pay.push_back(buffer[i]);
      e = udp_frame(dmac, smac, sip, dip, {5'b0, pkt}, 16'd32767, 16'd32767, pay);
      run_frame(f);
      check(f.size() == 1006, $sformatf("data frame length %0d", f.size()));
      check(f == e, $sformatf("data frame %0d contents", k));
      check(ip_hdr_ok(f, 14), "IPv4 header checksum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
