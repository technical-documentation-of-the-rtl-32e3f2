// tb_bootp: checks the BOOTP request generator: broadcast addresses, UDP 68 to 67, a 300-byte BOOTP request carrying the MAC address, the elapsed seconds and the fixed transaction id, and a valid IPv4 header checksum.
// A frame is started, the grant is given after a random delay, the bytes
// presented with the enable on each strobe are collected and compared with
// a frame the testbench builds on its own. The testbench also checks that
// the request rises with start and falls after the last byte, that the
// frame is contiguous, that no byte appears before the grant and that a
// start while busy is ignored.
// Expected fields follow standard BOOTP; the transaction id and secs values
// checked are this design's own choices.
module tb_bootp;
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

  logic [47:0] smac; logic [7:0] secs;
  bootp dut (.clk_bootp(clk), .ce(ce), .reset(reset), .start_bootp(start),
    .select_bootp_frame(sel), .source_mac(smac), .seconds(secs), .buzzy(buzzy),
    .req_bootp_frame(req), .en_data_bootp_out(en), .data_bootp_out(data));

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
      smac = {$urandom, $urandom}; secs = 8'($urandom);
      pay = {8'd1, 8'd1, 8'd6, 8'd0, 8'h4D, 8'h4B, 8'h33, 8'h03, 8'h00, secs, 8'h80, 8'h00};
      repeat (16) pay.push_back(8'h00);            // ciaddr yiaddr siaddr giaddr
      push48(pay, smac);
      while (pay.size() < 236) pay.push_back(8'h00);
      pay.push_back(8'd99); pay.push_back(8'd130); pay.push_back(8'd83); pay.push_back(8'd99);
      pay.push_back(8'hFF);
      while (pay.size() < 300) pay.push_back(8'h00);
      e = udp_frame(48'hFFFF_FFFF_FFFF, smac, 32'h0, 32'hFFFF_FFFF, 16'h0, 16'd68, 16'd67, pay);
      run_frame(f);
      check(f.size() == 342, "BOOTP frame length 342");
      check(f == e, $sformatf("BOOTP request %0d", k));
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
