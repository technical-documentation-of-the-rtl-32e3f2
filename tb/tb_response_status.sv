// tb_response_status: checks the UDP response generator: type in byte 0, the 10-bit value in bytes 2-3, the version text in bytes 6-13, ports 32767, a valid IPv4 header checksum and padding to 60 bytes.
// A frame is started, the grant is given after a random delay, the bytes
// presented with the enable on each strobe are collected and compared with
// a frame the testbench builds on its own. The testbench also checks that
// the request rises with start and falls after the last byte, that the
// frame is contiguous, that no byte appears before the grant and that a
// start while busy is ignored.
// The response types follow the documentation; the payload positions follow
// the host control program, the version string is this design's own.
module tb_response_status;
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

  logic [47:0] smac, dmac; logic [31:0] sip, dip; logic [2:0] typ; logic [9:0] dat;
  response_status dut (.clk_response_status(clk), .ce(ce), .reset(reset),
    .start_response_status(start), .select_response_status_frame(sel), .type_request(typ),
    .data_request(dat), .source_mac(smac), .destination_mac(dmac), .source_ip(sip),
    .destination_ip(dip), .buzzy(buzzy), .req_response_status_frame(req),
    .en_data_response_status_out(en), .data_response_status_out(data));

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
    for (int k = 0; k < 5; k++) begin
      automatic byteq_t f, e, pay;
      smac = {$urandom, $urandom}; dmac = {$urandom, $urandom}; sip = $urandom; dip = $urandom;
      typ = (k == 0) ? 3'b010 : (k == 1) ? 3'b011 : (k == 2) ? 3'b101 : (k == 3) ? 3'b110 : 3'b111; dat = (k == 3) ? 10'b0001101110 : 10'($urandom);
      pay = {8'(typ), 8'h00, dat[7:0], 8'(dat[9:8]), 8'h00, 8'h00, "M", "K", "3", "-", "V", "2", ".", "0"};
      e = pad60(udp_frame(dmac, smac, sip, dip, 16'h0, 16'd32767, 16'd32767, pay));
      run_frame(f);
      check(f == e, $sformatf("response %0d (%0d bytes)", k, f.size()));
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
