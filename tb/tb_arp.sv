// tb_arp: checks the ARP reply generator: Ethernet header to the requester, hardware/protocol types, opcode 2, sender = the array, target = the requester, zero padding to 60 bytes.
// A frame is started, the grant is given after a random delay, the bytes
// presented with the enable on each strobe are collected and compared with
// a frame the testbench builds on its own. The testbench also checks that
// the request rises with start and falls after the last byte, that the
// frame is contiguous, that no byte appears before the grant and that a
// start while busy is ignored.
// The expected frame follows standard ARP as the documentation asks; the
// addresses used are the test's own.
module tb_arp;
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

  logic [47:0] smac, dmac; logic [31:0] sip, dip;
  arp dut (.clk_arp(clk), .ce(ce), .reset(reset), .start_arp(start), .select_arp_frame(sel),
           .source_mac(smac), .destination_mac(dmac), .source_ip(sip), .destination_ip(dip),
           .buzzy(buzzy), .req_arp_frame(req), .en_data_arp_out(en), .data_arp_out(data));

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
    for (int k = 0; k < 4; k++) begin
      automatic byteq_t f, e;
      smac = {$urandom, $urandom}; dmac = {$urandom, $urandom}; sip = $urandom; dip = $urandom;
      push48(e, dmac); push48(e, smac); push16(e, 16'h0806);
      push16(e, 16'd1); push16(e, 16'h0800); e.push_back(8'd6); e.push_back(8'd4); push16(e, 16'd2);
      push48(e, smac); push32(e, sip); push48(e, dmac); push32(e, dip);
      e = pad60(e);
      fork
        run_frame(f);
        begin repeat (30) @(negedge clk); sip = ~sip; start = 1; @(negedge clk); start = 0; end
      join
      check(f == e, $sformatf("ARP reply %0d (%0d bytes)", k, f.size()));
      if (buzzy) begin sel = 1; while (req) @(negedge clk); sel = 0; end
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
