// tb_tx_frame: feeds byte frames at the half-rate strobe and watches the
// MII side: 15 nibbles 0x5 then 0xD, the frame bytes low nibble first with
// TX_EN held high throughout, at least 24 idle clocks between frames, and
// tx_frame_ready low from the first byte to the end of the gap. Also
// checks the latency from the first input byte to TX_EN.
// Preamble and nibble conversion follow the documentation and IEEE 802.3;
// the gap length and FIFO behaviour checked are this design's own choices.
module tb_tx_frame;
  import tb_util_pkg::*;
  logic clk = 0, ce = 0, reset = 1;
  logic en_in = 0; logic [7:0] d_in = 0;
  logic tx_en; logic [3:0] txd; logic ready;
  int checks = 0, failures = 0;

  tx_frame dut (.clk_tx(clk), .ce(ce), .reset(reset), .en_data_tx_in(en_in), .data_tx_in(d_in),
                .en_data_tx_out(tx_en), .data_tx_out(txd), .tx_frame_ready(ready));

  always #20 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // MII monitor
  logic [3:0] nib[$];
  byteq_t got[$];
  int idle = 100, min_gap = 1000, cyc = 0, first_en_cyc = -1, frames_seen = 0;
  logic en_d = 0;
  always @(posedge clk) if (!reset) begin
    cyc++;
    if (tx_en) begin
      if (!en_d) begin
        frames_seen++;
        if (frames_seen > 1 && idle < min_gap) min_gap = idle;
        if (first_en_cyc < 0) first_en_cyc = cyc;
      end
      nib.push_back(txd);
      idle = 0;
    end else begin
      idle++;
      if (en_d) begin
        byteq_t b;
        bit pre_ok;
        pre_ok = (nib.size() >= 16);
        b = {};
        for (int i = 0; i < 15 && pre_ok; i++) if (nib[i] != 4'h5) pre_ok = 0;
        if (pre_ok && nib[15] != 4'hD) pre_ok = 0;
        check(pre_ok, "preamble and SFD");
        for (int i = 16; i + 1 < nib.size(); i += 2) b.push_back({nib[i+1], nib[i]});
        check(nib.size() % 2 == 0, "whole bytes");
        got.push_back(b);
        nib = {};
      end
    end
    en_d <= tx_en;
  end

  int first_byte_cyc = -1;
  bit ready_bad = 0;
  task automatic send(input byteq_t q);
    foreach (q[i]) begin
      @(negedge clk); while (!ce) @(negedge clk);
      en_in = 1; d_in = q[i];
      if (first_byte_cyc < 0) first_byte_cyc = cyc + 1;
      @(negedge clk);
      if (ready) ready_bad = 1;
    end
    @(negedge clk); while (!ce) @(negedge clk);
    en_in = 0;
  endtask

  initial begin
    byteq_t sent[$];
    repeat (4) @(posedge clk);
    reset = 0;
    @(posedge clk);
    check(ready, "ready after reset");
    for (int f = 0; f < 12; f++) begin
      byteq_t q;
      repeat ($urandom_range(60, 300)) q.push_back(8'($urandom));
      sent.push_back(q);
      while (!ready) @(posedge clk);
      send(q);
    end
    while (!ready) @(posedge clk);
    repeat (10) @(posedge clk);
    check(!ready_bad, "ready low while a frame is in flight");
    check(got.size() == sent.size(), "frame count");
    foreach (sent[f]) if (f < got.size()) check(got[f] == sent[f], $sformatf("frame %0d bytes %0d vs %0d first %h %h", f, got[f].size(), sent[f].size(), got[f][0], sent[f][0]));
    check(min_gap >= 24, $sformatf("inter-frame gap %0d clocks", min_gap));
    check(first_en_cyc - first_byte_cyc <= 3, $sformatf("latency %0d", first_en_cyc - first_byte_cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
