// tb_crc32: checks that crc32 passes frames through with one strobe of
// latency and appends the correct Ethernet FCS, least significant byte
// first. Uses the "123456789" check value 0xCBF43926 and random frames of
// random length, back to back with gaps of one to five strobes.
// The FCS follows IEEE 802.3 as the documentation asks; the one-strobe
// latency checked is this design's own choice.
module tb_crc32;
  import tb_util_pkg::*;
  logic clk = 0, ce = 0, reset = 1;
  logic en_in = 0; logic [7:0] d_in = 0;
  logic en_out; logic [7:0] d_out;
  int checks = 0, failures = 0;

  crc32 dut (.clk_crc32(clk), .ce(ce), .reset(reset), .en_data_crc32_in(en_in),
             .data_crc32_in(d_in), .en_data_crc32_out(en_out), .data_crc32_out(d_out));

  always #20 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  byteq_t got[$];
  byteq_t cur;
  logic en_out_d = 0;
  int   first_in_strobe = -1, first_out_strobe = -1, strobe = 0;
  always @(posedge clk) if (ce && !reset) begin
    strobe++;
    if (en_out) cur.push_back(d_out);
    if (en_out && first_out_strobe < 0) first_out_strobe = strobe;
    if (!en_out && en_out_d) begin got.push_back(cur); cur = {}; end
    en_out_d <= en_out;
  end

  task automatic send(input byteq_t q);
    foreach (q[i]) begin
      @(negedge clk); while (!ce) @(negedge clk);
      en_in = 1; d_in = q[i];
      if (first_in_strobe < 0) first_in_strobe = strobe + 1;
      @(negedge clk);
    end
    @(negedge clk); while (!ce) @(negedge clk);
    en_in = 0;
    @(negedge clk);
  endtask

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    byteq_t sent[$];
    byteq_t q;
    repeat (4) @(posedge clk);
    reset = 0;
    q = {"1","2","3","4","5","6","7","8","9"};
    sent.push_back(q);
    send(q);
    repeat (10) @(posedge clk);
    for (int f = 0; f < 20; f++) begin
      q = {};
      repeat ($urandom_range(1, 80)) q.push_back(8'($urandom));
      sent.push_back(q);
      send(q);
      repeat (2 * (4 + $urandom_range(1, 5))) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(fcs(sent[0]) == 32'hCBF43926, "reference CRC of 123456789");
    check(got.size() == sent.size(), $sformatf("frame count %0d vs %0d", got.size(), sent.size()));
    check(first_out_strobe == first_in_strobe + 1, "one strobe of latency");
    foreach (sent[f]) if (f < got.size()) begin
      logic [31:0] c;
      byteq_t e;
      c = fcs(sent[f]);
      e = sent[f];
      e.push_back(c[7:0]); e.push_back(c[15:8]); e.push_back(c[23:16]); e.push_back(c[31:24]);
      check(got[f] == e, $sformatf("frame %0d contents with FCS", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
