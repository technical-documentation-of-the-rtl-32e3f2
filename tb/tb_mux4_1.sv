// tb_mux4_1: four scripted requesters compete for the transmit path. The
// testbench checks that no grant is given while tx_frame_ready is low, that
// the lowest-numbered pending request wins, that at most one select is high,
// that the grant is held until the request falls and that the selected
// data and enable appear unchanged on the output; then 40 random sets of
// simultaneous requests are served, lowest number first.
// The request/select handshake follows the documentation; the fixed
// priority checked is this design's own choice.
module tb_mux4_1;
  logic clk = 0, ce = 0, reset = 1, ready = 0;
  logic [3:0] req = 0, en = 0;
  logic [7:0] d [4];
  logic s0, s1, s2, s3, en_out; logic [7:0] d_out;
  int checks = 0, failures = 0;

  mux4_1 dut (.clk_mux(clk), .ce(ce), .reset(reset), .tx_frame_ready(ready),
    .req_in_0(req[0]), .en_d_in_0(en[0]), .req_in_1(req[1]), .en_d_in_1(en[1]),
    .req_in_2(req[2]), .en_d_in_2(en[2]), .req_in_3(req[3]), .en_d_in_3(en[3]),
    .d_in_0(d[0]), .d_in_1(d[1]), .d_in_2(d[2]), .d_in_3(d[3]),
    .select_0(s0), .select_1(s1), .select_2(s2), .select_3(s3),
    .en_data_mux_out(en_out), .data_mux_out(d_out));

  always #20 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] sel;
  assign sel = {s3, s2, s1, s0};
  always @(negedge clk) if (!reset) begin
    for (int i = 0; i < 4; i++) d[i] = 8'($urandom);
    en = 4'($urandom);
    #1;
    if (sel != 0) begin
      int g;
      g = (sel == 4'b0001) ? 0 : (sel == 4'b0010) ? 1 : (sel == 4'b0100) ? 2 : 3;
      check(d_out == d[g] && en_out == en[g], "selected data passes through");
    end else check(en_out == 0, "no enable without a grant");
    check($onehot0(sel), "at most one select");
  end

  task automatic wait_grant(input logic [3:0] pending, input int exp);
    int n = 0;
    while (sel == 0 && n < 100) begin @(posedge clk); n++; end
    check(sel == 4'(1 << exp), $sformatf("pending %b: grant %b, expected input %0d", pending, sel, exp));
  endtask

  initial begin
    d = '{default: 0};
    repeat (4) @(posedge clk);
    reset = 0;
    // request while the transmitter is busy: no grant
    req = 4'b1000;
    repeat (20) @(posedge clk);
    check(sel == 0, "no grant while tx busy");
    ready = 1;
    wait_grant(4'b1000, 3);
    ready = 0;
    req[1] = 1; req[2] = 1;             // arrive during the frame
    repeat (30) @(posedge clk);
    check(sel == 4'b1000, "grant held while the request stays high");
    req[3] = 0;
    repeat (6) @(posedge clk);
    check(sel == 0, "grant released when the request falls");
    ready = 1;
    wait_grant(4'b0110, 1);
    req[1] = 0;
    repeat (6) @(posedge clk);
    wait_grant(4'b0100, 2);
    req[0] = 1; req[3] = 1;
    repeat (10) @(posedge clk);
    check(sel == 4'b0100, "no pre-emption");
    req[2] = 0;
    repeat (6) @(posedge clk);
    wait_grant(4'b1001, 0);
    req[0] = 0;
    repeat (6) @(posedge clk);
    wait_grant(4'b1000, 3);
    req[3] = 0;
    repeat (10) @(posedge clk);
    // random contests: requests raised while the transmitter is busy, then
    // served one by one, lowest number first
    for (int r = 0; r < 40; r++) begin
      ready = 0;
      req = 4'($urandom_range(1, 15));
      repeat (4) @(posedge clk);
      ready = 1;
      while (req != 0) begin
        int lo;
        logic [3:0] p;
        p = req;
        lo = p[0] ? 0 : p[1] ? 1 : p[2] ? 2 : 3;
        wait_grant(p, lo);
        req[lo] = 0;
        repeat (6) @(posedge clk);
      end
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
