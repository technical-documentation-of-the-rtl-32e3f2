// tb_incoming_message: sends MII frames (preamble, SFD, low nibble first)
// on an rx clock unrelated to the read clock and checks that only frames
// with a good FCS, at least 64 bytes and a destination equal to sa or
// broadcast raise recv_packet; that end_addr names the word of the last
// byte n0 the FCS; and that the stored words read back through the
// memory port equal the frame bytes followed by the FCS (big-endian,
// frames longer than 512 bytes truncated).
// Address filtering and the CRC check follow the documentation; accepting
// broadcast and dropping runts are this design's own choices.
module tb_incoming_message;
  import tb_util_pkg::*;
  logic rclk = 0, mclk = 0, reset = 1;
  logic rx_dv = 0; logic [3:0] rxd = 0;
  logic [47:0] sa = 48'h0250_C2AA_5501;
  logic en_mem = 0; logic [7:0] addr_mem = 0; logic [15:0] q_mem;
  logic recv; logic [7:0] end_addr;
  int checks = 0, failures = 0, recv_count = 0;

  incoming_message dut (.reset(reset), .clk_incoming_message_mem(mclk),
    .enable_incoming_message_mem(en_mem), .addr_incoming_message_mem(addr_mem),
    .data_incoming_message_mem(q_mem), .rx_clk(rclk), .rx_dv(rx_dv), .rxd(rxd), .sa(sa),
    .recv_packet(recv), .end_addr(end_addr));

  always #20 rclk = ~rclk;
  always #17 mclk = ~mclk;
  always @(posedge mclk) if (recv) recv_count++;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_mii(input byteq_t q, input bit corrupt);
    logic [31:0] c;
    c = fcs(q);
    if (corrupt) c = c ^ 32'h0000_0100;
    q.push_back(c[7:0]); q.push_back(c[15:8]); q.push_back(c[23:16]); q.push_back(c[31:24]);
    @(negedge rclk);
    rx_dv = 1;
    for (int i = 0; i < 15; i++) begin rxd = 4'h5; @(negedge rclk); end
    rxd = 4'hD; @(negedge rclk);
    foreach (q[i]) begin
      rxd = q[i][3:0]; @(negedge rclk);
      rxd = q[i][7:4]; @(negedge rclk);
    end
    rx_dv = 0; rxd = 0;
    repeat (24) @(negedge rclk);
  endtask

  function automatic byteq_t mk(input logic [47:0] dst, input int n);
    byteq_t q;
    push48(q, dst);
    while (q.size() < n) q.push_back(8'($urandom));
    return q;
  endfunction

  task automatic expect_frame(input byteq_t q, input bit accept, input string name);
    int n0;
    byteq_t qf;
    logic [31:0] c;
    qf = q; c = fcs(q);
    qf.push_back(c[7:0]); qf.push_back(c[15:8]); qf.push_back(c[23:16]); qf.push_back(c[31:24]);
    n0 = recv_count;
    send_mii(q, 0);
    repeat (10) @(posedge mclk);
    check((recv_count - n0) == (accept ? 1 : 0), {name, ": recv_packet"});
    if (accept) begin
      int n, last;
      n = (q.size() > 512) ? 512 : q.size();
      last = (q.size() > 512) ? 255 : (q.size() - 1) / 2;
      check(end_addr == 8'(last), $sformatf("%s: end_addr %0d expected %0d", name, end_addr, last));
      for (int w = 0; w <= last; w++) begin
        logic [15:0] e;
        @(negedge mclk); en_mem = 1; addr_mem = 8'(w);
        @(negedge mclk); en_mem = 0;
        e = {qf[2*w], qf[2*w+1]};
        if (q_mem != e) begin
          check(0, $sformatf("%s: word %0d = %h expected %h", name, w, q_mem, e));
          break;
        end
      end
      checks++;
    end
  endtask

  initial begin
    byteq_t q;
    repeat (6) @(posedge rclk);
    reset = 0;
    repeat (6) @(posedge rclk);
    expect_frame(mk(sa, 100), 1, "unicast 100");
    expect_frame(mk(48'hFFFF_FFFF_FFFF, 64), 1, "broadcast 64");
    expect_frame(mk(sa ^ 48'h1, 100), 0, "other MAC");
    expect_frame(mk(sa, 61), 1, "odd 61");
    expect_frame(mk(sa, 600), 1, "long 600");
    expect_frame(mk(sa, 40), 0, "runt 44");
    begin
      int n0;
      n0 = recv_count;
      send_mii(mk(sa, 100), 1);
      repeat (10) @(posedge mclk);
      check(recv_count == n0, "bad FCS rejected");
    end
    expect_frame(mk(sa, 342), 1, "unicast 342 after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge rclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
