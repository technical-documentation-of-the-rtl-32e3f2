// tb_read_incoming_message: places complete frames in a model of the
// receive memory, pulses recv_packet_msg and checks the decoder's reaction:
// BOOTP replies with the right and a wrong transaction id, ARP requests for
// the array's and another address, every control request 01-09 (responses
// with their type and value, mode outputs, old-packet requests and a range
// served one packet per acknowledge, the 'n' error while capture is off),
// a request to another IP address, and a frame ignored while a response is
// still being built.
// The requests and response codes follow the documentation; argument byte
// order and range rules checked are this design's own choices.
module tb_read_incoming_message;
  import tb_util_pkg::*;
  logic clk = 0, reset = 1;
  logic arp_busy = 0, resp_busy = 0, sel_old = 0, recv = 0;
  logic [15:0] mem [256];
  logic [15:0] q;
  logic [7:0]  end_addr = 0;
  logic [31:0] my_ip = 32'h0A00_0002;
  logic [9:0]  array_id = 10'h3CA;
  logic [31:0] xid = 32'h4D4B_3303;
  logic en, req_arp, req_bootp, slave, dbl, capt, req_old, req_resp, prio;
  logic [7:0]  addr;
  logic [31:0] src_ip_arp, bootp_ip, ip_sender;
  logic [10:0] old_num;
  logic [2:0]  rtype;
  logic [9:0]  rdata;
  logic [47:0] mac_sender;
  int checks = 0, failures = 0;

  read_incoming_message dut (.clk_mem_read(clk), .reset(reset), .arp_frame_buzzy(arp_busy),
    .select_request_old_packet(sel_old), .response_request_buzzy(resp_busy),
    .recv_packet_msg(recv), .data_incoming_msg_mem(q), .my_ip(my_ip), .array_id(array_id),
    .id(xid), .end_addr_msg(end_addr), .enable_incoming_msg_mem(en), .req_arp(req_arp),
    .req_bootp(req_bootp), .sync_slave_on(slave), .double_frq_ad(dbl), .start_capture(capt),
    .request_old_packet(req_old), .req_response_request(req_resp), .priority_sender(prio),
    .addr_incoming_msg_mem(addr), .src_ip_arp_req(src_ip_arp), .bootp_ip(bootp_ip),
    .old_numero_packet(old_num), .type_response_request(rtype), .data_request(rdata),
    .ip_sender(ip_sender), .mac_sender(mac_sender));

  always #20 clk = ~clk;
  always @(posedge clk) if (en) q <= mem[addr];

  int n_arp, n_bootp, n_resp, n_prio;
  logic [2:0] last_type; logic [9:0] last_data;
  always @(posedge clk) if (!reset) begin
    if (req_arp) n_arp++;
    if (req_bootp) n_bootp++;
    if (prio) n_prio++;
    if (req_resp) begin n_resp++; last_type = rtype; last_data = rdata; end
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [47:0] HOST_MAC = 48'h00E0_8100_1234;
  localparam logic [31:0] HOST_IP  = 32'h0A00_0001;
  localparam logic [47:0] MY_MAC   = 48'h0250_C200_03CA;

  task automatic deliver(input byteq_t f);
    f = pad60(f);
    f.push_back(8'h11); f.push_back(8'h22); f.push_back(8'h33); f.push_back(8'h44);  // FCS bytes
    foreach (mem[i]) mem[i] = 16'h0;
    for (int i = 0; i < f.size(); i += 2) mem[i/2] = {f[i], (i + 1 < f.size()) ? f[i+1] : 8'h00};
    end_addr = 8'((f.size() - 5) / 2);
    n_arp = 0; n_bootp = 0; n_resp = 0; n_prio = 0;
    @(negedge clk); recv = 1; @(negedge clk); recv = 0;
    repeat (50) @(negedge clk);
  endtask

  task automatic control(input logic [7:0] req_no, input logic [15:0] a1, input int nbytes,
                         input logic [15:0] a2 = 16'h0, input logic [31:0] dst = 32'h0A00_0002);
    byteq_t pay;
    pay = {8'h00, req_no, a1[7:0], a1[15:8]};
    if (nbytes > 4) begin pay.push_back(a2[7:0]); pay.push_back(a2[15:8]); end
    deliver(udp_frame(MY_MAC, HOST_MAC, HOST_IP, dst, 16'h1, 16'd32767, 16'd32767, pay));
  endtask

  task automatic expect_resp(input logic [2:0] t, input logic [9:0] d, input string name);
    check(n_resp == 1 && last_type == t && last_data == d,
          $sformatf("%s: %0d responses, type %b data %h", name, n_resp, last_type, last_data));
  endtask

  task automatic bootp_reply(input logic [31:0] id_v, input logic [31:0] offer);
    byteq_t pay;
    pay = {8'd2, 8'd1, 8'd6, 8'd0};
    push32(pay, id_v); push32(pay, 32'h0); push32(pay, 32'h0); push32(pay, offer);
    while (pay.size() < 300) pay.push_back(8'h00);
    deliver(udp_frame(48'hFFFF_FFFF_FFFF, HOST_MAC, HOST_IP, 32'hFFFF_FFFF, 16'h9, 16'd67, 16'd68, pay));
  endtask

  task automatic arp_request(input logic [31:0] target);
    byteq_t f;
    push48(f, 48'hFFFF_FFFF_FFFF); push48(f, HOST_MAC); push16(f, 16'h0806);
    push16(f, 16'd1); push16(f, 16'h0800); f.push_back(8'd6); f.push_back(8'd4); push16(f, 16'd1);
    push48(f, HOST_MAC); push32(f, HOST_IP); push48(f, 48'h0); push32(f, target);
    deliver(f);
  endtask

  // acknowledge old-packet requests like sram_interface: one cycle, then busy for a while
  logic [10:0] served[$];
  task automatic serve_old(input int max_n);
    for (int i = 0; i < max_n && req_old; i++) begin
      served.push_back(old_num);
      @(negedge clk); sel_old = 1; @(negedge clk); sel_old = 0;
      repeat (10) @(negedge clk);
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    reset = 0;
    repeat (4) @(negedge clk);
    bootp_reply(32'h1234_5678, 32'h0A00_0009);
    check(n_bootp == 0, "BOOTP reply with another id ignored");
    bootp_reply(xid, 32'h0A00_0002);
    check(n_bootp == 1 && bootp_ip == 32'h0A00_0002, "BOOTP reply accepted, offered address");
    arp_request(32'h0A00_0077);
    check(n_arp == 0, "ARP for another address ignored");
    arp_request(my_ip);
    check(n_arp == 1 && src_ip_arp == HOST_IP && mac_sender == HOST_MAC, "ARP request decoded");
    control(8'd2, 16'h0, 4);  expect_resp(3'b010, 10'd0, "02 slave status off");
    control(8'd1, 16'hFFFF, 4);
    check(slave && n_resp == 0, "01 slave mode on");
    control(8'd2, 16'h0, 4);  expect_resp(3'b010, 10'd1, "02 slave status on");
    control(8'd1, 16'h0, 4);
    check(!slave, "01 slave mode off");
    control(8'd3, 16'h0, 4);  expect_resp(3'b011, 10'h3CA, "03 ID");
    control(8'd5, 16'h0, 4);  expect_resp(3'b101, 10'd0, "05 capture status off");
    control(8'd6, 16'h0010, 4); expect_resp(3'b110, 10'b0001101110, "06 while capture off");
    check(!req_old, "no old-packet request while capture off");
    control(8'd9, 16'h0010, 6, 16'h0012); expect_resp(3'b110, 10'b0001101110, "09 while capture off");
    control(8'd4, 16'hFFFF, 4);
    check(capt && n_prio == 1 && ip_sender == HOST_IP && mac_sender == HOST_MAC,
          "04 capture on names the data destination");
    control(8'd5, 16'h0, 4);  expect_resp(3'b101, 10'd1, "05 capture status on");
    control(8'd7, 16'hFFFF, 4);
    check(dbl, "07 double rate on");
    control(8'd8, 16'h0, 4);  expect_resp(3'b111, 10'd1, "08 rate status");
    control(8'd7, 16'h0, 4);
    check(!dbl, "07 double rate off");
    control(8'd6, 16'h0123, 4);
    check(req_old && old_num == 11'h123, "06 old packet request");
    served = {};
    serve_old(5);
    check(served.size() == 1 && !req_old, "06 served once");
    control(8'd9, 16'h07FE, 6, 16'h0801);     // range 2046..2049 -> only low 11 bits: 2046..1
    served = {};
    serve_old(10);
    check(served.size() == 1, "range with end below start served as one packet");
    control(8'd9, 16'h0100, 6, 16'h0104);
    served = {};
    serve_old(10);
    check(served.size() == 5 && served[0] == 11'h100 && served[4] == 11'h104 && !req_old,
          $sformatf("09 range 0x100..0x104 served %0d packets", served.size()));
    control(8'd9, 16'h0200, 4);
    served = {};
    serve_old(10);
    check(served.size() == 1 && served[0] == 11'h200, "09 without end served as one packet");
    control(8'd5, 16'h0, 4, 16'h0, 32'h0A00_0003);
    check(n_resp == 0, "request to another IP ignored");
    resp_busy = 1;
    control(8'd5, 16'h0, 4);
    check(n_resp == 0, "frame ignored while a response is being built");
    resp_busy = 0;
    arp_busy = 1;
    arp_request(my_ip);
    check(n_arp == 0, "frame ignored while an ARP reply is being built");
    arp_busy = 0;
    control(8'd4, 16'h0, 4);
    check(!capt && n_prio == 0, "04 capture off");
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
