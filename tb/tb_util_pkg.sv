// tb_util_pkg: reference functions shared by the testbenches.
//
// Everything here is computed independently of the design: the Ethernet
// CRC-32 of a byte queue (bitwise, MSB-first on the reversed polynomial
// view), the IPv4 header checksum test, the builder of an Ethernet + IPv4 +
// UDP frame, and the sample pattern produced by the converter model:
// a 24-bit word {line[4:0], channel, frame[9:0], hash[7:0]} so that a
// checker can tell from any sample where and when it was taken.
// Frame formats follow the documentation and the standards it refers to;
// the sample encoding used to identify every sample is the test's own.
package tb_util_pkg;
  typedef logic [7:0] byteq_t[$];

  function automatic logic [31:0] fcs(input byteq_t q);
    logic [31:0] r;
    r = 32'hFFFF_FFFF;
    foreach (q[i])
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = r[0] ^ q[i][b];
        r  = r >> 1;
        if (fb) r = r ^ 32'hEDB8_8320;
      end
    return ~r;
  endfunction

  // one's-complement sum of the 20 header bytes at off must be 0xFFFF
  function automatic bit ip_hdr_ok(input byteq_t q, input int off);
    int unsigned s;
    s = 0;
    for (int i = 0; i < 20; i += 2) s += {q[off+i], q[off+i+1]};
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return s == 32'hFFFF;
  endfunction

  function automatic void push16(ref byteq_t q, input logic [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction
  function automatic void push32(ref byteq_t q, input logic [31:0] v);
    push16(q, v[31:16]); push16(q, v[15:0]);
  endfunction
  function automatic void push48(ref byteq_t q, input logic [47:0] v);
    push16(q, v[47:32]); push32(q, v[31:0]);
  endfunction

  // Ethernet + IPv4 + UDP frame with a correct header checksum, no FCS
  function automatic byteq_t udp_frame(input logic [47:0] dmac, smac, input logic [31:0] sip, dip,
                                       input logic [15:0] ident, sport, dport, input byteq_t pay);
    byteq_t q;
    int unsigned s;
    logic [15:0] ck;
    push48(q, dmac); push48(q, smac); push16(q, 16'h0800);
    q.push_back(8'h45); q.push_back(8'h00); push16(q, 16'(28 + pay.size()));
    push16(q, ident); push16(q, 16'h4000); q.push_back(8'd64); q.push_back(8'd17);
    push16(q, 16'h0000); push32(q, sip); push32(q, dip);
    s = 0;
    for (int i = 14; i < 34; i += 2) s += {q[i], q[i+1]};
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    ck = ~s[15:0];
    q[24] = ck[15:8]; q[25] = ck[7:0];
    push16(q, sport); push16(q, dport); push16(q, 16'(8 + pay.size())); push16(q, 16'h0000);
    foreach (pay[i]) q.push_back(pay[i]);
    return q;
  endfunction

  function automatic byteq_t pad60(input byteq_t q);
    while (q.size() < 60) q.push_back(8'h00);
    return q;
  endfunction

  function automatic logic [7:0] sample_hash(input int line, input int ch, input int n);
    return 8'((line * 37 + ch * 101 + n * 13 + 5) & 8'hFF);
  endfunction
  function automatic logic [23:0] adc_sample(input int line, input int ch, input int n);
    return {5'(line), 1'(ch), 10'(n), sample_hash(line, ch, n)};
  endfunction
endpackage
