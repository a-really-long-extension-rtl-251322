// tb_net_pkg: reference models for the testbenches, written independently
// of the RTL. Frames are built byte by byte from the protocol definitions:
// CRC-32 in its reflected (LSB-first) table-free form, the Internet
// checksum, and IPv4 / UDP / Ethernet II framing.
package tb_net_pkg;
  typedef byte unsigned bq_t[$];

  // IEEE CRC-32 of a byte string (reflected, init and xorout all ones)
  function automatic bit [31:0] crc32_ref(bq_t q);
    bit [31:0] c = 32'hFFFF_FFFF;
    foreach (q[i]) begin
      c ^= 32'(q[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  // plain one's complement sum of big-endian 16-bit words (odd byte padded)
  function automatic bit [15:0] ones_sum(bq_t q);
    bit [31:0] s = 0;
    for (int i = 0; i < q.size(); i += 2)
      s += {16'h0, q[i], (i + 1 < q.size()) ? q[i+1] : 8'h00};
    while (s[31:16] != 0) s = {16'h0, s[15:0]} + {16'h0, s[31:16]};
    return s[15:0];
  endfunction

  function automatic void put16(ref bq_t q, input bit [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bq_t q, input bit [31:0] v);
    put16(q, v[31:16]); put16(q, v[15:0]);
  endfunction

  // IPv4 header + UDP header + data. Knobs make malformed packets.
  function automatic bq_t ip_udp(bit [31:0] sip, bit [31:0] dip, bit [15:0] ident,
                                 bq_t data, bit [15:0] sport = 16'd4660,
                                 bit [15:0] dport = 16'd4660, bit df = 1'b1,
                                 bit [7:0] proto = 8'd17, bit [7:0] ver_ihl = 8'h45,
                                 bit bad_csum = 1'b0);
    bq_t h, u, ph;
    bit [15:0] ulen = 16'(8 + data.size());
    bit [15:0] c;
    h.push_back(ver_ihl); h.push_back(8'h00);
    put16(h, 16'(20) + ulen); put16(h, ident);
    h.push_back(df ? 8'h40 : 8'h00); h.push_back(8'h00);
    h.push_back(8'd64); h.push_back(proto);
    put16(h, 16'h0000); put32(h, sip); put32(h, dip);
    c = ~ones_sum(h);
    if (bad_csum) c ^= 16'h0100;
    h[10] = c[15:8]; h[11] = c[7:0];
    // UDP with pseudo-header
    put16(u, sport); put16(u, dport); put16(u, ulen); put16(u, 16'h0000);
    foreach (data[i]) u.push_back(data[i]);
    put32(ph, sip); put32(ph, dip); put16(ph, 16'd17); put16(ph, ulen);
    foreach (u[i]) ph.push_back(u[i]);
    c = ~ones_sum(ph);
    if (c == 16'h0000) c = 16'hFFFF;
    u[6] = c[15:8]; u[7] = c[7:0];
    foreach (u[i]) h.push_back(u[i]);
    return h;
  endfunction

  // Ethernet II frame without preamble: header, payload, zero pad to 60, FCS
  function automatic bq_t eth_frame(bit [47:0] dmac, bit [47:0] smac, bq_t payload);
    bq_t f;
    bit [31:0] c;
    for (int i = 5; i >= 0; i--) f.push_back(dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(smac[8*i +: 8]);
    put16(f, 16'h0800);
    foreach (payload[i]) f.push_back(payload[i]);
    while (f.size() < 60) f.push_back(8'h00);
    c = crc32_ref(f);
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
    return f;
  endfunction

  function automatic bq_t words_to_bytes(bit [15:0] w[$]);
    bq_t q;
    foreach (w[i]) put16(q, w[i]);
    return q;
  endfunction
endpackage
