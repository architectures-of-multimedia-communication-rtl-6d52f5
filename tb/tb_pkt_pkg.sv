// tb_pkt_pkg: packet builders and reference check-sequence models shared by
// the testbenches.  The models work on whole byte queues, bit by bit and word
// by word, independently of the per-byte RTL functions.
//
// Packet layouts follow the IPv4, TCP, UDP and ST-II header formats; the
// payload pattern is arbitrary.
package tb_pkt_pkg;
  typedef byte unsigned bq_t[$];

  // IPv4 header (IHL words) followed by a TCP (20-byte) or UDP (8-byte)
  // header and the payload.  Checksum fields are left zero.
  function automatic bq_t ip_packet(input int ihl, input byte unsigned proto,
                                    input int unsigned src, input int unsigned dst,
                                    input shortint unsigned sport, input shortint unsigned dport,
                                    input int payload_len, input int seed);
    bq_t p;
    int l4len, total;
    l4len = (proto == 6) ? 20 : 8;
    total = ihl * 4 + l4len + payload_len;
    p.push_back(8'h40 | byte'(ihl));
    p.push_back(8'h00);
    p.push_back(byte'(total >> 8)); p.push_back(byte'(total));
    p.push_back(8'h12); p.push_back(8'h34); p.push_back(8'h40); p.push_back(8'h00);
    p.push_back(8'd64); p.push_back(proto); p.push_back(8'h00); p.push_back(8'h00);
    for (int i = 3; i >= 0; i--) p.push_back(byte'(src >> (8 * i)));
    for (int i = 3; i >= 0; i--) p.push_back(byte'(dst >> (8 * i)));
    for (int i = 20; i < ihl * 4; i++) p.push_back(8'h01);          // options (NOP)
    p.push_back(byte'(sport >> 8)); p.push_back(byte'(sport));
    p.push_back(byte'(dport >> 8)); p.push_back(byte'(dport));
    for (int i = 4; i < l4len; i++) p.push_back((proto == 6 && i == 12) ? 8'h50 : 8'h00);
    for (int i = 0; i < payload_len; i++) p.push_back(byte'(seed * 31 + i * 7 + (i >> 3)));
    return p;
  endfunction

  // ST-II data packet: 8-byte header {ST=5,ver}, flags, length, HID, checksum.
  function automatic bq_t st2_packet(input shortint unsigned hid, input int payload_len,
                                     input int seed);
    bq_t p;
    int total;
    total = 8 + payload_len;
    p.push_back(8'h52); p.push_back(8'h00);
    p.push_back(byte'(total >> 8)); p.push_back(byte'(total));
    p.push_back(byte'(hid >> 8)); p.push_back(byte'(hid));
    p.push_back(8'h00); p.push_back(8'h00);
    for (int i = 0; i < payload_len; i++) p.push_back(byte'(seed * 13 + i * 3));
    return p;
  endfunction

  // first n bytes of p
  function automatic bq_t head(input bq_t p, input int n);
    bq_t r;
    for (int i = 0; i < n && i < p.size(); i++) r.push_back(p[i]);
    return r;
  endfunction

  // 16-bit one's-complement sum of p[start..end], 16-bit words, odd tail padded.
  function automatic shortint unsigned inet_sum(input bq_t p, input int start);
    int unsigned s = 0;
    for (int i = start; i < p.size(); i += 2) begin
      int unsigned w;
      w = {16'h0, p[i], 8'h00};
      if (i + 1 < p.size()) w = w | p[i + 1];
      s = s + w;
    end
    while (s >> 16) s = (s & 32'hFFFF) + (s >> 16);
    return shortint'(s);
  endfunction

  // CRC-32, MSB first, polynomial 04C11DB7, initial all ones, no final
  // inversion, over p[start..stop-1], processed as one long bit string.
  function automatic int unsigned crc32(input bq_t p, input int start, input int stop);
    int unsigned r = 32'hFFFF_FFFF;
    for (int i = start; i < stop; i++)
      for (int b = 7; b >= 0; b--) begin
        bit fb;
        fb = r[31] ^ p[i][b];
        r = r << 1;
        if (fb) r = r ^ 32'h04C1_1DB7;
      end
    return r;
  endfunction
endpackage
