// tb_pkt_pkg: frame construction helpers shared by the testbenches.
//
// Builds Ethernet II frames carrying IPv4/UDP or ARP, byte by byte, with the
// IPv4 header checksum, the UDP checksum (pseudo header included) and the
// Ethernet FCS computed here by plain byte-serial reference code, and cuts a
// frame into the 32-bit stream words the processor receives (first byte in
// bits 31:24, sof on the first word, eof and a byte count on the last).
package tb_pkt_pkg;
  import pp_pkg::*;

  typedef byte unsigned bytes_t[$];

  function automatic logic [31:0] ref_crc32(bytes_t b);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      c ^= {24'h0, b[i]};
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  // Ones-complement sum of big-endian 16-bit words, odd byte padded.
  function automatic logic [15:0] ref_csum(bytes_t b);
    int unsigned s = 0;
    for (int i = 0; i < b.size(); i += 2)
      s += 32'({b[i], (i + 1 < b.size()) ? b[i+1] : 8'h00});
    while ((s >> 16) != 0) s = (s & 32'hFFFF) + (s >> 16);
    return 16'(s);
  endfunction

  function automatic void put16(ref bytes_t b, input logic [15:0] v);
    b.push_back(v[15:8]); b.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bytes_t b, input logic [31:0] v);
    put16(b, v[31:16]); put16(b, v[15:0]);
  endfunction

  // IPv4 header (IHL 5) + UDP with a payload of `plen` bytes.
  function automatic bytes_t ip_udp(logic [31:0] src, logic [31:0] dst,
                                    logic [7:0] proto, logic [15:0] dport,
                                    bytes_t pay, bit bad_ip, bit bad_udp,
                                    bit zero_udp);
    bytes_t ip, udp, ph;
    logic [15:0] ulen, c;
    ulen = 16'(8 + pay.size());
    put16(udp, 16'd4000); put16(udp, dport); put16(udp, ulen); put16(udp, 16'h0);
    foreach (pay[i]) udp.push_back(pay[i]);
    put32(ph, src); put32(ph, dst); put16(ph, {8'h0, proto}); put16(ph, ulen);
    foreach (udp[i]) ph.push_back(udp[i]);
    c = ~ref_csum(ph);
    if (c == 16'h0) c = 16'hFFFF;
    if (zero_udp) c = 16'h0;
    else if (bad_udp) c ^= 16'h0101;
    udp[6] = c[15:8]; udp[7] = c[7:0];
    put16(ip, 16'h4500); put16(ip, 16'(20 + udp.size())); put16(ip, 16'h1234);
    put16(ip, 16'h4000); put16(ip, {8'd64, proto}); put16(ip, 16'h0);
    put32(ip, src); put32(ip, dst);
    c = ~ref_csum(ip);
    if (bad_ip) c ^= 16'h0010;
    ip[10] = c[15:8]; ip[11] = c[7:0];
    foreach (udp[i]) ip.push_back(udp[i]);
    return ip;
  endfunction

  // Ethernet II frame with padding to 60 bytes and FCS appended.
  function automatic bytes_t eth(logic [47:0] dst, logic [15:0] etype,
                                 bytes_t pay, bit bad_crc);
    bytes_t f;
    logic [31:0] fcs;
    put32(f, dst[47:16]); put16(f, dst[15:0]);
    put32(f, 32'h0010_a4e3); put16(f, 16'h5501);
    put16(f, etype);
    foreach (pay[i]) f.push_back(pay[i]);
    while (f.size() < 60) f.push_back(8'h00);
    fcs = ref_crc32(f);
    if (bad_crc) fcs ^= 32'h8000_0000;
    f.push_back(fcs[7:0]);   f.push_back(fcs[15:8]);
    f.push_back(fcs[23:16]); f.push_back(fcs[31:24]);
    return f;
  endfunction

  function automatic word_t frame_word(bytes_t f, int w);
    word_t r = WORD_IDLE;
    int n = f.size() - 4 * w;
    r.valid  = 1'b1;
    r.sof    = (w == 0);
    r.eof    = (n <= 4);
    r.nbytes = (n >= 4) ? 3'd4 : 3'(n);
    for (int k = 0; k < 4; k++)
      r.data[31-8*k -: 8] = (k < n) ? f[4*w+k] : 8'h00;
    return r;
  endfunction

  function automatic int n_words(bytes_t f);
    return (f.size() + 3) / 4;
  endfunction

  function automatic bytes_t rand_bytes(int n);
    bytes_t b;
    repeat (n) b.push_back(8'($urandom));
    return b;
  endfunction
endpackage
