// nf_tb_pkg: helpers shared by the NetFlow testbenches.
//
// Builds Ethernet frames that carry IPv4 or IPv6 packets with a TCP or UDP
// header, appends the Ethernet FCS, and gives reference values computed
// independently of the RTL: the Ethernet CRC-32 (table-free, bit by bit,
// final inversion) and the 64-bit key hash as a polynomial remainder of the
// key times x^64, worked out by long division.
package nf_tb_pkg;
  import nf_pkg::*;

  typedef byte unsigned bytes_t[$];

  function automatic logic [31:0] eth_fcs(bytes_t b);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      for (int k = 0; k < 8; k++) begin
        logic fb = c[0] ^ b[i][k];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB8_8320;
      end
    end
    return ~c;
  endfunction

  // remainder of key(x) * x^64 modulo the CRC-64/ECMA-182 polynomial
  function automatic logic [63:0] ref_hash(flow_key_t k);
    logic [KEY_W+63:0] v;
    logic [64:0]       p;
    p = {1'b1, 64'h42F0E1EBA9EA3693};
    v = {k, 64'h0};
    for (int i = KEY_W + 63; i >= 64; i--) begin
      if (v[i]) v[i -: 65] = v[i -: 65] ^ p;
    end
    return v[63:0];
  endfunction

  // Ethernet frame (destination MAC .. FCS) for one IP packet.
  // payload: number of bytes after the transport header.
  function automatic bytes_t make_frame(flow_key_t k, bit v6, int payload,
                                        byte unsigned tcp_flags);
    bytes_t f;
    int l4len, iplen;
    byte unsigned l4[$];
    logic [31:0] fcs;
    for (int i = 0; i < 6; i++) f.push_back(8'h02);        // dst MAC
    for (int i = 0; i < 6; i++) f.push_back(8'h10 + i);    // src MAC
    l4len = (k.proto == 8'd6) ? 20 : 8;
    // transport header
    l4.push_back(k.src_port[15:8]); l4.push_back(k.src_port[7:0]);
    l4.push_back(k.dst_port[15:8]); l4.push_back(k.dst_port[7:0]);
    if (k.proto == 8'd6) begin
      for (int i = 0; i < 8; i++) l4.push_back(8'h00);     // seq, ack
      l4.push_back(8'h50); l4.push_back(tcp_flags);         // offset, flags
      for (int i = 0; i < 6; i++) l4.push_back(8'h00);
    end else begin
      for (int i = 0; i < 4; i++) l4.push_back(8'h00);
    end
    for (int i = 0; i < payload; i++) l4.push_back(8'(i * 7 + 3));
    if (!v6) begin
      iplen = 20 + l4.size();
      f.push_back(8'h08); f.push_back(8'h00);
      f.push_back(8'h45); f.push_back(k.tos);
      f.push_back(8'(iplen >> 8)); f.push_back(8'(iplen));
      f.push_back(8'h12); f.push_back(8'h34); f.push_back(8'h40); f.push_back(8'h00);
      f.push_back(8'd64); f.push_back(k.proto); f.push_back(8'h00); f.push_back(8'h00);
      for (int i = 3; i >= 0; i--) f.push_back(k.src_ip[8*i +: 8]);
      for (int i = 3; i >= 0; i--) f.push_back(k.dst_ip[8*i +: 8]);
    end else begin
      iplen = l4.size();
      f.push_back(8'h86); f.push_back(8'hDD);
      f.push_back({4'h6, k.tos[7:4]}); f.push_back({k.tos[3:0], 4'h0});
      f.push_back(8'h00); f.push_back(8'h00);
      f.push_back(8'(iplen >> 8)); f.push_back(8'(iplen));
      f.push_back(k.proto); f.push_back(8'd64);
      for (int i = 15; i >= 0; i--) f.push_back(k.src_ip[8*i +: 8]);
      for (int i = 15; i >= 0; i--) f.push_back(k.dst_ip[8*i +: 8]);
    end
    foreach (l4[i]) f.push_back(l4[i]);
    while (f.size() < 60) f.push_back(8'h00);               // Ethernet padding
    fcs = eth_fcs(f);
    for (int i = 0; i < 4; i++) f.push_back(fcs[8*i +: 8]);
    return f;
  endfunction

  // IP byte count the extractor should report for a frame made above
  function automatic int ip_bytes(flow_key_t k, bit v6, int payload);
    int l4len = (k.proto == 8'd6) ? 20 : 8;
    return v6 ? 40 + l4len + payload : 20 + l4len + payload;
  endfunction

  function automatic flow_key_t rand_key(bit v6, int seed);
    flow_key_t k;
    k.src_ip   = v6 ? {$urandom(seed), $urandom(), $urandom(), $urandom()} : 128'($urandom(seed));
    k.dst_ip   = v6 ? {$urandom(), $urandom(), $urandom(), $urandom()} : 128'($urandom());
    k.src_port = 16'($urandom());
    k.dst_port = 16'($urandom());
    k.proto    = ($urandom() & 1) ? 8'd6 : 8'd17;
    k.tos      = 8'($urandom());
    return k;
  endfunction

endpackage
