// tb_pkg: reference functions shared by the BlueCache testbenches: the two
// key hashes written as plain byte loops, and builders for memcached
// binary-protocol request packets as 64-bit words (byte 0 in [63:56],
// packets padded to whole words).
//
// Own helper: reference hash functions and packet builders, written
// independently of the RTL.
package tb_pkg;
  typedef byte unsigned bytes_t[$];
  typedef logic [63:0]  words_t[$];

  function automatic logic [31:0] ref_jhash(bytes_t k);
    logic [31:0] h = 0;
    foreach (k[i]) begin
      h = h + 32'(k[i]);
      h = h + (h << 10);
      h = h ^ (h >> 6);
    end
    h = h + (h << 3);
    h = h ^ (h >> 11);
    h = h + (h << 15);
    return h;
  endfunction

  function automatic logic [26:0] ref_hkey(bytes_t k);
    logic [31:0] h = 32'h811c9dc5;
    foreach (k[i]) h = (h ^ 32'(k[i])) * 32'h01000193;
    return h[26:0];
  endfunction

  function automatic bytes_t make_key(int id, int len);
    bytes_t k;
    for (int i = 0; i < len; i++) k.push_back(8'((id * 7 + i * 13 + (id >> 3)) ^ (i == 0 ? id : 0)));
    k[0] = 8'(id); if (len > 1) k[1] = 8'(id >> 8);
    return k;
  endfunction

  function automatic bytes_t make_val(int id, int len);
    bytes_t v;
    for (int i = 0; i < len; i++) v.push_back(8'(id + i * 3));
    return v;
  endfunction

  function automatic words_t pack_bytes(bytes_t b);
    words_t w;
    logic [63:0] cur = 0;
    foreach (b[i]) begin
      cur[63 - 8*(i%8) -: 8] = b[i];
      if (i % 8 == 7) begin w.push_back(cur); cur = 0; end
    end
    if (b.size() % 8 != 0) w.push_back(cur);
    return w;
  endfunction

  // op: 0 GET, 1 SET, 4 DELETE
  function automatic words_t build_req(byte unsigned op, bytes_t key, bytes_t val, logic [31:0] opaque);
    bytes_t b;
    int ext = (op == 8'h01) ? 8 : 0;
    int body = ext + key.size() + ((op == 8'h01) ? val.size() : 0);
    b.push_back(8'h80); b.push_back(op);
    b.push_back(8'(key.size() >> 8)); b.push_back(8'(key.size()));
    b.push_back(8'(ext)); b.push_back(0); b.push_back(0); b.push_back(0);
    for (int i = 3; i >= 0; i--) b.push_back(8'(body >> (8*i)));
    for (int i = 3; i >= 0; i--) b.push_back(8'(opaque >> (8*i)));
    for (int i = 0; i < 8; i++) b.push_back(0);
    for (int i = 0; i < ext; i++) b.push_back(0);
    foreach (key[i]) b.push_back(key[i]);
    if (op == 8'h01) foreach (val[i]) b.push_back(val[i]);
    return pack_bytes(b);
  endfunction
endpackage
