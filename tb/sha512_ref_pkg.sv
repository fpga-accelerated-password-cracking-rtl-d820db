// sha512_ref_pkg: behavioural reference models used by the testbenches.
// sha512_ref() is a plain software SHA-512 of a byte queue (FIPS 180-4),
// sha512crypt_ref() the sha512crypt algorithm on top of it, returning the
// raw 64-byte result (byte 0 in bits [511:504]), and sha512crypt_cycles()
// the expected cycle count of the core's sequencer. The models are written straight
// from the algorithms' definitions, independently of the RTL's structure,
// and the testbenches check them against published/known digests first.
package sha512_ref_pkg;

  typedef byte unsigned bq_t [$];

  function automatic logic [63:0] r_rotr(logic [63:0] x, int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic logic [511:0] sha512_ref(bq_t msg);
    logic [63:0] kc [80];
    logic [63:0] h [8];
    logic [63:0] w [80];
    logic [63:0] a, b, c, d, e, f, g, hh, t1, t2;
    bq_t m;
    longint unsigned bitlen;
    logic [511:0] out;
    kc = sha512_pkg::K;
    h  = sha512_pkg::IV;
    m = msg;
    bitlen = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while ((m.size() % 128) != 112) m.push_back(8'h00);
    for (int i = 0; i < 8; i++) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(8'(bitlen >> (8 * i)));
    for (int blk = 0; blk < m.size() / 128; blk++) begin
      for (int t = 0; t < 16; t++) begin
        w[t] = '0;
        for (int b8 = 0; b8 < 8; b8++) w[t] = {w[t][55:0], m[blk*128 + t*8 + b8]};
      end
      for (int t = 16; t < 80; t++)
        w[t] = (r_rotr(w[t-2], 19) ^ r_rotr(w[t-2], 61) ^ (w[t-2] >> 6)) + w[t-7] +
               (r_rotr(w[t-15], 1) ^ r_rotr(w[t-15], 8) ^ (w[t-15] >> 7)) + w[t-16];
      a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4]; f = h[5]; g = h[6]; hh = h[7];
      for (int t = 0; t < 80; t++) begin
        t1 = hh + (r_rotr(e, 14) ^ r_rotr(e, 18) ^ r_rotr(e, 41)) + ((e & f) ^ (~e & g)) + kc[t] + w[t];
        t2 = (r_rotr(a, 28) ^ r_rotr(a, 34) ^ r_rotr(a, 39)) + ((a & b) ^ (a & c) ^ (b & c));
        hh = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e; h[5] += f; h[6] += g; h[7] += hh;
    end
    for (int i = 0; i < 8; i++) out[511 - 64*i -: 64] = h[i];
    return out;
  endfunction

  function automatic bq_t dig_bytes(logic [511:0] d, int n);
    bq_t q;
    for (int i = 0; i < n; i++) q.push_back(d[511 - 8*i -: 8]);
    return q;
  endfunction

  function automatic logic [511:0] sha512crypt_ref(bq_t p, bq_t s, int rounds);
    logic [511:0] db, da, ddp, dds, dc;
    bq_t m, pseq, sseq;
    int cnt;
    db = sha512_ref({p, s, p});
    m = {p, s, dig_bytes(db, p.size())};
    for (cnt = p.size(); cnt > 0; cnt >>= 1)
      if ((cnt & 1) != 0) m = {m, dig_bytes(db, 64)};
      else         m = {m, p};
    da = sha512_ref(m);
    m = {};
    for (int i = 0; i < p.size(); i++) m = {m, p};
    ddp = sha512_ref(m);
    pseq = dig_bytes(ddp, p.size());
    m = {};
    for (int i = 0; i < 16 + int'(da[511:504]); i++) m = {m, s};
    dds = sha512_ref(m);
    sseq = dig_bytes(dds, s.size());
    dc = da;
    for (int i = 0; i < rounds; i++) begin
      m = ((i & 1) != 0) ? pseq : dig_bytes(dc, 64);
      if (i % 3 != 0) m = {m, sseq};
      if (i % 7 != 0) m = {m, pseq};
      m = ((i & 1) != 0) ? {m, dig_bytes(dc, 64)} : {m, pseq};
      dc = sha512_ref(m);
    end
    return dc;
  endfunction

  // Cycle count of one sha512crypt_core hash, counting the start cycle as
  // cycle 1, for a non-empty password and salt: per SHA-512 one cycle per
  // message byte and per empty segment, 100 per block and 4 of hand-over.
  function automatic int sha_cycles(int len, int empties);
    return len + empties + 100 * ((len + 17 + 127) / 128) + 4;
  endfunction

  function automatic int sha512crypt_cycles(int p, int s, int a0, int r);
    int c, alen, rl;
    c = 1;
    c += sha_cycles(2 * p + s, 0);
    alen = 2 * p + s;
    for (int cnt = p; cnt > 0; cnt >>= 1) alen += ((cnt & 1) != 0) ? 64 : p;
    c += sha_cycles(alen, 0);
    c += sha_cycles(p * p, 0);
    c += sha_cycles(s * (16 + a0), 0);
    for (int i = 0; i < r; i++) begin
      rl = 64 + p + ((i % 3 != 0) ? s : 0) + ((i % 7 != 0) ? p : 0);
      c += sha_cycles(rl, int'(i % 3 == 0) + int'(i % 7 == 0));
    end
    return c;
  endfunction

  function automatic bq_t str_bytes(string s);
    bq_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

endpackage
