// sha1_ref_pkg: reference SHA-1 for the testbenches, written as plain
// behavioural code with 32-bit '+' wrap-around, independent of the RTL.
// Messages are given as bit queues, first message bit at index 0.
package sha1_ref_pkg;

  typedef bit [31:0] u32;
  typedef bit msg_q[$];

  function automatic u32 rl(u32 x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic u32 ref_f(int t, u32 b, u32 c, u32 d);
    if (t < 20) return (b & c) | (~b & d);
    if (t < 40) return b ^ c ^ d;
    if (t < 60) return (b & c) ^ (b & d) ^ (c & d);
    return b ^ c ^ d;
  endfunction

  function automatic u32 ref_k(int t);
    case (t / 20)
      0: return 32'h5A827999;
      1: return 32'h6ED9EBA1;
      2: return 32'h8F1BBCDC;
      default: return 32'hCA62C1D6;
    endcase
  endfunction

  // Schedule word t (0..79) of a block.
  function automatic u32 ref_w(bit [511:0] blk, int t);
    u32 w[80];
    for (int i = 0; i < 16; i++) w[i] = blk[511 - 32*i -: 32];
    for (int i = 16; i < 80; i++) w[i] = rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    return w[t];
  endfunction

  // One round on the state {a,b,c,d,e}.
  function automatic bit [159:0] ref_round(bit [159:0] st, u32 w, int t);
    u32 a, b, c, d, e, tmp;
    {a, b, c, d, e} = st;
    tmp = rl(a, 5) + ref_f(t, b, c, d) + e + ref_k(t) + w;
    return {tmp, a, rl(b, 30), c, d};
  endfunction

  function automatic bit [159:0] ref_compress(bit [159:0] h, bit [511:0] blk);
    bit [159:0] st = h;
    for (int t = 0; t < 80; t++) st = ref_round(st, ref_w(blk, t), t);
    return {h[159:128] + st[159:128], h[127:96] + st[127:96], h[95:64] + st[95:64],
            h[63:32] + st[63:32], h[31:0] + st[31:0]};
  endfunction

  // Padded message as a bit queue (length a multiple of 512).
  function automatic msg_q ref_pad(msg_q m);
    msg_q p = m;
    longint unsigned len = longint'(m.size());
    p.push_back(1'b1);
    while (p.size() % 512 != 448) p.push_back(1'b0);
    for (int i = 63; i >= 0; i--) p.push_back(len[i]);
    return p;
  endfunction

  function automatic bit [159:0] ref_sha1(msg_q m);
    msg_q p = ref_pad(m);
    bit [159:0] h = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;
    for (int b = 0; b < p.size() / 512; b++) begin
      bit [511:0] blk;
      for (int i = 0; i < 512; i++) blk[511 - i] = p[512*b + i];
      h = ref_compress(h, blk);
    end
    return h;
  endfunction

  function automatic msg_q from_string(string s);
    msg_q m;
    for (int i = 0; i < s.len(); i++)
      for (int j = 7; j >= 0; j--) m.push_back(s[i][j]);
    return m;
  endfunction

endpackage
