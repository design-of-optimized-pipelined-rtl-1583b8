// ripemd160_ref_pkg - software reference of RIPEMD-160 for the testbenches.
//
// A plain, loop-based model written from the RIPEMD-160 definition, with its
// own copy of the tables (stored as one string of hex digits per table), so
// that the testbenches do not check the RTL against itself. It offers the
// single-line step, the whole compression function, message padding and a
// complete hash of a byte string, plus known-answer digests of the
// RIPEMD-160 reference test set.
package ripemd160_ref_pkg;

  typedef logic [31:0] w32;

  // Tables as hex strings, one digit per step (rotations above 9 as hex).
  localparam string RL = {"0123456789abcdef", "74d1a6f3c0952eb8", "3ae49f812706db5c",
                          "19ba08c4d37fe562", "40597c2ae138b6fd"};
  localparam string RR = {"5e7092b4d6f81a3c", "6b370d5aef8c4912", "f5137e69b8c2a04d",
                          "86413bf05c2d97ae", "cfa4158762de039b"};
  localparam string SL = {"befc5879bdef6798", "768db97f7cf9b7dc", "bd67e9dfe8d65c75",
                          "bcefef989e56865c", "9f5b68dc5cdeb856"};
  localparam string SR = {"899bdff5778beec6", "9df7c89b77c76fdb", "97fb866ecd5edd75",
                          "f58bee6e69c9c5f8", "85c9c5e68d65fdbb"};
  localparam w32 KL [5] = '{32'h00000000, 32'h5a827999, 32'h6ed9eba1, 32'h8f1bbcdc, 32'ha953fd4e};
  localparam w32 KR [5] = '{32'h50a28be6, 32'h5c4dd124, 32'h6d703ef3, 32'h7a6d76e9, 32'h00000000};
  localparam w32 H0 [5] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476, 32'hc3d2e1f0};

  function automatic int hexdig(string s, int i);
    byte c = s[i];
    return (c >= "a") ? (c - "a" + 10) : (c - "0");
  endfunction

  function automatic int r_l(int t); return hexdig(RL, t); endfunction
  function automatic int r_r(int t); return hexdig(RR, t); endfunction
  function automatic int s_l(int t); return hexdig(SL, t); endfunction
  function automatic int s_r(int t); return hexdig(SR, t); endfunction
  function automatic w32 k_l(int t); return KL[t / 16]; endfunction
  function automatic w32 k_r(int t); return KR[t / 16]; endfunction

  // Function number j = 1..5.
  function automatic w32 fn(int j, w32 x, w32 y, w32 z);
    case (j)
      1: return x ^ y ^ z;
      2: return (x & y) | (~x & z);
      3: return (x | ~y) ^ z;
      4: return (x & z) | (y & ~z);
      default: return x ^ (y | ~z);
    endcase
  endfunction

  function automatic w32 rotl(w32 x, int n);
    w32 r = x;
    for (int i = 0; i < n; i++) r = {r[30:0], r[31]};
    return r;
  endfunction

  // One step of one line on v = {A,B,C,D,E}; j = function number.
  function automatic void step(ref w32 v [5], input int j, input w32 x, input w32 k, input int s);
    w32 tt;
    tt   = rotl(v[0] + fn(j, v[1], v[2], v[3]) + x + k, s) + v[4];
    v[0] = v[4];
    v[4] = v[3];
    v[3] = rotl(v[2], 10);
    v[2] = v[1];
    v[1] = tt;
  endfunction

  // Run steps t0..t1 of both lines on l and r.
  function automatic void run_steps(ref w32 l [5], ref w32 r [5], input w32 x [16],
                                    input int t0, input int t1);
    for (int t = t0; t <= t1; t++) begin
      step(l, t / 16 + 1, x[r_l(t)], k_l(t), s_l(t));
      step(r, 5 - t / 16, x[r_r(t)], k_r(t), s_r(t));
    end
  endfunction

  function automatic void final_add(ref w32 h [5], input w32 l [5], input w32 r [5]);
    w32 tmp;
    tmp  = h[1] + l[2] + r[3];
    h[1] = h[2] + l[3] + r[4];
    h[2] = h[3] + l[4] + r[0];
    h[3] = h[4] + l[0] + r[1];
    h[4] = h[0] + l[1] + r[2];
    h[0] = tmp;
  endfunction

  function automatic void compress(ref w32 h [5], input w32 x [16]);
    w32 l [5];
    w32 r [5];
    l = h;
    r = h;
    run_steps(l, r, x, 0, 79);
    final_add(h, l, r);
  endfunction

  // 64 bytes, byte 0 first, to a 512-bit bus with byte 0 in [511:504].
  function automatic logic [511:0] pack_block(byte unsigned b [64]);
    logic [511:0] v;
    for (int i = 0; i < 64; i++) v[511 - 8*i -: 8] = b[i];
    return v;
  endfunction

  // Words of a block in little-endian order.
  function automatic void unpack_words(input logic [511:0] v, output w32 x [16]);
    for (int j = 0; j < 16; j++)
      x[j] = {v[511-8*(4*j+3) -: 8], v[511-8*(4*j+2) -: 8], v[511-8*(4*j+1) -: 8], v[511-8*(4*j) -: 8]};
  endfunction

  // Pad a message (string) into 512-bit blocks.
  function automatic void pad(input string msg, output logic [511:0] blocks [$]);
    byte unsigned bytes [$];
    longint unsigned bits;
    byte unsigned b [64];
    for (int i = 0; i < msg.len(); i++) bytes.push_back(msg[i]);
    bits = 64'(msg.len()) * 8;
    bytes.push_back(8'h80);
    while (bytes.size() % 64 != 56) bytes.push_back(8'h00);
    for (int i = 0; i < 8; i++) bytes.push_back(8'(bits >> (8*i)));
    blocks = {};
    for (int n = 0; n < bytes.size() / 64; n++) begin
      for (int i = 0; i < 64; i++) b[i] = bytes[64*n + i];
      blocks.push_back(pack_block(b));
    end
  endfunction

  function automatic logic [159:0] digest_of(input w32 h [5]);
    logic [159:0] d;
    for (int j = 0; j < 5; j++)
      for (int b = 0; b < 4; b++) d[159 - 8*(4*j+b) -: 8] = h[j][8*b +: 8];
    return d;
  endfunction

  function automatic logic [159:0] hash_string(input string msg);
    logic [511:0] blocks [$];
    w32 h [5];
    w32 x [16];
    h = H0;
    pad(msg, blocks);
    foreach (blocks[i]) begin
      unpack_words(blocks[i], x);
      compress(h, x);
    end
    return digest_of(h);
  endfunction

  // Reference test set of RIPEMD-160.
  localparam int NKAT = 6;
  function automatic string kat_msg(int i);
    case (i)
      0: return "";
      1: return "a";
      2: return "abc";
      3: return "message digest";
      4: return "abcdefghijklmnopqrstuvwxyz";
      default: return "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    endcase
  endfunction
  function automatic logic [159:0] kat_digest(int i);
    case (i)
      0: return 160'h9c1185a5c5e9fc54612808977ee8f548b2258d31;
      1: return 160'h0bdc9d2d256b3ee9daae347be6f4dc835a467ffe;
      2: return 160'h8eb208f7e05d987a9b044a8e98c6b087f15a0bfc;
      3: return 160'h5d0689ef49d2fae572b881b123a85ffa21595f36;
      4: return 160'hf71c27109c692c1b56bbdceb5b9d2865b3708dbc;
      default: return 160'h12a053384a9c0c88e405a06c27dcf49ada62eb2b;
    endcase
  endfunction

endpackage
