// ripemd160_pkg - types, constants and small functions shared by the
// RIPEMD-160 cores.
//
// RIPEMD-160 runs two parallel lines (left and right) of 80 steps over five
// 32-bit words A..E each. This package holds the state types, the initial
// chaining value, the per-round constants K and K', the message-selection
// tables m and m', the rotation tables s and s', the five non-linear
// functions and the rotate-left helper. All tables are those of the
// RIPEMD-160 specification; they are indexed by the step number t = 0..79.
// Functions are numbered 1..5 (f_1..f_5); rounds are numbered 0..4 here.
package ripemd160_pkg;

  typedef logic [31:0] word_t;

  // Five working words of one line.
  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } line_t;

  // Both lines: l = A..E, r = A'..E'.
  typedef struct packed {
    line_t l;
    line_t r;
  } state_t;

  typedef logic [4:0][31:0]  hash_t;  // H0..H4, H[i] in bits [32*i +: 32]
  typedef logic [15:0][31:0] block_t; // X[0..15], X[j] in bits [32*j +: 32]

  localparam int unsigned NUM_STEPS  = 80;
  localparam int unsigned NUM_ROUNDS = 5;
  localparam int unsigned ROUND_LEN  = 16;

  localparam word_t IV [5] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe,
                               32'h10325476, 32'hc3d2e1f0};

  localparam word_t K_L [5] = '{32'h00000000, 32'h5A827999, 32'h6ED9EBA1,
                                32'h8F1BBCDC, 32'hA953FD4E};
  localparam word_t K_R [5] = '{32'h50A28BE6, 32'h5C4DD124, 32'h6D703EF3,
                                32'h7A6D76E9, 32'h00000000};

  localparam logic [3:0] M_L [80] = '{
    4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd10, 4'd11, 4'd12, 4'd13, 4'd14, 4'd15,
    4'd7, 4'd4, 4'd13, 4'd1, 4'd10, 4'd6, 4'd15, 4'd3, 4'd12, 4'd0, 4'd9, 4'd5, 4'd2, 4'd14, 4'd11, 4'd8,
    4'd3, 4'd10, 4'd14, 4'd4, 4'd9, 4'd15, 4'd8, 4'd1, 4'd2, 4'd7, 4'd0, 4'd6, 4'd13, 4'd11, 4'd5, 4'd12,
    4'd1, 4'd9, 4'd11, 4'd10, 4'd0, 4'd8, 4'd12, 4'd4, 4'd13, 4'd3, 4'd7, 4'd15, 4'd14, 4'd5, 4'd6, 4'd2,
    4'd4, 4'd0, 4'd5, 4'd9, 4'd7, 4'd12, 4'd2, 4'd10, 4'd14, 4'd1, 4'd3, 4'd8, 4'd11, 4'd6, 4'd15, 4'd13};

  localparam logic [3:0] M_R [80] = '{
    4'd5, 4'd14, 4'd7, 4'd0, 4'd9, 4'd2, 4'd11, 4'd4, 4'd13, 4'd6, 4'd15, 4'd8, 4'd1, 4'd10, 4'd3, 4'd12,
    4'd6, 4'd11, 4'd3, 4'd7, 4'd0, 4'd13, 4'd5, 4'd10, 4'd14, 4'd15, 4'd8, 4'd12, 4'd4, 4'd9, 4'd1, 4'd2,
    4'd15, 4'd5, 4'd1, 4'd3, 4'd7, 4'd14, 4'd6, 4'd9, 4'd11, 4'd8, 4'd12, 4'd2, 4'd10, 4'd0, 4'd4, 4'd13,
    4'd8, 4'd6, 4'd4, 4'd1, 4'd3, 4'd11, 4'd15, 4'd0, 4'd5, 4'd12, 4'd2, 4'd13, 4'd9, 4'd7, 4'd10, 4'd14,
    4'd12, 4'd15, 4'd10, 4'd4, 4'd1, 4'd5, 4'd8, 4'd7, 4'd6, 4'd2, 4'd13, 4'd14, 4'd0, 4'd3, 4'd9, 4'd11};

  localparam logic [3:0] S_L [80] = '{
    4'd11, 4'd14, 4'd15, 4'd12, 4'd5, 4'd8, 4'd7, 4'd9, 4'd11, 4'd13, 4'd14, 4'd15, 4'd6, 4'd7, 4'd9, 4'd8,
    4'd7, 4'd6, 4'd8, 4'd13, 4'd11, 4'd9, 4'd7, 4'd15, 4'd7, 4'd12, 4'd15, 4'd9, 4'd11, 4'd7, 4'd13, 4'd12,
    4'd11, 4'd13, 4'd6, 4'd7, 4'd14, 4'd9, 4'd13, 4'd15, 4'd14, 4'd8, 4'd13, 4'd6, 4'd5, 4'd12, 4'd7, 4'd5,
    4'd11, 4'd12, 4'd14, 4'd15, 4'd14, 4'd15, 4'd9, 4'd8, 4'd9, 4'd14, 4'd5, 4'd6, 4'd8, 4'd6, 4'd5, 4'd12,
    4'd9, 4'd15, 4'd5, 4'd11, 4'd6, 4'd8, 4'd13, 4'd12, 4'd5, 4'd12, 4'd13, 4'd14, 4'd11, 4'd8, 4'd5, 4'd6};

  localparam logic [3:0] S_R [80] = '{
    4'd8, 4'd9, 4'd9, 4'd11, 4'd13, 4'd15, 4'd15, 4'd5, 4'd7, 4'd7, 4'd8, 4'd11, 4'd14, 4'd14, 4'd12, 4'd6,
    4'd9, 4'd13, 4'd15, 4'd7, 4'd12, 4'd8, 4'd9, 4'd11, 4'd7, 4'd7, 4'd12, 4'd7, 4'd6, 4'd15, 4'd13, 4'd11,
    4'd9, 4'd7, 4'd15, 4'd11, 4'd8, 4'd6, 4'd6, 4'd14, 4'd12, 4'd13, 4'd5, 4'd14, 4'd13, 4'd13, 4'd7, 4'd5,
    4'd15, 4'd5, 4'd8, 4'd11, 4'd14, 4'd14, 4'd6, 4'd14, 4'd6, 4'd9, 4'd12, 4'd9, 4'd12, 4'd5, 4'd15, 4'd8,
    4'd8, 4'd5, 4'd12, 4'd9, 4'd12, 4'd5, 4'd14, 4'd6, 4'd8, 4'd13, 4'd6, 4'd5, 4'd15, 4'd13, 4'd11, 4'd11};

  // Rotate a word left by n (0..31) positions.
  function automatic word_t rol(input word_t x, input logic [4:0] n);
    return (x << n) | (x >> (6'd32 - {1'b0, n}));
  endfunction

  // Left line uses f_1..f_5 in rounds 0..4, the right line the reverse order.
  function automatic logic [2:0] fsel_left(input logic [2:0] round);
    return round + 3'd1;
  endfunction
  function automatic logic [2:0] fsel_right(input logic [2:0] round);
    return 3'd5 - round;
  endfunction

  // Message byte string (byte 0 in the top bits) to words X[0..15]; each
  // word is read little-endian.
  function automatic block_t bytes_to_words(input logic [511:0] blk);
    block_t x;
    for (int j = 0; j < 16; j++) begin
      for (int b = 0; b < 4; b++) begin
        x[j][8*b +: 8] = blk[511 - 8*(4*j + b) -: 8];
      end
    end
    return x;
  endfunction

  // Chaining words H0..H4 to the digest byte string (byte 0 in [159:152]);
  // each word is written out little-endian.
  function automatic logic [159:0] words_to_digest(input hash_t h);
    logic [159:0] d;
    for (int j = 0; j < 5; j++) begin
      for (int b = 0; b < 4; b++) begin
        d[159 - 8*(4*j + b) -: 8] = h[j][8*b +: 8];
      end
    end
    return d;
  endfunction

endpackage
