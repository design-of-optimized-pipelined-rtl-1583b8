// ripemd160_f - the five non-linear functions of RIPEMD-160.
//
// Purely combinational. fsel = 1..5 selects
//   f_1 = B ^ C ^ D            (rounds 1 of the left line, 5 of the right)
//   f_2 = (B & C) | (~B & D)
//   f_3 = (B | ~C) ^ D
//   f_4 = (B & D) | (C & ~D)
//   f_5 = B ^ (C | ~D)         (round 5 left, round 1 right)
// The functions are those of the RIPEMD-160 definition. Any other fsel value
// returns f_1; that default is this design's own choice.
module ripemd160_f
  import ripemd160_pkg::*;
(
  input  logic [2:0] fsel,
  input  word_t      b,
  input  word_t      c,
  input  word_t      d,
  output word_t      y
);

  always_comb begin
    unique case (fsel)
      3'd2:    y = (b & c) | (~b & d);
      3'd3:    y = (b | ~c) ^ d;
      3'd4:    y = (b & d) | (c & ~d);
      3'd5:    y = b ^ (c | ~d);
      default: y = b ^ c ^ d;
    endcase
  end

endmodule
