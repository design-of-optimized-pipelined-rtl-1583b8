// ripemd160_pipe_step - one step of one line in the pipelined core, with the
// message/constant addition moved ahead of the step.
//
// Combinational. The word W_t = X[m(t)] + K(t) + A_t has been formed in an
// earlier cycle, so the step itself is only
//   pre-computation:   Z = f(B,C,D) + W
//   final calculation: B <- E + rol_s(Z), A <- E, C <- B, D <- rol_10(C), E <- D
// In parallel it forms the word for two steps ahead,
//   hin = X[m(t+2)] + K(t+2) + A_{t+2},
// where A_{t+2} = E_{t+1} = D_t, so the current D is the third operand.
// hin is delayed twice by the round stage (h, then W) before it is used.
// The A word of st is not read: it is already contained in W. The split into
// pre-computation and final calculation and the early M+K+A addition follow
// the described design; using D as the look-ahead operand is derived from
// A_{t+2} = D_t.
module ripemd160_pipe_step
  import ripemd160_pkg::*;
(
  input  line_t      st,
  input  word_t      w,
  input  logic [2:0] fsel,
  input  logic [3:0] s,
  input  word_t      x2,
  input  word_t      k2,
  output line_t      nxt,
  output word_t      hin
);

  word_t fv, z;

  ripemd160_f u_f (.fsel(fsel), .b(st.b), .c(st.c), .d(st.d), .y(fv));

  always_comb begin
    z     = fv + w;
    nxt.a = st.e;
    nxt.b = st.e + rol(z, {1'b0, s});
    nxt.c = st.b;
    nxt.d = rol(st.c, 5'd10);
    nxt.e = st.d;
    hin   = x2 + k2 + st.d;
  end

endmodule
