// ripemd160_step - one RIPEMD-160 step of one line, as used by the iterative
// core.
//
// Combinational. With the working words A..E, the selected message word M,
// the round constant K, the rotation s and the function number fsel:
//   T = rol_s((A + f(B,C,D)) + (M + K)) + E
//   A <- E, B <- T, C <- B, D <- rol_10(C), E <- D
// The two inner sums are formed side by side and then added, following the
// adder arrangement of the iterative step unit. One instance serves the
// left line and one the right line; they differ only in their inputs.
module ripemd160_step
  import ripemd160_pkg::*;
(
  input  line_t      st,
  input  word_t      x,
  input  word_t      k,
  input  logic [3:0] s,
  input  logic [2:0] fsel,
  output line_t      nxt
);

  word_t fv, af, mk, tv;

  ripemd160_f u_f (.fsel(fsel), .b(st.b), .c(st.c), .d(st.d), .y(fv));

  always_comb begin
    af    = st.a + fv;
    mk    = x + k;
    tv    = rol(af + mk, {1'b0, s}) + st.e;
    nxt.a = st.e;
    nxt.b = tv;
    nxt.c = st.b;
    nxt.d = rol(st.c, 5'd10);
    nxt.e = st.d;
  end

endmodule
