// ripemd160_sched - step schedule of RIPEMD-160, addressed by the step
// counter.
//
// Combinational lookup: for step t (0..79) it returns the message-word
// indices m(t), m'(t), the rotation amounts s(t), s'(t), the round constants
// K, K' and the function numbers of both lines (left f_1..f_5 over rounds 1..5,
// right the reverse order). The tables are the RIPEMD-160 ones, held in
// ripemd160_pkg. Step numbers above 79 return the entries of step 79 (own
// choice; the cores never use them).
module ripemd160_sched
  import ripemd160_pkg::*;
(
  input  logic [6:0] t,
  output logic [3:0] m_l,
  output logic [3:0] m_r,
  output logic [3:0] s_l,
  output logic [3:0] s_r,
  output word_t      k_l,
  output word_t      k_r,
  output logic [2:0] f_l,
  output logic [2:0] f_r
);

  logic [6:0] tc;
  logic [2:0] round;

  always_comb begin
    tc    = (t > 7'd79) ? 7'd79 : t;
    round = 3'(tc >> 4);
    m_l   = M_L[tc];
    m_r   = M_R[tc];
    s_l   = S_L[tc];
    s_r   = S_R[tc];
    k_l   = K_L[round];
    k_r   = K_R[round];
    f_l   = fsel_left(round);
    f_r   = fsel_right(round);
  end

endmodule
