// ripemd160_round_stage - one round (16 steps, both lines) of the pipelined
// RIPEMD-160 core.
//
// The stage for round ROUND (0..4, i.e. round 1..5) owns the working words of
// both lines, the pre-computed words W and h of both lines, a copy of the
// block's 16 message words and the block's chaining value. It is loaded when
// in_valid is high at a clock edge; in_valid must only come while can_load
// is high (checked by an assertion). On loading, the multiplexers take
//   W = X[m(t0)]   + K + A   and   h = X[m(t0+1)] + K + E
// (t0 = 16*ROUND; E is the A of step t0+1). Each following clock performs one
// step of each line with ripemd160_pipe_step and shifts W <- h <- hin, where
// hin is the word for two steps ahead. The function of the stage is fixed:
// f_{ROUND+1} on the left, f_{5-ROUND} on the right.
//
// Timing: 16 clocks per block. During the 16th step out_valid is high and
// out_state carries the result of that step, so the next stage loads on the
// same edge on which this one finishes; can_load is high in that cycle too,
// so a new block can follow every 16 clocks. Splitting the step into a
// pre-computation of M+K+A and a shortened step, and one stage per round,
// follow the described design; the hand-over timing is this design's choice.
module ripemd160_round_stage
  import ripemd160_pkg::*;
#(
  parameter int unsigned ROUND = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  state_t in_state,
  input  block_t in_x,
  input  hash_t  in_h,
  output logic   can_load,
  output logic   out_valid,
  output state_t out_state,
  output block_t out_x,
  output hash_t  out_h
);

  localparam int unsigned T0 = ROUND_LEN * ROUND;
  localparam logic [2:0]  FL = fsel_left(3'(ROUND));
  localparam logic [2:0]  FR = fsel_right(3'(ROUND));
  localparam word_t       KL = K_L[ROUND];
  localparam word_t       KR = K_R[ROUND];

  logic       busy;
  logic [3:0] j;
  state_t     st;
  word_t      w_l, w_r, h_l, h_r, hin_l, hin_r;
  hash_t      hreg;
  logic [6:0] t, t2;
  logic [1:0][3:0]  raddr;
  logic [1:0][31:0] rdata;

  assign can_load  = !busy || (j == 4'd15);
  assign out_valid = busy && (j == 4'd15);
  assign out_h     = hreg;

  // Current step and the step two ahead, kept inside this round.
  always_comb begin
    t  = 7'(T0) + {3'b0, j};
    t2 = (j >= 4'd14) ? 7'(T0 + 15) : t + 7'd2;
  end

  assign raddr = {M_R[t2], M_L[t2]};

  ripemd160_msg_mem #(.WORDS(16), .NRD(2)) u_mem (
    .clk(clk), .load(in_valid), .wdata(in_x),
    .raddr(raddr), .rdata(rdata), .words(out_x)
  );

  ripemd160_pipe_step u_left (
    .st(st.l), .w(w_l), .fsel(FL), .s(S_L[t]), .x2(rdata[0]), .k2(KL),
    .nxt(out_state.l), .hin(hin_l)
  );
  ripemd160_pipe_step u_right (
    .st(st.r), .w(w_r), .fsel(FR), .s(S_R[t]), .x2(rdata[1]), .k2(KR),
    .nxt(out_state.r), .hin(hin_r)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
    end else if (in_valid) begin
      busy <= 1'b1;
    end else if (j == 4'd15) begin
      busy <= 1'b0;
    end
    if (in_valid) begin
      st   <= in_state;
      hreg <= in_h;
      j    <= '0;
      w_l  <= in_x[M_L[T0]]     + KL + in_state.l.a;
      h_l  <= in_x[M_L[T0 + 1]] + KL + in_state.l.e;
      w_r  <= in_x[M_R[T0]]     + KR + in_state.r.a;
      h_r  <= in_x[M_R[T0 + 1]] + KR + in_state.r.e;
    end else if (busy) begin
      st  <= out_state;
      j   <= j + 4'd1;
      w_l <= h_l;
      h_l <= hin_l;
      w_r <= h_r;
      h_r <= hin_r;
    end
  end

`ifndef SYNTHESIS
  a_load_when_free: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> can_load);
`endif

endmodule
