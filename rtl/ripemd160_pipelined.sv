// ripemd160_pipelined - pipelined RIPEMD-160 compression core.
//
// Five round stages (ripemd160_round_stage, rounds 1..5) are chained; each
// runs the 16 steps of its round on both lines for one block, so up to five
// independent blocks are in flight. The result of round 5 is captured in an
// output register together with the block's chaining value, and the final
// addition (ripemd160_final_add) registers the new chaining value h_out and
// its byte string digest, with a one-cycle out_valid.
//
// Interface: a block (64 bytes, byte 0 in [511:504]) and its chaining value
// h_in are taken when in_valid and in_ready are both high at a clock edge.
// in_ready is high whenever the first stage is idle or in its last step, so
// one block can be accepted every 16 clocks. There is no output back-pressure.
//
// Timing: a block accepted at edge N gives out_valid after edge N+81 (82
// clocks: load, 80 steps, final addition). The five-stage structure, the
// pre-computed W/h words, the register after round 5 and the 82-cycle
// latency follow the described design; the 16-clock hand-over and the
// interface are this design's choices.
module ripemd160_pipelined
  import ripemd160_pkg::*;
#(
  parameter int unsigned ROUNDS = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [511:0] block,
  input  hash_t        h_in,
  output logic         out_valid,
  output hash_t        h_out,
  output logic [159:0] digest
);

  logic   v     [ROUNDS+1];
  logic   can   [ROUNDS];
  state_t s     [ROUNDS+1];
  block_t x     [ROUNDS+1];
  hash_t  h     [ROUNDS+1];

  logic   r5_valid;
  state_t r5_state;
  hash_t  r5_h;

  assign in_ready = can[0];
  assign v[0]     = in_valid && can[0];
  assign s[0]     = '{l: '{h_in[0], h_in[1], h_in[2], h_in[3], h_in[4]},
                      r: '{h_in[0], h_in[1], h_in[2], h_in[3], h_in[4]}};
  assign x[0]     = bytes_to_words(block);
  assign h[0]     = h_in;

  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    ripemd160_round_stage #(.ROUND(r)) u_stage (
      .clk(clk), .rst_n(rst_n),
      .in_valid(v[r]), .in_state(s[r]), .in_x(x[r]), .in_h(h[r]),
      .can_load(can[r]),
      .out_valid(v[r+1]), .out_state(s[r+1]), .out_x(x[r+1]), .out_h(h[r+1])
    );
  end

  // Output register after the last round.
  always_ff @(posedge clk) begin
    if (!rst_n) r5_valid <= 1'b0;
    else        r5_valid <= v[ROUNDS];
    if (v[ROUNDS]) begin
      r5_state <= s[ROUNDS];
      r5_h     <= h[ROUNDS];
    end
  end

  ripemd160_final_add u_final (
    .clk(clk), .rst_n(rst_n), .in_valid(r5_valid), .h_in(r5_h), .st(r5_state),
    .out_valid(out_valid), .h_out(h_out), .digest(digest)
  );

endmodule
