// ripemd160_final_add - registered final addition of RIPEMD-160 and
// conversion of the result to the digest byte string.
//
// When in_valid is high at a clock edge, it registers the new chaining value
//   H0' = H1 + C + D',  H1' = H2 + D + E',  H2' = H3 + E + A',
//   H3' = H4 + A + B',  H4' = H0 + B + C'
// (all from the old H) and raises out_valid for one cycle. digest is the
// same five words written out as bytes, each word little-endian, H0 first
// (byte 0 in [159:152]). Latency: one clock. Registering the output is part
// of the described design; the reset (synchronous, active low, clears only
// out_valid) is this design's choice.
module ripemd160_final_add
  import ripemd160_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  hash_t          h_in,
  input  state_t         st,
  output logic           out_valid,
  output hash_t          h_out,
  output logic [159:0]   digest
);

  hash_t sum;

  always_comb begin
    sum[0] = h_in[1] + st.l.c + st.r.d;
    sum[1] = h_in[2] + st.l.d + st.r.e;
    sum[2] = h_in[3] + st.l.e + st.r.a;
    sum[3] = h_in[4] + st.l.a + st.r.b;
    sum[4] = h_in[0] + st.l.b + st.r.c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) h_out <= sum;
  end

  assign digest = words_to_digest(h_out);

endmodule
