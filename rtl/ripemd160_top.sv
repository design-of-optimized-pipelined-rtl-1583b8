// ripemd160_top - both RIPEMD-160 compression engines side by side.
//
// pl_*: the pipelined engine (five round stages, one new 512-bit block every
//       16 clocks, up to five independent blocks in flight, 82-clock latency).
// it_*: the iterative engine (one step unit per line reused for 80 steps,
//       one block per 82 clocks).
// Both take a 64-byte block (byte 0 in [511:504]) with its chaining value
// (H0..H4; the RIPEMD-160 initial value for the first block of a message)
// and return the new chaining value and the digest byte string. Message
// padding and the chaining of the blocks of one message are left to the
// user. The two engines share only clock and reset. Both engines are the
// described designs; the port naming and handshake are this design's choice.
module ripemd160_top
  import ripemd160_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // pipelined engine
  input  logic         pl_in_valid,
  output logic         pl_in_ready,
  input  logic [511:0] pl_block,
  input  hash_t        pl_h_in,
  output logic         pl_out_valid,
  output hash_t        pl_h_out,
  output logic [159:0] pl_digest,
  // iterative engine
  input  logic         it_in_valid,
  output logic         it_in_ready,
  input  logic [511:0] it_block,
  input  hash_t        it_h_in,
  output logic         it_out_valid,
  output hash_t        it_h_out,
  output logic [159:0] it_digest
);

  ripemd160_pipelined u_pipelined (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pl_in_valid), .in_ready(pl_in_ready), .block(pl_block), .h_in(pl_h_in),
    .out_valid(pl_out_valid), .h_out(pl_h_out), .digest(pl_digest)
  );

  ripemd160_iterative u_iterative (
    .clk(clk), .rst_n(rst_n),
    .load(it_in_valid), .ready(it_in_ready), .block(it_block), .h_in(it_h_in),
    .out_valid(it_out_valid), .h_out(it_h_out), .digest(it_digest)
  );

endmodule
