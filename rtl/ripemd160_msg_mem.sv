// ripemd160_msg_mem - message word memory of the RIPEMD-160 cores.
//
// WORDS x 32-bit register array. When load is high at a rising clock edge
// all words are written at once from wdata (word j in bits [32*j +: 32]).
// NRD read ports return rdata[i] = mem[raddr[i]] combinationally, so the
// words picked by the message-selection tables are ready within the step
// cycle. words shows the whole content, for handing the block on to a
// following pipeline stage. Holding the block in a memory and reading it in table order follows
// the described design; the write width and the asynchronous reads are this
// design's choices.
module ripemd160_msg_mem
  import ripemd160_pkg::*;
#(
  parameter int unsigned WORDS = 16,
  parameter int unsigned NRD   = 2
) (
  input  logic                               clk,
  input  logic                               load,
  input  logic [WORDS-1:0][31:0]             wdata,
  input  logic [NRD-1:0][$clog2(WORDS)-1:0]  raddr,
  output logic [NRD-1:0][31:0]               rdata,
  output logic [WORDS-1:0][31:0]             words
);

  logic [WORDS-1:0][31:0] mem;

  always_ff @(posedge clk) begin
    if (load) mem <= wdata;
  end

  assign words = mem;

  always_comb begin
    for (int i = 0; i < NRD; i++) rdata[i] = mem[raddr[i]];
  end

endmodule
