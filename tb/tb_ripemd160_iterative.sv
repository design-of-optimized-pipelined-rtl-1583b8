// tb_ripemd160_iterative - hashes the RIPEMD-160 reference test messages
// (padding done here, multi-block messages chained through h_out -> h_in)
// and random blocks with random chaining values, and compares with the
// reference model. Checks the 82-cycle latency, that ready stays low while a
// block is processed, and that a load offered while busy is ignored.
module tb_ripemd160_iterative;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, ready, out_valid;
  logic [511:0] block;
  hash_t h_in, h_out;
  logic [159:0] digest;
  int checks = 0, failures = 0, ignored_loads = 0;

  always #5 clk = ~clk;

  ripemd160_iterative dut (.clk(clk), .rst_n(rst_n), .load(load), .ready(ready),
    .block(block), .h_in(h_in), .out_valid(out_valid), .h_out(h_out), .digest(digest));

  initial begin
    repeat (20000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One block: returns the new chaining value; checks latency and ready.
  task automatic run_block(input logic [511:0] blk, input w32 hin [5], output w32 hout [5]);
    int cyc;
    @(negedge clk);
    while (!ready) @(negedge clk);
    block = blk;
    for (int i = 0; i < 5; i++) h_in[i] = hin[i];
    load = 1;
    @(negedge clk);
    cyc = 1;
    // Offer another load while busy: it must be ignored.
    block = ~blk;
    checks++;
    if (ready) begin failures++; $display("ready high while busy"); end
    else ignored_loads++;
    @(negedge clk);
    load = 0;
    cyc++;
    while (!out_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 82) begin failures++; $display("latency %0d cycles, expected 82", cyc); end
    for (int i = 0; i < 5; i++) hout[i] = h_out[i];
  endtask

  initial begin
    logic [511:0] blocks [$];
    w32 h [5], hn [5], x [16], e [5];
    logic [511:0] blk;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NKAT; m++) begin
      pad(kat_msg(m), blocks);
      h = H0;
      foreach (blocks[i]) begin
        run_block(blocks[i], h, hn);
        h = hn;
      end
      checks++;
      if (digest !== kat_digest(m)) begin
        failures++;
        $display("\"%s\": %h, expected %h", kat_msg(m), digest, kat_digest(m));
      end
    end
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) blk[32*i +: 32] = $urandom;
      for (int i = 0; i < 5; i++) h[i] = $urandom;
      run_block(blk, h, hn);
      unpack_words(blk, x);
      e = h;
      compress(e, x);
      checks++;
      if (hn != e) begin failures++; $display("random block %0d mismatch", n); end
    end
    checks++;
    if (ignored_loads == 0) begin failures++; $display("busy-load case never exercised"); end
    $display("ignored loads while busy: %0d", ignored_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
