// tb_ripemd160_pipelined - streams random blocks (random chaining values)
// into the pipelined core with in_valid held high, so that five blocks are
// in flight at once (plus one in the output registers), and compares every result, in order, with the reference
// model. Checks the 82-cycle latency of each block, the 16-cycle spacing of
// accepted blocks, and that in_ready drops between acceptances. Then hashes
// the reference test messages, chaining multi-block messages.
module tb_ripemd160_pipelined;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  localparam int NBLK = 12;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [511:0] block;
  hash_t h_in, h_out;
  logic [159:0] digest;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ripemd160_pipelined dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .block(block), .h_in(h_in), .out_valid(out_valid), .h_out(h_out), .digest(digest));

  initial begin
    repeat (20000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [511:0] q_blk [$];
  hash_t        q_h [$];
  int           q_t [$];
  int           inflight = 0, max_inflight = 0, last_accept = -1, stalls = 0;

  // Cycles in which all five round stages hold a block.
  int all_busy = 0;
  always @(negedge clk)
    if (dut.g_round[0].u_stage.busy && dut.g_round[1].u_stage.busy && dut.g_round[2].u_stage.busy &&
        dut.g_round[3].u_stage.busy && dut.g_round[4].u_stage.busy) all_busy++;

  // Scoreboard: results come back in order.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      w32 h [5], x [16];
      logic [511:0] b;
      hash_t hh;
      int t0;
      b = q_blk.pop_front();
      hh = q_h.pop_front();
      t0 = q_t.pop_front();
      for (int i = 0; i < 5; i++) h[i] = hh[i];
      unpack_words(b, x);
      compress(h, x);
      checks += 3;
      if (h_out !== {h[4], h[3], h[2], h[1], h[0]}) begin failures++; $display("result mismatch"); end
      if (digest !== digest_of(h)) begin failures++; $display("digest mismatch"); end
      if (cycle - t0 != 82) begin failures++; $display("latency %0d cycles, expected 82", cycle - t0); end
      inflight--;
    end
  end

  // Accept monitor.
  always @(negedge clk) begin
    if (rst_n && in_valid) begin
      if (in_ready) begin
        q_blk.push_back(block);
        q_h.push_back(h_in);
        q_t.push_back(cycle);
        inflight++;
        if (inflight > max_inflight) max_inflight = inflight;
        if (last_accept >= 0 && q_blk.size() > 1) begin
          checks++;
          if (cycle - last_accept != 16) begin
            failures++; $display("accept spacing %0d, expected 16", cycle - last_accept);
          end
        end
        last_accept = cycle;
      end else begin
        stalls++;
      end
    end
  end

  task automatic new_block();
    for (int i = 0; i < 16; i++) block[32*i +: 32] = $urandom;
    for (int i = 0; i < 5; i++) h_in[i] = $urandom;
  endtask

  initial begin
    logic [511:0] blocks [$];
    w32 h [5];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Stream.
    new_block();
    in_valid = 1;
    for (int n = 0; n < NBLK; ) begin
      @(posedge clk);
      if (in_ready) begin
        n++;
        @(negedge clk);
        new_block();
      end else @(negedge clk);
    end
    in_valid = 0;
    last_accept = -1;
    while (inflight > 0) @(negedge clk);
    checks += 2;
    if (all_busy == 0) begin failures++; $display("never had all five round stages busy"); end
    if (max_inflight != 6) begin failures++; $display("max blocks in flight %0d, expected 6", max_inflight); end
    if (stalls == 0) begin failures++; $display("in_ready never low"); end
    // Reference messages, one block at a time (each needs the last result).
    for (int m = 0; m < NKAT; m++) begin
      pad(kat_msg(m), blocks);
      h = H0;
      foreach (blocks[i]) begin
        block = blocks[i];
        for (int k = 0; k < 5; k++) h_in[k] = h[k];
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        while (!out_valid) @(negedge clk);
        for (int k = 0; k < 5; k++) h[k] = h_out[k];
        last_accept = -1;
      end
      checks++;
      if (digest !== kat_digest(m)) begin
        failures++;
        $display("\"%s\": %h, expected %h", kat_msg(m), digest, kat_digest(m));
      end
    end
    $display("max in flight %0d (five in the rounds, one in the output registers), cycles all rounds busy %0d, cycles with in_ready low %0d",
             max_inflight, all_busy, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
