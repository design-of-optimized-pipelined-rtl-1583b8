// tb_ripemd160_top - end-to-end test of both engines at their default sizes.
//
// A small host model pads messages, feeds their blocks in order and chains
// each block's result into the next block's chaining value. The pipelined
// engine hashes several messages concurrently (one block in flight per
// message, blocks of different messages interleaved); the iterative engine
// hashes the same messages one after another. Every digest is compared with
// the reference model and the reference test set. The testbench counts how
// often each mechanism occurred and fails if one never did: all five round
// stages busy at once, a block held back by in_ready (both engines), a
// multi-block message chained through h_out, and each engine's 82-cycle
// latency.
module tb_ripemd160_top;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  localparam int NMSG = 12;

  logic clk = 0, rst_n = 0;
  logic pl_in_valid = 0, pl_in_ready, pl_out_valid;
  logic it_in_valid = 0, it_in_ready, it_out_valid;
  logic [511:0] pl_block, it_block;
  hash_t pl_h_in, pl_h_out, it_h_in, it_h_out;
  logic [159:0] pl_digest, it_digest;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ripemd160_top dut (.*);

  initial begin
    repeat (60000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("pl_done=%0d it_done=%0d lat pl %0d it %0d", pl_done, it_done, pl_lat_ok, it_lat_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Messages: the reference set plus random strings of 0..199 characters.
  string msgs [NMSG];
  initial begin
    int len;
    for (int m = 0; m < NMSG; m++) begin
      if (m < NKAT) msgs[m] = kat_msg(m);
      else begin
        msgs[m] = "";
        len = int'($urandom % 200);
        for (int i = 0; i < len; i++)
          msgs[m] = {msgs[m], string'(byte'(8'h20 + $urandom % 95))};
      end
    end
  end

  function automatic void check_digest(string who, int m, logic [159:0] d);
    logic [159:0] e;
    e = (m < NKAT) ? kat_digest(m) : hash_string(msgs[m]);
    checks++;
    if (d !== e) begin
      failures++;
      $display("%s message %0d (%0d chars): %h, expected %h", who, m, msgs[m].len(), d, e);
    end
  endfunction

  // Mechanism counters.
  int all_rounds_busy = 0, pl_stall = 0, it_stall = 0, chained = 0;
  int pl_lat_ok = 0, it_lat_ok = 0;

  always @(negedge clk) begin
    if (dut.u_pipelined.g_round[0].u_stage.busy && dut.u_pipelined.g_round[1].u_stage.busy &&
        dut.u_pipelined.g_round[2].u_stage.busy && dut.u_pipelined.g_round[3].u_stage.busy &&
        dut.u_pipelined.g_round[4].u_stage.busy) all_rounds_busy++;
    if (pl_in_valid && !pl_in_ready) pl_stall++;
    if (it_in_valid && !it_in_ready) it_stall++;
  end

  // ---------------- pipelined engine host ----------------
  // Each message keeps one block in flight; ready messages are issued in
  // round-robin order. Results return in issue order.
  logic [511:0] pl_blocks [NMSG][$];
  int           pl_next [NMSG];
  w32           pl_h [NMSG][5];
  bit           pl_wait [NMSG];
  int           pl_fifo_m [$], pl_fifo_t [$];
  int           pl_done = 0;

  always @(negedge clk) begin
    if (rst_n && pl_out_valid) begin
      int m, t0;
      m = pl_fifo_m.pop_front();
      t0 = pl_fifo_t.pop_front();
      checks++;
      if (cycle - t0 != 82) begin failures++; $display("pipelined latency %0d", cycle - t0); end
      else pl_lat_ok++;
      for (int k = 0; k < 5; k++) pl_h[m][k] = pl_h_out[k];
      pl_wait[m] = 0;
      if (pl_next[m] == pl_blocks[m].size()) begin
        check_digest("pipelined", m, pl_digest);
        if (pl_blocks[m].size() > 1) chained++;
        pl_done++;
      end
    end
  end

  initial begin
    int rr;
    rr = 0;
    wait (rst_n);
    for (int m = 0; m < NMSG; m++) begin
      pad(msgs[m], pl_blocks[m]);
      pl_next[m] = 0;
      pl_h[m] = H0;
      pl_wait[m] = 0;
    end
    while (pl_done < NMSG) begin
      int pick, m;
      @(negedge clk);
      pick = -1;
      for (int i = 0; i < NMSG; i++) begin
        m = (rr + i) % NMSG;
        if (!pl_wait[m] && pl_next[m] < pl_blocks[m].size()) begin pick = m; break; end
      end
      pl_in_valid = (pick >= 0);
      if (pick >= 0) begin
        pl_block = pl_blocks[pick][pl_next[pick]];
        for (int k = 0; k < 5; k++) pl_h_in[k] = pl_h[pick][k];
        // in_ready depends only on the engine's state: sample it now.
        if (pl_in_ready) begin
          pl_fifo_m.push_back(pick);
          pl_fifo_t.push_back(cycle);
          pl_wait[pick] = 1;
          pl_next[pick]++;
          rr = pick + 1;
        end
      end
    end
    pl_in_valid = 0;
  end

  // ---------------- iterative engine host ----------------
  int it_done = 0;
  initial begin
    logic [511:0] blocks [$];
    w32 h [5];
    int t0;
    wait (rst_n);
    for (int m = 0; m < NMSG; m++) begin
      pad(msgs[m], blocks);
      h = H0;
      foreach (blocks[i]) begin
        @(negedge clk);
        it_block = blocks[i];
        for (int k = 0; k < 5; k++) it_h_in[k] = h[k];
        it_in_valid = 1;
        while (!it_in_ready) @(negedge clk);
        t0 = cycle;
        // Keep offering for a few cycles: the engine must ignore it.
        @(negedge clk);
        it_in_valid = 1;
        it_block = ~blocks[i];
        repeat (3) @(negedge clk);
        it_in_valid = 0;
        while (!it_out_valid) @(negedge clk);
        checks++;
        if (cycle - t0 != 82) begin failures++; $display("iterative latency %0d", cycle - t0); end
        else it_lat_ok++;
        for (int k = 0; k < 5; k++) h[k] = it_h_out[k];
      end
      check_digest("iterative", m, it_digest);
      it_done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (pl_done == NMSG && it_done == NMSG);
    $display("all rounds busy: %0d cycles, pipelined in_ready stalls: %0d, iterative busy stalls: %0d",
             all_rounds_busy, pl_stall, it_stall);
    $display("multi-block messages chained: %0d, latency-checked blocks: pipelined %0d, iterative %0d",
             chained, pl_lat_ok, it_lat_ok);
    checks += 5;
    if (all_rounds_busy == 0) begin failures++; $display("five round stages never busy at once"); end
    if (pl_stall == 0)        begin failures++; $display("pipelined in_ready never held a block back"); end
    if (it_stall == 0)        begin failures++; $display("iterative busy never held a block back"); end
    if (chained == 0)         begin failures++; $display("no multi-block message"); end
    if (pl_lat_ok == 0 || it_lat_ok == 0) begin failures++; $display("latency never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
