// tb_ripemd160_round_stage - runs random states and blocks through the
// stages for round 1 and round 4. Each result must equal 16 reference steps
// of that round, out_valid must come in the 16th cycle after the load, and
// a second block loaded in that same cycle (back to back) must come out 16
// cycles later, with the message words and chaining value carried along.
module tb_ripemd160_round_stage;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  localparam int NST = 2;
  localparam int RND [NST] = '{0, 3};

  logic clk = 0, rst_n = 0;
  logic   in_valid [NST];
  state_t in_state [NST], out_state [NST];
  block_t in_x [NST], out_x [NST];
  hash_t  in_h [NST], out_h [NST];
  logic   can_load [NST], out_valid [NST];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NST; g++) begin : g_dut
    ripemd160_round_stage #(.ROUND(RND[g])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid[g]), .in_state(in_state[g]),
      .in_x(in_x[g]), .in_h(in_h[g]), .can_load(can_load[g]), .out_valid(out_valid[g]),
      .out_state(out_state[g]), .out_x(out_x[g]), .out_h(out_h[g]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic state_t rand_state();
    return {$urandom, $urandom, $urandom, $urandom, $urandom,
            $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic state_t ref_round(state_t s, block_t xb, int rnd);
    w32 l [5], r [5], x [16];
    l = '{s.l.a, s.l.b, s.l.c, s.l.d, s.l.e};
    r = '{s.r.a, s.r.b, s.r.c, s.r.d, s.r.e};
    for (int j = 0; j < 16; j++) x[j] = xb[j];
    run_steps(l, r, x, 16 * rnd, 16 * rnd + 15);
    return '{l: '{l[0], l[1], l[2], l[3], l[4]}, r: '{r[0], r[1], r[2], r[3], r[4]}};
  endfunction

  task automatic drive(int g, ref state_t s, ref block_t xb, ref hash_t hh);
    s = rand_state();
    for (int j = 0; j < 16; j++) xb[j] = $urandom;
    for (int i = 0; i < 5; i++) hh[i] = $urandom;
    in_state[g] = s; in_x[g] = xb; in_h[g] = hh; in_valid[g] = 1;
  endtask

  task automatic check_out(int g, state_t s, block_t xb, hash_t hh, int n);
    checks += 3;
    if (out_state[g] !== ref_round(s, xb, RND[g])) begin
      failures++; $display("round %0d block %0d: state mismatch", RND[g] + 1, n);
    end
    if (out_x[g] !== xb) begin failures++; $display("message words not carried"); end
    if (out_h[g] !== hh) begin failures++; $display("chaining value not carried"); end
  endtask

  for (genvar g = 0; g < NST; g++) begin : g_run
    initial begin
      state_t s0, s1;
      block_t x0, x1;
      hash_t  h0, h1;
      int cyc;
      in_valid[g] = 0;
      wait (rst_n);
      for (int n = 0; n < 8; n += 2) begin
        @(negedge clk);
        checks++;
        if (!can_load[g]) begin failures++; $display("stage not free"); end
        drive(g, s0, x0, h0);
        @(negedge clk);
        in_valid[g] = 0;
        cyc = 1;
        while (!out_valid[g]) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != 16) begin failures++; $display("round %0d: out_valid after %0d cycles", RND[g] + 1, cyc); end
        check_out(g, s0, x0, h0, n);
        // Next block straight into the finishing stage.
        checks++;
        if (!can_load[g]) begin failures++; $display("no back-to-back load"); end
        drive(g, s1, x1, h1);
        @(negedge clk);
        in_valid[g] = 0;
        cyc = 1;
        while (!out_valid[g]) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != 16) begin failures++; $display("back-to-back: out_valid after %0d cycles", cyc); end
        check_out(g, s1, x1, h1, n + 1);
        @(negedge clk);
        checks++;
        if (!can_load[g] || out_valid[g]) begin failures++; $display("stage not idle after block"); end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (400) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
