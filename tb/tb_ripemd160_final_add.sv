// tb_ripemd160_final_add - random chaining values and final states; checks
// the registered sums, the digest byte order and the one-cycle latency.
module tb_ripemd160_final_add;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  hash_t  h_in, h_out;
  state_t st;
  logic [159:0] digest;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ripemd160_final_add dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .h_in(h_in),
                           .st(st), .out_valid(out_valid), .h_out(h_out), .digest(digest));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w32 h [5], l [5], r [5];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < 5; i++) begin
        h[i] = $urandom; l[i] = $urandom; r[i] = $urandom;
        h_in[i] = h[i];
      end
      st = '{l: '{l[0], l[1], l[2], l[3], l[4]}, r: '{r[0], r[1], r[2], r[3], r[4]}};
      in_valid = 1;
      #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid too early"); end
      @(posedge clk);
      #1 in_valid = 0;
      final_add(h, l, r);
      checks += 3;
      if (!out_valid) begin failures++; $display("out_valid missing"); end
      if (h_out !== {h[4], h[3], h[2], h[1], h[0]}) begin failures++; $display("sum mismatch n=%0d", n); end
      if (digest !== digest_of(h)) begin failures++; $display("digest mismatch n=%0d", n); end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
