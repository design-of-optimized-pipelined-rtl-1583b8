// tb_ripemd160_step - random single steps of one line, for every function
// and rotation amount, against the reference step.
module tb_ripemd160_step;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  line_t      st, nxt;
  word_t      x, k;
  logic [3:0] s;
  logic [2:0] fsel;
  int checks = 0, failures = 0;

  ripemd160_step dut (.st(st), .x(x), .k(k), .s(s), .fsel(fsel), .nxt(nxt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w32 v [5];
    for (int n = 0; n < 500; n++) begin
      st   = {$urandom, $urandom, $urandom, $urandom, $urandom};
      x    = $urandom;
      k    = $urandom;
      s    = 4'(5 + n % 11);
      fsel = 3'(1 + n % 5);
      #1;
      v = '{st.a, st.b, st.c, st.d, st.e};
      step(v, int'(fsel), x, k, int'(s));
      checks++;
      if (nxt !== {v[0], v[1], v[2], v[3], v[4]}) begin
        failures++;
        $display("step mismatch n=%0d: %h vs %h", n, nxt, {v[0], v[1], v[2], v[3], v[4]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
