// tb_ripemd160_pipe_step - random steps of the pre-computed step unit.
// W is formed as X + K + A outside the unit; the next state must equal the
// reference step, and hin must equal X2 + K2 + (A two steps later), which is
// the reference state's A after two further steps.
module tb_ripemd160_pipe_step;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  line_t      st, nxt;
  word_t      w, x2, k2, hin;
  logic [3:0] s;
  logic [2:0] fsel;
  int checks = 0, failures = 0;

  ripemd160_pipe_step dut (.st(st), .w(w), .fsel(fsel), .s(s), .x2(x2), .k2(k2),
                           .nxt(nxt), .hin(hin));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w32 v [5];
    w32 x, k, a2;
    for (int n = 0; n < 500; n++) begin
      st   = {$urandom, $urandom, $urandom, $urandom, $urandom};
      x    = $urandom;
      k    = $urandom;
      x2   = $urandom;
      k2   = $urandom;
      s    = 4'(5 + n % 11);
      fsel = 3'(1 + n % 5);
      w    = x + k + st.a;
      #1;
      v = '{st.a, st.b, st.c, st.d, st.e};
      step(v, int'(fsel), x, k, int'(s));
      checks++;
      if (nxt !== {v[0], v[1], v[2], v[3], v[4]}) begin
        failures++;
        $display("state mismatch n=%0d", n);
      end
      // A two steps ahead is E one step ahead (A_{t+2} = E_{t+1}).
      a2 = v[4];
      checks++;
      if (hin !== x2 + k2 + a2) begin
        failures++;
        $display("hin mismatch n=%0d: %h vs %h", n, hin, x2 + k2 + a2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
