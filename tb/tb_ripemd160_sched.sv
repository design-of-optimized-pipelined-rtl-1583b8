// tb_ripemd160_sched - walks the step counter over 0..79 and compares every
// schedule output with the reference tables.
module tb_ripemd160_sched;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  logic [6:0] t;
  logic [3:0] m_l, m_r, s_l, s_r;
  word_t      k_l, k_r;
  logic [2:0] f_l, f_r;
  int checks = 0, failures = 0;

  ripemd160_sched dut (.t(t), .m_l(m_l), .m_r(m_r), .s_l(s_l), .s_r(s_r),
                       .k_l(k_l), .k_r(k_r), .f_l(f_l), .f_r(f_r));

  task automatic chk(string what, int got, int exp, int tt);
    checks++;
    if (got != exp) begin
      failures++;
      $display("t=%0d %s = %0d, expected %0d", tt, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 80; n++) begin
      t = 7'(n);
      #1;
      chk("m",  int'(m_l), r_l(n), n);
      chk("m'", int'(m_r), r_r(n), n);
      chk("s",  int'(s_l), ripemd160_ref_pkg::s_l(n), n);
      chk("s'", int'(s_r), ripemd160_ref_pkg::s_r(n), n);
      chk("K",  int'(k_l), int'(ripemd160_ref_pkg::k_l(n)), n);
      chk("K'", int'(k_r), int'(ripemd160_ref_pkg::k_r(n)), n);
      chk("f",  int'(f_l), n / 16 + 1, n);
      chk("f'", int'(f_r), 5 - n / 16, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
