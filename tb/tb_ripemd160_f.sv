// tb_ripemd160_f - checks the five non-linear functions against the
// reference model for random operands and every selector value.
module tb_ripemd160_f;
  import ripemd160_pkg::*;
  import ripemd160_ref_pkg::*;

  logic [2:0] fsel;
  word_t b, c, d, y;
  int checks = 0, failures = 0;

  ripemd160_f dut (.fsel(fsel), .b(b), .c(c), .d(d), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      fsel = 3'(1 + n % 5);
      b = $urandom; c = $urandom; d = $urandom;
      #1;
      checks++;
      if (y !== fn(int'(fsel), b, c, d)) begin
        failures++;
        $display("f%0d(%h,%h,%h) = %h, expected %h", fsel, b, c, d, y, fn(int'(fsel), b, c, d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
