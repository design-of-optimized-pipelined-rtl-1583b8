// tb_ripemd160_msg_mem - loads random blocks, reads every word through both
// ports, and checks that the content holds while load is low.
module tb_ripemd160_msg_mem;
  import ripemd160_pkg::*;

  logic clk = 0;
  logic load;
  logic [15:0][31:0] wdata, words, model;
  logic [1:0][3:0]   raddr;
  logic [1:0][31:0]  rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ripemd160_msg_mem #(.WORDS(16), .NRD(2)) dut (
    .clk(clk), .load(load), .wdata(wdata), .raddr(raddr), .rdata(rdata), .words(words));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0;
    for (int n = 0; n < 6; n++) begin
      for (int j = 0; j < 16; j++) wdata[j] = $urandom;
      model = wdata;
      load = 1;
      @(posedge clk);
      #1 load = 0;
      for (int j = 0; j < 16; j++) wdata[j] = $urandom;  // must be ignored
      for (int j = 0; j < 16; j++) begin
        raddr[0] = 4'(j);
        raddr[1] = 4'(15 - j);
        @(posedge clk);
        #1;
        checks += 2;
        if (rdata[0] !== model[j])      begin failures++; $display("port0 word %0d", j); end
        if (rdata[1] !== model[15 - j]) begin failures++; $display("port1 word %0d", 15 - j); end
      end
      checks++;
      if (words !== model) begin failures++; $display("words mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
