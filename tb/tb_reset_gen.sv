// tb_reset_gen: RESET# is the AND of HRS# and the power-on reset, one master
// clock later.
module tb_reset_gen;
  logic clk = 0, por_n = 0, hrs_n = 1, reset_n;
  int checks = 0, failures = 0;

  reset_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      por_n = 1'($urandom); hrs_n = 1'($urandom);
      exp = por_n & hrs_n;
      @(posedge clk); #1;
      checks++;
      if (reset_n !== exp) begin failures++; $display("FAIL i=%0d reset_n=%b exp=%b", i, reset_n, exp); end
      // holds until the next edge
      por_n = 1'($urandom); hrs_n = 1'($urandom);
      #2 checks++;
      if (reset_n !== exp) begin failures++; $display("FAIL hold i=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
