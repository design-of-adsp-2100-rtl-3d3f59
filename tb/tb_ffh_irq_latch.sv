// tb_ffh_irq_latch: the interrupt follows the full flag only at the end of
// a host I/O write; between writes it holds, whatever the flag does.
module tb_ffh_irq_latch;
  logic clk = 0, rst_n = 0, iow_n = 1, ffh_n = 1, irq;
  int checks = 0, failures = 0;
  logic model;

  ffh_irq_latch dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic exp);
    checks++;
    if (irq !== exp) begin failures++; $display("FAIL t=%0t irq=%b exp=%b", $time, irq, exp); end
  endtask

  task automatic io_write();
    @(negedge clk) iow_n = 0;
    repeat (2) @(negedge clk);
    iow_n = 1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; model = 0;
    chk(0);
    for (int i = 0; i < 200; i++) begin
      ffh_n = 1'($urandom);
      io_write();
      model = !ffh_n;              // sampled at the rising edge of IOW#
      @(negedge clk);
      ffh_n = 1'($urandom);        // changes afterwards must not matter
      @(negedge clk);
      chk(model);
      ffh_n = 1'($urandom);
      repeat (3) @(negedge clk);
      chk(model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
