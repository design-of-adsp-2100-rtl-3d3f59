// tb_yflow_ctrl: all 256 combinations of the four accesses and four flags;
// each interrupt fires only for its own FIFO and access.
module tb_yflow_ctrl;
  logic rdyf1_n, wryf1d_n, rdyf2d_n, wryf2_n, efyf1_n, ffyf1d_n, efyf2d_n, ffyf2_n;
  logic [3:0] irq_n, status;
  int checks = 0, failures = 0;

  yflow_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int i = 0; i < 256; i++) begin
      {rdyf1_n, wryf1d_n, rdyf2d_n, wryf2_n, efyf1_n, ffyf1d_n, efyf2d_n, ffyf2_n} = 8'(i);
      #1;
      exp[0] = !rdyf1_n  && !efyf1_n;
      exp[1] = !wryf1d_n && !ffyf1d_n;
      exp[2] = !rdyf2d_n && !efyf2d_n;
      exp[3] = !wryf2_n  && !ffyf2_n;
      checks++;
      if (irq_n !== ~exp) begin failures++; $display("FAIL i=%0d irq_n=%b", i, irq_n); end
      checks++;
      if (status !== {ffyf2_n, efyf2d_n, ffyf1d_n, efyf1_n}) begin failures++; $display("FAIL status"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
