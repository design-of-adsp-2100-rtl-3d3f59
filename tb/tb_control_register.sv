// tb_control_register: reset value, loads only when IO2# and IOW# are both
// low, holds otherwise; random words compared with a model register.
module tb_control_register;
  logic clk = 0, rst_n = 0, io2_n = 1, iow_n = 1;
  logic [7:0] sd, cr, model;
  int checks = 0, failures = 0;

  control_register dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic [7:0] exp);
    checks++;
    if (cr !== exp) begin failures++; $display("FAIL cr=%h exp=%h", cr, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sd = 8'h00;
    #12 chk(8'h63);
    rst_n = 1; model = 8'h63;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      sd = 8'($urandom); io2_n = 1'($urandom); iow_n = 1'($urandom);
      if (!io2_n && !iow_n) model = sd;
      @(posedge clk); #1 chk(model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
