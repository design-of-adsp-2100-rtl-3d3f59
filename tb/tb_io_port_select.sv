// tb_io_port_select: exhaustive check of the host I/O port decoder over all
// 1024 addresses with AEN low and high. Expected selects come from the port
// numbers 300H/301H/302H written out in the testbench.
module tb_io_port_select;
  logic [9:0] sa;
  logic aen, io1_n, io2_n, io3_n;
  int checks = 0, failures = 0;

  io_port_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++)
      for (int i = 0; i < 1024; i++) begin
        sa = 10'(i); aen = a[0];
        #1;
        checks++;
        if (io1_n !== !(a == 0 && i == 'h300) || io2_n !== !(a == 0 && i == 'h301) ||
            io3_n !== !(a == 0 && i == 'h302)) begin
          failures++;
          $display("FAIL sa=%h aen=%0d -> %b%b%b", sa, aen, io1_n, io2_n, io3_n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
