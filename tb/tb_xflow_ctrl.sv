// tb_xflow_ctrl: all 16 combinations of read/write requests and the two
// flags: a lone read waits only on empty XF1, a lone write only on full XF2,
// a combined transfer waits on either and then issues both strobes.
module tb_xflow_ctrl;
  logic rdxf1d_n, wrxf2d_n, efxf1_n, ffxf2_n, rdxf1_n, wrxf2_n, dmack;
  int checks = 0, failures = 0;

  xflow_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic rd, wr, empty, full, wait_e;
    for (int i = 0; i < 16; i++) begin
      {rdxf1d_n, wrxf2d_n, efxf1_n, ffxf2_n} = 4'(i);
      #1;
      rd = !rdxf1d_n; wr = !wrxf2d_n; empty = !efxf1_n; full = !ffxf2_n;
      if (rd && wr)  wait_e = empty || full;
      else if (rd)   wait_e = empty;
      else if (wr)   wait_e = full;
      else           wait_e = 0;
      checks++;
      if (dmack !== !wait_e || rdxf1_n !== !(rd && !wait_e) || wrxf2_n !== !(wr && !wait_e)) begin
        failures++; $display("FAIL i=%0d dmack=%b rd=%b wr=%b", i, dmack, rdxf1_n, wrxf2_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
