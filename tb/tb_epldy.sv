// tb_epldy: every PM data slot with a read, a write and no strobe, with PMDA
// high and low, against the rows of the Y-channel transfer table.
module tb_epldy;
  logic pmda;
  logic [2:0] pma_hi;
  logic pmrd_n, pmwr_n;
  logic cspmdm_n, rdyf1_n, rdpmt_n, rdyf2d_n, wryf1d_n, wryf2_n, wrpmt_n, intbuf_n;
  int checks = 0, failures = 0;

  epldy dut (.*);

  // active-high {rdyf1, rdpmt, rdyf2d, wryf1d, wryf2, wrpmt, intbuf}
  localparam logic [6:0] RD_ROW [8] = '{7'b0000000, 7'b0010000, 7'b0100000, 7'b0010010,
                                         7'b1000000, 7'b0000000, 7'b1000010, 7'b0000001};
  localparam logic [6:0] WR_ROW [8] = '{7'b0000000, 7'b0000100, 7'b0000010, 7'b0000110,
                                         7'b0001000, 7'b0000000, 7'b0001010, 7'b0000000};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] got, exp;
    for (int d = 0; d < 2; d++)
      for (int s = 0; s < 8; s++)
        for (int m = 0; m < 3; m++) begin
          pmda = d[0]; pma_hi = 3'(s);
          pmrd_n = (m != 1); pmwr_n = (m != 2);
          #1;
          got = ~{rdyf1_n, rdpmt_n, rdyf2d_n, wryf1d_n, wryf2_n, wrpmt_n, intbuf_n};
          exp = !pmda ? 7'b0 : (m == 1) ? RD_ROW[s] : (m == 2) ? WR_ROW[s] : 7'b0;
          checks++;
          if (got !== exp) begin failures++; $display("FAIL pmda %0d slot %0d mode %0d got %b exp %b", d, s, m, got, exp); end
          checks++;
          if (cspmdm_n !== !(pmda && s == 0)) begin failures++; $display("FAIL cspmdm"); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
