// tb_epldx: every DM slot with a read, a write and no strobe, against the
// rows of the X-channel transfer table written out as constants here.
module tb_epldx;
  logic [2:0] dma_hi;
  logic dmrd_n, dmwr_n;
  logic csdm_n, rdxf1d_n, rddmt_n, wrdmt_n, wrxf2d_n, rtxf1_n;
  int checks = 0, failures = 0;

  epldx dut (.*);

  // active-high expected strobes {rdxf1, rddmt, wrdmt, wrxf2, rtxf1} per slot
  localparam logic [4:0] RD_ROW [8] = '{5'b00000, 5'b00000, 5'b01000, 5'b01010,
                                         5'b10000, 5'b10010, 5'b10100, 5'b10110};
  localparam logic [4:0] WR_ROW [8] = '{5'b00000, 5'b00010, 5'b00100, 5'b00110,
                                         5'b00000, 5'b00000, 5'b00000, 5'b00001};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] got, exp;
    for (int s = 0; s < 8; s++)
      for (int m = 0; m < 3; m++) begin
        dma_hi = 3'(s);
        dmrd_n = (m != 1); dmwr_n = (m != 2);
        #1;
        got = ~{rdxf1d_n, rddmt_n, wrdmt_n, wrxf2d_n, rtxf1_n};
        exp = (m == 1) ? RD_ROW[s] : (m == 2) ? WR_ROW[s] : 5'b0;
        checks++;
        if (got !== exp) begin failures++; $display("FAIL slot %0d mode %0d got %b exp %b", s, m, got, exp); end
        checks++;
        if (csdm_n !== (s != 0)) begin failures++; $display("FAIL csdm slot %0d", s); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
