// tb_master_cs: exhaustive over SA19..16, AEN and the five switches; MCS# is
// low exactly when the address nibble and AEN match the switch setting.
module tb_master_cs;
  logic [3:0] sa_hi;
  logic aen, mcs_n;
  logic [4:0] dip;
  int checks = 0, failures = 0;

  master_cs dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      {dip, aen, sa_hi} = 10'(i);
      #1;
      checks++;
      if (mcs_n !== !(sa_hi == dip[3:0] && aen == dip[4])) begin
        failures++; $display("FAIL sa=%h aen=%b dip=%b mcs_n=%b", sa_hi, aen, dip, mcs_n);
      end
    end
    // the setting of the original host: segment A0000H, AEN low
    dip = 5'b0_1010; sa_hi = 4'hA; aen = 0; #1;
    checks++; if (mcs_n !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
