// tb_status_register: every combination of the three status inputs with the
// select and read strobe; checks bit positions 0 (BGH#), 1 (TRAPH), 2 (FFH#).
module tb_status_register;
  logic io3_n, ior_n, bgh_n, traph, ffh_n, sd_oe;
  logic [7:0] sd;
  int checks = 0, failures = 0;

  status_register dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {io3_n, ior_n, bgh_n, traph, ffh_n} = 5'(i);
      #1;
      checks++;
      if (!io3_n && !ior_n) begin
        if (sd_oe !== 1'b1 || sd !== {5'b0, ffh_n, traph, bgh_n}) begin
          failures++; $display("FAIL i=%0d sd=%h oe=%b", i, sd, sd_oe);
        end
      end else if (sd_oe !== 1'b0 || sd !== 8'h00) begin
        failures++; $display("FAIL idle i=%0d sd=%h oe=%b", i, sd, sd_oe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
