// tb_pe_global_if: random host cycles against the PE memory map (MS and
// address ranges 0000-3FFF / 0000-1FFF / 2000-2FFF / 3000-3FFF, even byte
// on SA0 = 0, odd byte on SBHE# low), the PE-select/broadcast rule, the
// bus-grant gate and the three daisy chains. PE_ID is set to 5.
module tb_pe_global_if;
  logic [15:0] sa;
  logic sbhe_n, aen, ms, bc_n, bg_n, trap, bghi_n, htrapi, memcs16i_n;
  logic [2:0] pes;
  logic bgho_n, htrapo, memcs16o_n, u1;
  logic hcs_pmu_n, hcs_pmm_n, hcs_pml_n, hcs_pmdml_n, hcs_pmdmu_n, hcs_dml_n, hcs_dmu_n;
  int checks = 0, failures = 0;

  pe_global_if #(.PE_ID(5)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp, got;
    logic on, word;
    int hits = 0;
    for (int i = 0; i < 20000; i++) begin
      sa = 16'($urandom); if (i % 2) sa[15:14] = 2'b00;
      {sbhe_n, aen, ms, bc_n, bg_n, trap, bghi_n, htrapi, memcs16i_n} = 9'($urandom);
      if (i % 3) begin aen = 0; bg_n = 0; end
      pes = 3'($urandom);
      #1;
      on = !aen && !bg_n && (!bc_n || pes == 3'd5) && sa < 16'h4000;
      // expected selects, active high: {pmu, pmm, pml, pmdml, pmdmu, dml, dmu}
      exp = '0;
      if (on && !ms) begin
        exp[6] = !sa[0]; exp[5] = !sbhe_n;
      end else if (on && ms) begin
        if (sa < 16'h2000)      exp[4] = 1;
        else if (sa < 16'h3000) begin exp[3] = !sa[0]; exp[2] = !sbhe_n; end
        else                    begin exp[1] = !sa[0]; exp[0] = !sbhe_n; end
      end
      got = ~{hcs_pmu_n, hcs_pmm_n, hcs_pml_n, hcs_pmdml_n, hcs_pmdmu_n, hcs_dml_n, hcs_dmu_n};
      if (exp != 0) hits++;
      word = |{exp[6:5], exp[3:0]};
      checks++;
      if (got !== exp) begin failures++; $display("FAIL sa=%h ms=%b sel %b exp %b", sa, ms, got, exp); end
      checks++;
      if (memcs16o_n !== !(word || !memcs16i_n)) begin failures++; $display("FAIL memcs16"); end
      checks++;
      if (bgho_n !== (bg_n | bghi_n) || htrapo !== (trap & htrapi)) begin failures++; $display("FAIL chains"); end
    end
    checks++;
    if (hits < 1000) begin failures++; $display("FAIL too few selects %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
