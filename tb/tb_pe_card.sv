// tb_pe_card: one PE card with a bus-cycle model of its processor and of
// its neighbours. The host loads PM (three bytes), PMDM and DM through the
// broadcast bus and reads them back; PE select and broadcast are checked.
// The processor then fetches from PM, reads DM/PMDM, and exercises the
// single-cycle multiple-destination slots of both channels: XF1 -> processor
// + DMT + XF2 in one cycle, DMT -> processor + XF2, retransmit of XF1, the
// X-channel wait (DMACK low) on an empty XF1 and on a full XF2, Y-channel
// transfers to YF2, YF1D, PMT, from YF1 and YF2D, the Y interrupts and the
// INTBUF flag word. FIFO depth is 16 to keep the run short.
module tb_pe_card;
  import adsp_array_pkg::*;
  localparam int ID = 3;

  logic clk = 0;
  logic [13:0] proc_dma = '0, proc_pma = '0;
  logic proc_dmrd_n = 1, proc_dmwr_n = 1, proc_pmda = 0, proc_pmrd_n = 1, proc_pmwr_n = 1;
  logic [15:0] proc_dmd_o = '0, proc_dmd_i;
  logic [23:0] proc_pmd_o = '0, proc_pmd_i;
  logic proc_dmack, proc_br_n, proc_bg_n = 1, proc_reset_n, proc_halt_n, proc_trap = 0;
  logic [3:0] proc_irq_n;
  logic reset_n = 0;
  logic [15:0] sa = '0, sd_w = '0, sd_r;
  logic memr_n = 1, memw_n = 1, sbhe_n = 1, aen = 0, sd_r_oe;
  logic [7:0] cr = CW_RUN;
  logic bghi_n = 0, bgho_n, htrapi = 1, htrapo, memcs16i_n = 1, memcs16o_n;
  logic [15:0] xin_d = '0, xout_d, yin_d = '0, yout_d, yf1d_q, yf2d_q;
  logic xin_wr_n = 1, xf1_ff_n, xout_wr_n, ffxf2_n = 1;
  logic yin_wr_n = 1, yf1_ff_n, yout_wr_n, ffyf2_n = 1;
  logic yf1d_rd_n = 1, yf1d_ef_n, yf2d_rd_n, efyf2d_n = 0;

  int checks = 0, failures = 0, stall_cycles = 0;
  logic [15:0] xf2_q[$], yf2_q[$], yf2d_model[$];

  pe_card #(.PE_ID(ID), .FIFO_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  // neighbours: capture writes to the right PE's XFIFO / YFIFO, supply YF2D
  assign yf2d_q = yf2d_model.size() ? yf2d_model[0] : 16'h0;
  always @(posedge clk) begin
    if (!xout_wr_n) xf2_q.push_back(xout_d);
    if (!yout_wr_n) yf2_q.push_back(yout_d);
    if (!yf2d_rd_n && yf2d_model.size()) void'(yf2d_model.pop_front());
  end
  always_comb efyf2d_n = yf2d_model.size() != 0;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h t=%0t", what, got, exp, $time); end
  endtask

  // ---- host cycles (bus granted)
  task automatic hwr(logic [15:0] a, logic [15:0] d, logic word);
    @(negedge clk); sa = a; sd_w = d; sbhe_n = !word; memw_n = 0;
    @(negedge clk); memw_n = 1; sbhe_n = 1;
  endtask
  task automatic hrd(logic [15:0] a, logic word, output logic [15:0] d);
    @(negedge clk); sa = a; sbhe_n = !word; memr_n = 0;
    #1 d = sd_r;
    @(negedge clk); memr_n = 1; sbhe_n = 1;
  endtask

  // ---- processor cycles; wait states while DMACK is low
  task automatic dm_rd(logic [13:0] a, output logic [15:0] d);
    @(negedge clk); proc_dma = a; proc_dmrd_n = 0;
    #1 while (!proc_dmack) begin stall_cycles++; @(negedge clk); #1; end
    d = proc_dmd_i;
    @(negedge clk); proc_dmrd_n = 1;
  endtask
  task automatic dm_wr(logic [13:0] a, logic [15:0] d);
    @(negedge clk); proc_dma = a; proc_dmd_o = d; proc_dmwr_n = 0;
    #1 while (!proc_dmack) begin stall_cycles++; @(negedge clk); #1; end
    @(negedge clk); proc_dmwr_n = 1;
  endtask
  task automatic pm_rd(logic da, logic [13:0] a, output logic [23:0] d, output logic [3:0] irq);
    @(negedge clk); proc_pmda = da; proc_pma = a; proc_pmrd_n = 0;
    #1 d = proc_pmd_i; irq = proc_irq_n;
    @(negedge clk); proc_pmrd_n = 1; proc_pmda = 0;
  endtask
  task automatic pm_wr(logic da, logic [13:0] a, logic [23:0] d, output logic [3:0] irq);
    @(negedge clk); proc_pmda = da; proc_pma = a; proc_pmd_o = d; proc_pmwr_n = 0;
    #1 irq = proc_irq_n;
    @(negedge clk); proc_pmwr_n = 1; proc_pmda = 0;
  endtask
  task automatic xpush(logic [15:0] d);
    @(negedge clk); xin_d = d; xin_wr_n = 0;
    @(negedge clk); xin_wr_n = 1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d; logic [23:0] p; logic [3:0] irq;
    repeat (3) @(negedge clk); reset_n = 1;
    chk({proc_br_n, proc_halt_n, proc_reset_n}, 3'b111, "control lines idle");
    // ---------------- host loading, PE selected by PES = 3
    cr = 8'h61 | (8'(ID) << CR_PESL); proc_bg_n = 0;   // MS = 0, BC# high
    chk(proc_br_n, 0, "bus request reaches the processor");
    for (int k = 0; k < 8; k++) hwr(16'(2 * k), 16'hA100 + 16'(k * 16'h0101), 1);  // PMU (low byte), PMM (high byte)
    hrd(16'h0004, 1, d); chk(d, 16'hA302, "PM upper/middle read back");
    @(negedge clk); sa = 16'h4000; #1 chk(memcs16o_n, 1, "MEMCS16# idle outside the map");
    @(negedge clk); sa = 16'h0004; sbhe_n = 0; memr_n = 0; #1; chk(memcs16o_n, 0, "MEMCS16# for PM word"); memr_n = 1; sbhe_n = 1;
    cr[CR_MS] = 1;
    for (int k = 0; k < 8; k++) hwr(16'(k), 16'h00C0 + 16'(k), 0);                  // PML
    for (int k = 0; k < 8; k++) hwr(16'h2000 + 16'(2 * k), 16'h5000 + 16'(k), 1);   // PMDM
    for (int k = 0; k < 8; k++) hwr(16'h3000 + 16'(2 * k), 16'h7000 + 16'(k), 1);   // DM
    hrd(16'h0005, 0, d); chk(d[7:0], 8'hC5, "PML read back");
    hrd(16'h2006, 1, d); chk(d, 16'h5003, "PMDM read back");
    hrd(16'h3008, 1, d); chk(d, 16'h7004, "DM read back");
    // another PE selected: no write; broadcast: write regardless of PES
    cr[CR_PESU] = ~cr[CR_PESU];
    hwr(16'h3000, 16'hDEAD, 1);
    cr[CR_BC_N] = 0; hwr(16'h3002, 16'hBEEF, 1); cr[CR_BC_N] = 1;
    cr[CR_PESU] = ~cr[CR_PESU];
    hrd(16'h3000, 1, d); chk(d, 16'h7000, "unselected PE not written");
    hrd(16'h3002, 1, d); chk(d, 16'hBEEF, "broadcast write");
    // bus not granted: host access ignored
    proc_bg_n = 1; hrd(16'h3000, 1, d); chk(sd_r_oe, 0, "no host read without grant");
    chk(bgho_n, 1, "BGHO# high without grant");
    cr = CW_RUN;
    // ---------------- processor: PM fetch, DM and PMDM
    pm_rd(0, 14'd3, p, irq); chk(p, 24'h03_A4_C3, "instruction fetch");
    dm_rd(14'd4, d); chk(d, 16'h7004, "DM read");
    dm_wr(14'd9, 16'h1234); dm_rd(14'd9, d); chk(d, 16'h1234, "DM write/read");
    pm_rd(1, 14'd2, p, irq); chk(p[23:8], 16'h5002, "PMDM read");
    // ---------------- X channel
    xpush(16'h0111); xpush(16'h0222); xpush(16'h0333);
    stall_cycles = 0;
    dm_rd(14'h3800 | 14'd20, d); chk(d, 16'h0111, "slot 7: XF1 -> Pr");
    chk(stall_cycles, 0, "slot 7: one cycle, no wait state");
    chk(xf2_q.size(), 1, "slot 7: XF2 written"); chk(xf2_q[0], 16'h0111, "slot 7: XF2 data");
    dm_rd(14'h1000 | 14'd20, d); chk(d, 16'h0111, "slot 2: DMT holds the word of slot 7");
    dm_rd(14'h2000, d); chk(d, 16'h0222, "slot 4: XF1 -> Pr");
    chk(xf2_q.size(), 1, "slot 4: XF2 untouched");
    dm_rd(14'h2800, d); chk(d, 16'h0333, "slot 5: XF1 -> Pr");
    chk(xf2_q.size(), 2, "slot 5: XF2 written");
    // empty XF1: the processor waits until a word arrives
    stall_cycles = 0;
    fork
      dm_rd(14'h3000 | 14'd21, d);
      begin repeat (6) @(negedge clk); xpush(16'h0444); end
    join
    chk(d, 16'h0444, "slot 6 after wait");
    chk(stall_cycles >= 6, 1, "DMACK held low while XF1 empty");
    dm_rd(14'h1000 | 14'd21, d); chk(d, 16'h0444, "slot 6 copied to DMT");
    // full XF2: write waits
    ffxf2_n = 0; stall_cycles = 0;
    fork
      dm_wr(14'h0800, 16'h0555);
      begin repeat (4) @(negedge clk); ffxf2_n = 1; end
    join
    chk(stall_cycles >= 3, 1, "DMACK held low while XF2 full");
    chk(xf2_q[$], 16'h0555, "slot 1 write reached XF2 after wait");
    dm_wr(14'h1800 | 14'd30, 16'h0666); chk(xf2_q[$], 16'h0666, "slot 3 write -> XF2");
    dm_rd(14'h1000 | 14'd30, d); chk(d, 16'h0666, "slot 3 write -> DMT");
    dm_rd(14'h1800 | 14'd30, d); chk(d, 16'h0666, "slot 3 read DMT"); chk(xf2_q[$], 16'h0666, "slot 3 read -> XF2");
    chk(xf2_q.size(), 5, "XF2 word count");
    // retransmit: read pointer back to the first word since reset
    dm_wr(14'h3800, 16'h0000);
    dm_rd(14'h2000, d); chk(d, 16'h0111, "retransmit replays first word");
    // ---------------- Y channel
    pm_wr(1, 14'h0800 | 14'd5, 24'h9001_00, irq); chk(yf2_q[$], 16'h9001, "slot 1 write -> YF2");
    pm_wr(1, 14'h1800 | 14'd6, 24'h9002_00, irq); chk(yf2_q[$], 16'h9002, "slot 3 write -> YF2");
    pm_rd(1, 14'h1000 | 14'd6, p, irq); chk(p[23:8], 16'h9002, "slot 3 write -> PMT");
    chk(yf1d_ef_n, 0, "YF1D empty");
    pm_wr(1, 14'h2000, 24'h9003_00, irq); chk({yf1d_ef_n, yf1d_q}, {1'b1, 16'h9003}, "slot 4 write -> YF1D");
    pm_wr(1, 14'h3000 | 14'd7, 24'h9004_00, irq);
    pm_rd(1, 14'h1000 | 14'd7, p, irq); chk(p[23:8], 16'h9004, "slot 6 write -> PMT");
    @(negedge clk); yf1d_rd_n = 0; #1 chk(yf1d_q, 16'h9003, "left PE reads YF1D"); @(negedge clk); yf1d_rd_n = 1;
    chk(yf1d_q, 16'h9004, "YF1D second word");
    // reads from YF1 (written by the left PE)
    @(negedge clk); yin_d = 16'h8001; yin_wr_n = 0; @(negedge clk); yin_d = 16'h8002; @(negedge clk); yin_wr_n = 1;
    pm_rd(1, 14'h2000, p, irq); chk(p[23:8], 16'h8001, "slot 4 read YF1");
    pm_rd(1, 14'h3000 | 14'd8, p, irq); chk(p[23:8], 16'h8002, "slot 6 read YF1");
    pm_rd(1, 14'h1000 | 14'd8, p, irq); chk(p[23:8], 16'h8002, "slot 6 read -> PMT");
    pm_rd(1, 14'h2000, p, irq); chk(irq, 4'b1110, "IRQ0 on read of empty YF1");
    // YF2D (right PE's backward FIFO)
    pm_rd(1, 14'h0800, p, irq); chk(irq, 4'b1011, "IRQ2 on read of empty YF2D");
    yf2d_model.push_back(16'h7701); yf2d_model.push_back(16'h7702);
    pm_rd(1, 14'h0800, p, irq); chk({irq, p[23:8]}, {4'b1111, 16'h7701}, "slot 1 read YF2D");
    pm_rd(1, 14'h1800 | 14'd9, p, irq); chk(p[23:8], 16'h7702, "slot 3 read YF2D");
    pm_rd(1, 14'h1000 | 14'd9, p, irq); chk(p[23:8], 16'h7702, "slot 3 read -> PMT");
    // full YF2 and full YF1D
    ffyf2_n = 0; pm_wr(1, 14'h0800, 24'h0, irq); chk(irq, 4'b0111, "IRQ3 on write of full YF2"); ffyf2_n = 1;
    for (int k = 0; k < 15; k++) pm_wr(1, 14'h2000, 24'(k) << 8, irq);
    chk(yf1d_ef_n, 1, "YF1D not empty");
    pm_wr(1, 14'h2000, 24'h0, irq); chk(irq, 4'b1101, "IRQ1 on write of full YF1D");
    // INTBUF flag word {FFYF2#, EFYF2D#, FFYF1D#, EFYF1#}
    pm_rd(1, 14'h3800, p, irq); chk(p[11:8], 4'b1000, "INTBUF flags");
    // chains
    bghi_n = 0; proc_bg_n = 0; #1 chk(bgho_n, 0, "BG chain granted");
    bghi_n = 1; #1 chk(bgho_n, 1, "BG chain waits for the right PE");
    proc_trap = 1; #1 chk(htrapo, 1, "TRAP chain"); htrapi = 0; #1 chk(htrapo, 0, "TRAP chain right");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
