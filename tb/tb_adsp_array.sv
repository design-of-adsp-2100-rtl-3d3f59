// tb_adsp_array: end-to-end run of the whole array at its default size
// (eight PEs, 1K FIFOs, full memories), following the host's operating
// sequence: request the buses (61H) and wait for the grant chain, load a
// program word into PM of every PE by broadcast, a scale constant into DM by
// broadcast and one column of a matrix B into each PE's PMDM by PE select,
// reset (62H) and release (63H) the PEs, stream the rows of a matrix A into
// the X channel through port 300H while polling the full flag, wait for
// TRAP from every PE, read the results back and halt (23H).
// Each PE runs a bus-cycle model of its processor: it takes every element
// of A with one slot-7 read (into the processor, into DMT and on to the next
// PE in the same cycle), forms C[r][i] = scale * (row r of A . column i of
// B), stores it in DM, sends it forward on YF2 and backward on YF1D, and
// collects its neighbours' row results from YF1 (slot 6, also into PMT)
// and YF2D (slot 3, also into PMT) into PMDM as soon as it has sent its own, handling the Y interrupts by
// polling INTBUF and retrying. PE0 starts only after the host has found the
// first XFIFO full; the last PE re-reads the start of the stream with a
// retransmit. Every mechanism is counted and must occur at least once.
module tb_adsp_array;
  import adsp_array_pkg::*;
  localparam int N = 8;          // default N_PE of the array
  localparam int K = 16;         // row length
  localparam int R = 65;         // rows: 1040 words, more than one XFIFO holds
  localparam int W = R * K;
  localparam logic [19:0] SEG = 20'hA0000;

  logic clk = 0, por_n = 0;
  logic [19:0] sa = '0;
  logic [15:0] sd_w = '0, sd_r;
  logic sd_oe, aen = 0, iow_n = 1, ior_n = 1, memr_n = 1, memw_n = 1, sbhe_n = 1;
  logic memcs16_n, iocs16_n, irq;
  logic [4:0] dip = 5'b0_1010;

  logic [13:0] proc_dma [N];    logic proc_dmrd_n [N]; logic proc_dmwr_n [N];
  logic [15:0] proc_dmd_o [N];  logic [15:0] proc_dmd_i [N]; logic proc_dmack [N];
  logic [13:0] proc_pma [N];    logic proc_pmda [N];   logic proc_pmrd_n [N];
  logic proc_pmwr_n [N];        logic [23:0] proc_pmd_o [N]; logic [23:0] proc_pmd_i [N];
  logic proc_br_n [N], proc_bg_n [N], proc_reset_n [N], proc_halt_n [N], proc_trap [N];
  logic [3:0] proc_irq_n [N];

  adsp_array dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] A [W];
  logic [15:0] B [K][N];
  logic [15:0] C [R][N];
  localparam logic [15:0] SCALE = 16'd3;
  localparam logic [23:0] PROG0 = 24'h5A_C3_96;

  // mechanism counters
  int n_bg_wait, n_bcast, n_pesel, n_xstall, n_ffh, n_irq, n_yirq, n_intbuf, n_ring_fwd,
      n_ring_bwd, n_scmd, n_retx, n_memcs16, n_iocs16, n_trap_wait, n_halt, n_reset, n_dmt;
  bit host_saw_full = 0;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h t=%0t", what, got, exp, $time);
    end
  endtask

  always @(posedge clk) begin
    for (int i = 0; i < N; i++) if (!proc_dmack[i]) n_xstall++;
    if (!memcs16_n && (!memw_n || !memr_n)) n_memcs16++;
    if (!iocs16_n && !iow_n) n_iocs16++;
    if (irq) n_irq++;
  end

  // ------------------------------------------------------------ host cycles
  task automatic io_wr(logic [9:0] port, logic [15:0] d);
    @(negedge clk); sa = {10'h0, port}; sd_w = d; iow_n = 0;
    @(negedge clk); iow_n = 1;
  endtask
  task automatic io_rd(logic [9:0] port, output logic [7:0] d);
    @(negedge clk); sa = {10'h0, port}; ior_n = 0;
    #1 d = sd_r[7:0];
    @(negedge clk); ior_n = 1;
  endtask
  task automatic mem_wr(logic [15:0] a, logic [15:0] d, logic word);
    @(negedge clk); sa = SEG | 20'(a); sd_w = d; sbhe_n = !word; memw_n = 0;
    @(negedge clk); memw_n = 1; sbhe_n = 1;
  endtask
  task automatic mem_rd(logic [15:0] a, output logic [15:0] d);
    @(negedge clk); sa = SEG | 20'(a); sbhe_n = 0; memr_n = 0;
    #1 d = sd_r;
    @(negedge clk); memr_n = 1; sbhe_n = 1;
  endtask

  // ------------------------------------------------------------ processor model
  // bus grant: a PE grants i+1 cycles after BR#, releases when BR# goes high
  initial begin
    for (int i = 0; i < N; i++) begin
      proc_dma[i] = '0; proc_dmrd_n[i] = 1; proc_dmwr_n[i] = 1; proc_dmd_o[i] = '0;
      proc_pma[i] = '0; proc_pmda[i] = 0; proc_pmrd_n[i] = 1; proc_pmwr_n[i] = 1;
      proc_pmd_o[i] = '0; proc_bg_n[i] = 1; proc_trap[i] = 0;
    end
  end
  for (genvar g = 0; g < N; g++) begin : g_bg
    initial forever begin
      @(negedge clk);
      if (!proc_br_n[g] && proc_bg_n[g]) begin repeat (g + 1) @(negedge clk); proc_bg_n[g] = 0; end
      else if (proc_br_n[g] && !proc_bg_n[g]) proc_bg_n[g] = 1;
    end
  end

  task automatic dm_rd(int i, logic [13:0] a, output logic [15:0] d);
    @(negedge clk); proc_dma[i] = a; proc_dmrd_n[i] = 0;
    #1 while (!proc_dmack[i]) begin @(negedge clk); #1; end
    d = proc_dmd_i[i];
    @(negedge clk); proc_dmrd_n[i] = 1;
  endtask
  task automatic dm_wr(int i, logic [13:0] a, logic [15:0] d);
    @(negedge clk); proc_dma[i] = a; proc_dmd_o[i] = d; proc_dmwr_n[i] = 0;
    #1 while (!proc_dmack[i]) begin @(negedge clk); #1; end
    @(negedge clk); proc_dmwr_n[i] = 1;
  endtask
  task automatic pm_rd(int i, logic da, logic [13:0] a, output logic [23:0] d, output logic [3:0] q);
    @(negedge clk); proc_pmda[i] = da; proc_pma[i] = a; proc_pmrd_n[i] = 0;
    #1 d = proc_pmd_i[i]; q = proc_irq_n[i];
    @(negedge clk); proc_pmrd_n[i] = 1; proc_pmda[i] = 0;
  endtask
  task automatic pm_wr(int i, logic da, logic [13:0] a, logic [15:0] d, output logic [3:0] q);
    @(negedge clk); proc_pmda[i] = da; proc_pma[i] = a; proc_pmd_o[i] = {d, 8'h00}; proc_pmwr_n[i] = 0;
    #1 q = proc_irq_n[i];
    @(negedge clk); proc_pmwr_n[i] = 1; proc_pmda[i] = 0;
  endtask
  // Y read with the interrupt routine: poll INTBUF until the flag clears, retry
  task automatic y_read(int i, logic [13:0] a, int irq_bit, int flag_bit, output logic [15:0] d);
    logic [23:0] p; logic [3:0] q;
    forever begin
      pm_rd(i, 1, a, p, q);
      if (q[irq_bit]) break;
      n_yirq++;
      do begin
        repeat (3) @(negedge clk);
        pm_rd(i, 1, 14'h3800, p, q);
        n_intbuf++;
      end while (!p[8 + flag_bit]);
    end
    d = p[23:8];
  endtask

  task automatic pe_run(int i);
    logic [15:0] d, scale, acc;
    logic [15:0] colb [K];
    logic [23:0] p; logic [3:0] q;
    pm_rd(i, 0, 14'd0, p, q); chk(p, PROG0, "program word broadcast to PM");
    dm_rd(i, 14'h0050, scale);  chk(scale, SCALE, "broadcast constant in DM");
    for (int k = 0; k < K; k++) begin pm_rd(i, 1, 14'(k), p, q); colb[k] = p[23:8]; end
    if (i == N - 1) begin
      // read the first four words without passing them on, then rewind XF1
      for (int k = 0; k < 4; k++) begin dm_rd(i, 14'h2000, d); chk(d, A[k], "pre-read"); end
      dm_wr(i, 14'h3800, 16'h0); n_retx++;
    end
    if (i == 0) wait (host_saw_full);
    for (int r = 0; r < R; r++) begin
      acc = '0;
      for (int k = 0; k < K; k++) begin
        dm_rd(i, 14'h3800 | 14'((r * K + k) % 2048), d);   // XF1 -> Pr + DMT + XF2
        n_scmd++;
        acc += d * colb[k];
      end
      acc = acc * scale;
      dm_wr(i, 14'h0100 + 14'(r), acc);
      pm_wr(i, 1, 14'h0800, acc, q);   // forward to the right PE's YF1
      pm_wr(i, 1, 14'h2000, acc, q);   // backward into own YF1D
      // neighbours' row r results; they may still be behind in the X pipeline
      y_read(i, 14'h3000 | 14'(r), 0, 0, d);          // YF1 -> Pr + PMT
      pm_wr(i, 1, 14'h0100 + 14'(r), d, q);
      if (i == 0) n_ring_fwd++;
      y_read(i, 14'h1800 | 14'(14'h40 + r), 2, 2, d); // YF2D -> Pr + PMT
      pm_wr(i, 1, 14'h0200 + 14'(r), d, q);
      if (i == N - 1) n_ring_bwd++;
    end
    // DMT kept the last element of the stream
    dm_rd(i, 14'h1000 | 14'((W - 1) % 2048), d); chk(d, A[W-1], "DMT copy"); n_dmt++;
    pm_rd(i, 1, 14'h1000 | 14'(R - 1), p, q);
    chk(p[23:8], C[R-1][(i + N - 1) % N], "PMT copy of the YF1 word");
    proc_trap[i] = 1;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ test
  initial begin
    logic [7:0] st; logic [15:0] d;
    for (int w = 0; w < W; w++) A[w] = 16'($urandom_range(0, 255));
    for (int k = 0; k < K; k++) for (int i = 0; i < N; i++) B[k][i] = 16'($urandom_range(0, 15));
    for (int r = 0; r < R; r++)
      for (int i = 0; i < N; i++) begin
        logic [15:0] s; s = '0;
        for (int k = 0; k < K; k++) s += A[r * K + k] * B[k][i];
        C[r][i] = s * SCALE;
      end

    repeat (3) @(negedge clk); por_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < N; i++) chk(proc_reset_n[i], 1, "RESET# released after power-on");
    // request the buses and wait for the grant chain
    io_wr(10'h301, CW_BUS_REQ);
    do begin io_rd(10'h302, st); if (st[SR_BGH_N]) n_bg_wait++; end while (st[SR_BGH_N]);
    // program word to PM of all PEs: MS = 0 upper/middle, MS = 1 lower
    io_wr(10'h301, CW_BUS_REQ & ~(8'(1) << CR_BC_N));
    mem_wr(16'h0000, {PROG0[15:8], PROG0[23:16]}, 1); n_bcast++;
    io_wr(10'h301, (CW_BUS_REQ & ~(8'(1) << CR_BC_N)) | (8'(1) << CR_MS));
    mem_wr(16'h0000, {8'h00, PROG0[7:0]}, 0); n_bcast++;
    mem_wr(16'h3000 + 16'h00A0, SCALE, 1); n_bcast++;      // DM word 50H
    // column i of B into PMDM of PE i
    for (int i = 0; i < N; i++) begin
      io_wr(10'h301, CW_BUS_REQ | (8'(1) << CR_MS) | 8'(i << CR_PESL));
      for (int k = 0; k < K; k++) begin mem_wr(16'h2000 + 16'(2 * k), B[k][i], 1); n_pesel++; end
    end
    for (int i = 0; i < N; i++) begin
      io_wr(10'h301, CW_BUS_REQ | (8'(1) << CR_MS) | 8'(i << CR_PESL));
      mem_rd(16'h2000 + 16'(2 * (K - 1)), d); chk(d, B[K-1][i], "PMDM loaded per PE");
    end
    // reset the PEs, then let them run
    io_wr(10'h301, CW_RESET);
    repeat (2) @(negedge clk);
    for (int i = 0; i < N; i++) chk(proc_reset_n[i], 0, "RESET# from HRS#");
    n_reset++;
    for (int i = 0; i < N; i++) begin
      automatic int j = i;
      fork pe_run(j); join_none
    end
    io_wr(10'h301, CW_RUN);
    // stream A into the X channel, polling the full flag
    for (int w = 0; w < W; w++) begin
      forever begin
        io_rd(10'h302, st);
        if (st[SR_FFH_N]) break;
        n_ffh++; host_saw_full = 1;
      end
      io_wr(10'h300, A[w]);
    end
    // wait for TRAP from every PE
    do begin io_rd(10'h302, st); if (!st[SR_TRAPH]) n_trap_wait++; repeat (20) @(negedge clk); end
    while (!st[SR_TRAPH]);
    // read the results back
    io_wr(10'h301, CW_BUS_REQ);
    do io_rd(10'h302, st); while (st[SR_BGH_N]);
    for (int i = 0; i < N; i++) begin
      io_wr(10'h301, CW_BUS_REQ | (8'(1) << CR_MS) | 8'(i << CR_PESL));
      for (int r = 0; r < R; r++) begin
        mem_rd(16'h3000 + 16'(2 * (16'h100 + r)), d); chk(d, C[r][i], "C in DM");
        mem_rd(16'h2000 + 16'(2 * (16'h100 + r)), d); chk(d, C[r][(i + N - 1) % N], "left result via YF1");
        mem_rd(16'h2000 + 16'(2 * (16'h200 + r)), d); chk(d, C[r][(i + 1) % N], "right result via YF2D");
      end
    end
    io_wr(10'h301, CW_HALT);
    @(negedge clk);
    for (int i = 0; i < N; i++) if (!proc_halt_n[i]) n_halt++;
    chk(n_halt, N, "HALT# to every processor");

    $display("mechanisms: bg_wait=%0d broadcast=%0d pe_select=%0d x_stall=%0d ffh_full=%0d host_irq=%0d",
             n_bg_wait, n_bcast, n_pesel, n_xstall, n_ffh, n_irq);
    $display("            y_irq=%0d intbuf=%0d ring_fwd=%0d ring_bwd=%0d scmd=%0d retransmit=%0d dmt=%0d",
             n_yirq, n_intbuf, n_ring_fwd, n_ring_bwd, n_scmd, n_retx, n_dmt);
    $display("            memcs16=%0d iocs16=%0d trap_wait=%0d reset=%0d halt=%0d",
             n_memcs16, n_iocs16, n_trap_wait, n_reset, n_halt);
    begin
      int m [18];
      m = '{n_bg_wait, n_bcast, n_pesel, n_xstall, n_ffh, n_irq, n_yirq, n_intbuf, n_ring_fwd,
            n_ring_bwd, n_scmd, n_retx, n_memcs16, n_iocs16, n_trap_wait, n_reset, n_halt, n_dmt};
      for (int k = 0; k < 18; k++) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
