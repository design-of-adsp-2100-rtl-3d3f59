// tb_systolic_fir: the array in systolic mode at its default size (eight
// PEs, 1K FIFOs, full memories). A 16-tap FIR filter y[n] = sum w[k]x[n-k]
// runs on eight PEs with two passes of the partial results round the Y ring:
// PE i holds taps w[i] and w[i+8] in PMDM (loaded by PE select). The host
// streams the samples x[n] into the X channel; each PE takes every sample
// with one slot-7 read (into the processor, into DMT at address n and on to
// the next PE), fetches the delayed sample x[n-i] back from DMT (slot 2),
// adds w[i]x[n-i] to the partial result received from the left PE on YF1
// (PE0 starts from zero) and sends it on to the right PE's YF1 (slot 1).
// On the second pass PE0 receives the first-pass sums from the last PE over
// the ring, every PE adds w[i+8]x[n-i-8], and the last PE stores the final
// y[n] in its DM, from where the host reads and checks it. Y reads that
// find an empty FIFO take the interrupt path (poll INTBUF, retry). The
// number of ring transfers, Y interrupts and X stalls is counted and must
// be non-zero.
module tb_systolic_fir;
  import adsp_array_pkg::*;
  localparam int N = 8;          // default N_PE of the array
  localparam int T = 2 * N;      // taps: two passes round the ring
  localparam int M = 256;        // samples
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
  logic [15:0] X [M];
  logic [15:0] Wt [T];
  logic [15:0] Y [M];
  int n_ring, n_yirq, n_intbuf, n_xstall;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h t=%0t", what, got, exp, $time);
    end
  endtask

  always @(posedge clk) for (int i = 0; i < N; i++) if (!proc_dmack[i]) n_xstall++;

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

  // one processor: two passes over the sample block
  task automatic pe_fir(int i);
    logic [15:0] w0, w1, x, p, d;
    logic [23:0] pw; logic [3:0] q;
    pm_rd(i, 1, 14'd0, pw, q); w0 = pw[23:8];
    pm_rd(i, 1, 14'd1, pw, q); w1 = pw[23:8];
    for (int n = 0; n < M; n++) begin
      dm_rd(i, 14'h3800 | 14'(n), d);                 // XF1 -> Pr + DMT[n] + XF2
      if (n - i >= 0) dm_rd(i, 14'h1000 | 14'(n - i), x); else x = '0;
      if (i == 0) p = '0; else y_read(i, 14'h2000, 0, 0, p);
      pm_wr(i, 1, 14'h0800, p + w0 * x, q);           // on to the right PE (ring at the end)
    end
    for (int n = 0; n < M; n++) begin
      if (n - i - N >= 0) dm_rd(i, 14'h1000 | 14'(n - i - N), x); else x = '0;
      y_read(i, 14'h2000, 0, 0, p);
      if (i == 0) n_ring++;
      if (i == N - 1) dm_wr(i, 14'(n), p + w1 * x);   // final result into DM
      else pm_wr(i, 1, 14'h0800, p + w1 * x, q);
    end
    proc_trap[i] = 1;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] st; logic [15:0] d;
    for (int n = 0; n < M; n++) X[n] = 16'($urandom_range(0, 255));
    for (int k = 0; k < T; k++) Wt[k] = 16'($urandom_range(0, 255));
    for (int n = 0; n < M; n++) begin
      logic [15:0] s; s = '0;
      for (int k = 0; k < T; k++) if (n - k >= 0) s += Wt[k] * X[n - k];
      Y[n] = s;
    end

    repeat (3) @(negedge clk); por_n = 1;
    io_wr(10'h301, CW_BUS_REQ);
    do io_rd(10'h302, st); while (st[SR_BGH_N]);
    for (int i = 0; i < N; i++) begin
      io_wr(10'h301, CW_BUS_REQ | (8'(1) << CR_MS) | 8'(i << CR_PESL));
      mem_wr(16'h2000, Wt[i], 1);
      mem_wr(16'h2002, Wt[i + N], 1);
    end
    io_wr(10'h301, CW_RESET);
    repeat (2) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      automatic int j = i;
      fork pe_fir(j); join_none
    end
    io_wr(10'h301, CW_RUN);
    for (int n = 0; n < M; n++) begin
      do io_rd(10'h302, st); while (!st[SR_FFH_N]);
      io_wr(10'h300, X[n]);
    end
    do begin io_rd(10'h302, st); repeat (20) @(negedge clk); end while (!st[SR_TRAPH]);
    io_wr(10'h301, CW_BUS_REQ);
    do io_rd(10'h302, st); while (st[SR_BGH_N]);
    io_wr(10'h301, CW_BUS_REQ | (8'(1) << CR_MS) | 8'((N - 1) << CR_PESL));
    for (int n = 0; n < M; n++) begin
      mem_rd(16'h3000 + 16'(2 * n), d); chk(d, Y[n], "FIR output");
    end
    io_wr(10'h301, CW_HALT);

    $display("ring=%0d y_irq=%0d intbuf=%0d x_stall=%0d", n_ring, n_yirq, n_intbuf, n_xstall);
    checks++; if (n_ring == 0)   begin failures++; $display("FAIL no ring transfer"); end
    checks++; if (n_yirq == 0)   begin failures++; $display("FAIL no Y interrupt"); end
    checks++; if (n_xstall == 0) begin failures++; $display("FAIL no X stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
