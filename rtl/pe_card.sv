// pe_card: one processing element of the array, without its processor.
//
// The card carries the memories and communication ports around an ADSP-2100
// whose bus signals are this module's proc_* ports:
//   DM   2K x 16, DM addresses 0-2K         DMT  2K x 16, X transfer memory
//   PM   8K x 24, program part of PM space  PMDM 2K x 16, PM data 16K-18K
//   PMT  2K x 16, Y transfer memory         XF1, YF1, YF1D FIFOs (1K deep)
// Every DM access goes through the X-channel decoder (epldx) and every PM
// data access (PMDA high) through the Y-channel decoder (epldy). One
// processor read or write can therefore move a word to several places in a
// single cycle; e.g. a read of DM slot 7 takes the head of XF1 into the
// processor, writes it to DMT at DMA10..0 and writes it into the right PE's
// XFIFO. X-channel strobes pass through xflow_ctrl, which holds DMACK low
// while XF1 is empty or XF2 full; Y-channel accesses to a FIFO whose flag is
// set raise a processor interrupt through yflow_ctrl.
// The buses DMD and PMD of the board are multiplexers here: dmd_bus is the
// word on the DM data bus in this cycle (the read source chosen by the
// decoder, or the processor's write data) and is also the data sent to the
// right PE's XFIFO; PM-side 16-bit data use PMD23..8.
// While the processor grants its bus to the host (proc_bg_n low), the host
// reads and writes DM, PMDM and the three bytes of PM through
// pe_global_if's chip selects, with host addresses in place of the
// processor's. Writes to memories and FIFOs take effect on the rising clock
// edge; reads are combinational.
module pe_card #(
  parameter int PE_ID      = 0,
  parameter int DM_WORDS   = 2048,
  parameter int PM_WORDS   = 8192,
  parameter int FIFO_DEPTH = 1024
) (
  input  logic        clk,
  // ADSP-2100 bus
  input  logic [13:0] proc_dma,
  input  logic        proc_dmrd_n,
  input  logic        proc_dmwr_n,
  input  logic [15:0] proc_dmd_o,
  output logic [15:0] proc_dmd_i,
  output logic        proc_dmack,
  input  logic [13:0] proc_pma,
  input  logic        proc_pmda,
  input  logic        proc_pmrd_n,
  input  logic        proc_pmwr_n,
  input  logic [23:0] proc_pmd_o,
  output logic [23:0] proc_pmd_i,
  output logic        proc_br_n,
  input  logic        proc_bg_n,
  output logic        proc_reset_n,
  output logic        proc_halt_n,
  input  logic        proc_trap,
  output logic [3:0]  proc_irq_n,
  // broadcast bus from the host
  input  logic        reset_n,
  input  logic [15:0] sa,
  input  logic [15:0] sd_w,
  input  logic        memr_n,
  input  logic        memw_n,
  input  logic        sbhe_n,
  input  logic        aen,
  input  logic [7:0]  cr,
  output logic [15:0] sd_r,
  output logic        sd_r_oe,
  // daisy chains (in from the right PE, out to the left)
  input  logic        bghi_n,
  output logic        bgho_n,
  input  logic        htrapi,
  output logic        htrapo,
  input  logic        memcs16i_n,
  output logic        memcs16o_n,
  // X channel: XF1 written from the left, XF2 is the right PE's XF1
  input  logic [15:0] xin_d,
  input  logic        xin_wr_n,
  output logic        xf1_ff_n,
  output logic [15:0] xout_d,
  output logic        xout_wr_n,
  input  logic        ffxf2_n,
  // Y channel forward: YF1 written from the left, YF2 is the right PE's YF1
  input  logic [15:0] yin_d,
  input  logic        yin_wr_n,
  output logic        yf1_ff_n,
  output logic [15:0] yout_d,
  output logic        yout_wr_n,
  input  logic        ffyf2_n,
  // Y channel backward: YF1D read by the left PE, YF2D is the right PE's YF1D
  output logic [15:0] yf1d_q,
  input  logic        yf1d_rd_n,
  output logic        yf1d_ef_n,
  input  logic [15:0] yf2d_q,
  output logic        yf2d_rd_n,
  input  logic        efyf2d_n
);
  import adsp_array_pkg::*;

  localparam int DAW = $clog2(DM_WORDS);
  localparam int PAW = $clog2(PM_WORDS);

  // ---------------------------------------------------------------- control
  logic host_mode;
  assign host_mode    = !proc_bg_n;
  assign proc_br_n    = cr[CR_HBR_N];
  assign proc_halt_n  = cr[CR_HLT_N];
  assign proc_reset_n = reset_n;

  // processor strobes, inactive while the bus is granted to the host
  logic dmrd_n, dmwr_n, pmrd_n, pmwr_n;
  assign dmrd_n = proc_dmrd_n | host_mode;
  assign dmwr_n = proc_dmwr_n | host_mode;
  assign pmrd_n = proc_pmrd_n | host_mode;
  assign pmwr_n = proc_pmwr_n | host_mode;

  // ---------------------------------------------------------------- host side
  logic u1;
  logic hcs_pmu_n, hcs_pmm_n, hcs_pml_n, hcs_pmdml_n, hcs_pmdmu_n, hcs_dml_n, hcs_dmu_n;

  pe_global_if #(.PE_ID(PE_ID)) u_gif (
    .sa(sa), .sbhe_n(sbhe_n), .aen(aen), .ms(cr[CR_MS]),
    .pes({cr[CR_PESU], cr[CR_PESM], cr[CR_PESL]}), .bc_n(cr[CR_BC_N]),
    .bg_n(proc_bg_n), .trap(proc_trap),
    .bghi_n(bghi_n), .bgho_n(bgho_n), .htrapi(htrapi), .htrapo(htrapo),
    .memcs16i_n(memcs16i_n), .memcs16o_n(memcs16o_n), .u1(u1),
    .hcs_pmu_n(hcs_pmu_n), .hcs_pmm_n(hcs_pmm_n), .hcs_pml_n(hcs_pml_n),
    .hcs_pmdml_n(hcs_pmdml_n), .hcs_pmdmu_n(hcs_pmdmu_n),
    .hcs_dml_n(hcs_dml_n), .hcs_dmu_n(hcs_dmu_n)
  );

  logic hw;  // host memory write
  assign hw = !memw_n;

  // ---------------------------------------------------------------- decoders
  logic csdm_n, rdxf1d_n, rddmt_n, wrdmt_n, wrxf2d_n, rtxf1_n;
  epldx u_epldx (
    .dma_hi(proc_dma[13:11]), .dmrd_n(dmrd_n), .dmwr_n(dmwr_n),
    .csdm_n(csdm_n), .rdxf1d_n(rdxf1d_n), .rddmt_n(rddmt_n), .wrdmt_n(wrdmt_n),
    .wrxf2d_n(wrxf2d_n), .rtxf1_n(rtxf1_n)
  );

  logic cspmdm_n, rdyf1_n, rdpmt_n, rdyf2d_n, wryf1d_n, wryf2_n, wrpmt_n, intbuf_n;
  epldy u_epldy (
    .pmda(proc_pmda), .pma_hi(proc_pma[13:11]), .pmrd_n(pmrd_n), .pmwr_n(pmwr_n),
    .cspmdm_n(cspmdm_n), .rdyf1_n(rdyf1_n), .rdpmt_n(rdpmt_n), .rdyf2d_n(rdyf2d_n),
    .wryf1d_n(wryf1d_n), .wryf2_n(wryf2_n), .wrpmt_n(wrpmt_n), .intbuf_n(intbuf_n)
  );

  // ---------------------------------------------------------------- X channel
  logic        rdxf1_n, wrxf2_n;
  logic [15:0] xf1_q;
  logic        xf1_ef_n;

  xflow_ctrl u_xflow (
    .rdxf1d_n(rdxf1d_n), .wrxf2d_n(wrxf2d_n), .efxf1_n(xf1_ef_n), .ffxf2_n(ffxf2_n),
    .rdxf1_n(rdxf1_n), .wrxf2_n(wrxf2_n), .dmack(proc_dmack)
  );

  fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(16)) u_xf1 (
    .clk(clk), .rst_n(reset_n), .wr_n(xin_wr_n), .rd_n(rdxf1_n), .rt_n(rtxf1_n),
    .din(xin_d), .dout(xf1_q), .ef_n(xf1_ef_n), .ff_n(xf1_ff_n)
  );

  // DM and DMT
  logic [15:0] dm_q, dmt_q, dmd_bus;
  logic [DAW-1:0] dm_addr;
  logic [1:0]  dm_we;
  logic [15:0] dm_wd;

  always_comb begin
    if (host_mode) begin
      dm_addr = sa[DAW:1];
      dm_we   = {hw && !hcs_dmu_n, hw && !hcs_dml_n};
      dm_wd   = sd_w;
    end else begin
      dm_addr = proc_dma[DAW-1:0];
      dm_we   = {2{!csdm_n && !dmwr_n}};
      dm_wd   = proc_dmd_o;
    end
  end

  sram #(.WORDS(DM_WORDS), .WIDTH(16)) u_dm (
    .clk(clk), .we(dm_we), .addr(dm_addr), .wdata(dm_wd), .rdata(dm_q)
  );

  // word on the DM data bus in this cycle
  always_comb begin
    if (!dmrd_n) begin
      if (!csdm_n)        dmd_bus = dm_q;
      else if (!rddmt_n)  dmd_bus = dmt_q;
      else if (!rdxf1d_n) dmd_bus = xf1_q;
      else                dmd_bus = '0;     // no operation slot
    end else begin
      dmd_bus = proc_dmd_o;
    end
  end

  sram #(.WORDS(DM_WORDS), .WIDTH(16)) u_dmt (
    .clk(clk), .we({2{!wrdmt_n && proc_dmack}}),
    .addr(proc_dma[DAW-1:0]), .wdata(dmd_bus), .rdata(dmt_q)
  );

  assign proc_dmd_i = dmrd_n ? '0 : dmd_bus;
  assign xout_d     = dmd_bus;
  assign xout_wr_n  = wrxf2_n;

  // ---------------------------------------------------------------- Y channel
  logic [15:0] yf1_q, pmdm_q, pmt_q, pmd_bus;
  logic        yf1_ef_n, yf1d_ff_n;
  logic [3:0]  ystat;

  fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(16)) u_yf1 (
    .clk(clk), .rst_n(reset_n), .wr_n(yin_wr_n), .rd_n(rdyf1_n), .rt_n(1'b1),
    .din(yin_d), .dout(yf1_q), .ef_n(yf1_ef_n), .ff_n(yf1_ff_n)
  );

  fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(16)) u_yf1d (
    .clk(clk), .rst_n(reset_n), .wr_n(wryf1d_n), .rd_n(yf1d_rd_n), .rt_n(1'b1),
    .din(proc_pmd_o[23:8]), .dout(yf1d_q), .ef_n(yf1d_ef_n), .ff_n(yf1d_ff_n)
  );

  yflow_ctrl u_yflow (
    .rdyf1_n(rdyf1_n), .wryf1d_n(wryf1d_n), .rdyf2d_n(rdyf2d_n), .wryf2_n(wryf2_n),
    .efyf1_n(yf1_ef_n), .ffyf1d_n(yf1d_ff_n), .efyf2d_n(efyf2d_n), .ffyf2_n(ffyf2_n),
    .irq_n(proc_irq_n), .status(ystat)
  );

  // word on PMD23..8 in this cycle (PM data accesses)
  always_comb begin
    if (!pmrd_n && proc_pmda) begin
      if (!cspmdm_n)      pmd_bus = pmdm_q;
      else if (!rdyf2d_n) pmd_bus = yf2d_q;
      else if (!rdpmt_n)  pmd_bus = pmt_q;
      else if (!rdyf1_n)  pmd_bus = yf1_q;
      else if (!intbuf_n) pmd_bus = {12'h000, ystat};
      else                pmd_bus = '0;     // no operation slot
    end else begin
      pmd_bus = proc_pmd_o[23:8];
    end
  end

  // PMDM: host bytes PMDML (even, SD7..0) -> PMD15..8, PMDMU (odd) -> PMD23..16
  logic [DAW-1:0] pmdm_addr;
  logic [1:0]     pmdm_we;
  logic [15:0]    pmdm_wd;
  always_comb begin
    if (host_mode) begin
      pmdm_addr = sa[DAW:1];
      pmdm_we   = {hw && !hcs_pmdmu_n, hw && !hcs_pmdml_n};
      pmdm_wd   = sd_w;
    end else begin
      pmdm_addr = proc_pma[DAW-1:0];
      pmdm_we   = {2{!cspmdm_n && !pmwr_n}};
      pmdm_wd   = proc_pmd_o[23:8];
    end
  end

  sram #(.WORDS(DM_WORDS), .WIDTH(16)) u_pmdm (
    .clk(clk), .we(pmdm_we), .addr(pmdm_addr), .wdata(pmdm_wd), .rdata(pmdm_q)
  );

  sram #(.WORDS(DM_WORDS), .WIDTH(16)) u_pmt (
    .clk(clk), .we({2{!wrpmt_n}}), .addr(proc_pma[DAW-1:0]), .wdata(pmd_bus), .rdata(pmt_q)
  );

  assign yout_d    = proc_pmd_o[23:8];
  assign yout_wr_n = wryf2_n;
  assign yf2d_rd_n = rdyf2d_n;

  // PM (program part): host bytes PMU -> PMD23..16, PMM -> PMD15..8, PML -> PMD7..0
  logic [23:0]    pm_q, pm_wd;
  logic [PAW-1:0] pm_addr;
  logic [2:0]     pm_we;
  logic           pm_proc;
  assign pm_proc = !proc_pmda;
  always_comb begin
    if (host_mode) begin
      pm_addr = !hcs_pml_n ? sa[PAW-1:0] : sa[PAW:1];
      pm_we   = {hw && !hcs_pmu_n, hw && !hcs_pmm_n, hw && !hcs_pml_n};
      pm_wd   = {sd_w[7:0], sd_w[15:8], sd_w[7:0]};
    end else begin
      pm_addr = proc_pma[PAW-1:0];
      pm_we   = {3{pm_proc && !pmwr_n}};
      pm_wd   = proc_pmd_o;
    end
  end

  sram #(.WORDS(PM_WORDS), .WIDTH(24)) u_pm (
    .clk(clk), .we(pm_we), .addr(pm_addr), .wdata(pm_wd), .rdata(pm_q)
  );

  always_comb begin
    if (pmrd_n)       proc_pmd_i = '0;
    else if (pm_proc) proc_pmd_i = pm_q;
    else              proc_pmd_i = {pmd_bus, 8'h00};
  end

  // ---------------------------------------------------------------- host reads
  always_comb begin
    sd_r = '0;
    if (!memr_n) begin
      if (!hcs_pmu_n)   sd_r[7:0]  = pm_q[23:16];
      if (!hcs_pmm_n)   sd_r[15:8] = pm_q[15:8];
      if (!hcs_pml_n)   sd_r[7:0]  = pm_q[7:0];
      if (!hcs_pmdml_n) sd_r[7:0]  = pmdm_q[7:0];
      if (!hcs_pmdmu_n) sd_r[15:8] = pmdm_q[15:8];
      if (!hcs_dml_n)   sd_r[7:0]  = dm_q[7:0];
      if (!hcs_dmu_n)   sd_r[15:8] = dm_q[15:8];
    end
    sd_r_oe = !memr_n && !(hcs_pmu_n && hcs_pmm_n && hcs_pml_n && hcs_pmdml_n &&
                           hcs_pmdmu_n && hcs_dml_n && hcs_dmu_n);
  end

  // U1 is folded into the chip selects; it is not used on its own
  logic unused_u1;
  assign unused_u1 = u1;
endmodule
