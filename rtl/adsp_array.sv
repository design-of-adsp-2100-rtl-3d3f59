// adsp_array: linear array of ADSP-2100 processing elements on a PC host.
//
// N_PE processing-element cards (up to eight) sit on a backplane with the
// host interface card. Three channels connect them:
//  * the broadcast (global) bus: host address, data, memory strobes and the
//    eight control-register lines reach every PE; with the processors'
//    buses granted, the host loads program and data into one PE (PE select)
//    or into all at once (BC#) and reads results back. MCS# from the
//    interface card takes the place of AEN for the PEs' chip selects.
//  * the X channel: the host writes raw data into the XFIFO of the first PE
//    (I/O port 300H); each PE passes words on to the next PE's XFIFO; the
//    last PE's X output is not connected.
//  * the Y channel: a forward and a backward FIFO between neighbours, closed
//    into a ring from the last PE back to the first, for partial results.
// The bus-grant, trap and MEMCS16# daisy chains run from the last PE to the
// first and end at the host's status register and MEMCS16#. RESET# is the
// host's HRS# ANDed with the power-on reset and registered on the master
// clock. The processors themselves are not part of this RTL: the proc_*
// arrays are the ADSP-2100 pins of every PE, index 0 nearest the host.
// Host read data from the PEs and the status register are ORed onto sd_r,
// with sd_oe telling when the array drives the host data bus.
module adsp_array #(
  parameter int N_PE = 8
) (
  input  logic        clk,          // master clock
  input  logic        por_n,        // power-on / push-button reset
  // host (ISA) bus
  input  logic [19:0] sa,
  input  logic [15:0] sd_w,
  output logic [15:0] sd_r,
  output logic        sd_oe,
  input  logic        aen,
  input  logic        iow_n,
  input  logic        ior_n,
  input  logic        memr_n,
  input  logic        memw_n,
  input  logic        sbhe_n,
  output logic        memcs16_n,
  output logic        iocs16_n,
  output logic        irq,
  input  logic [4:0]  dip,
  // ADSP-2100 pins of each PE
  input  logic [13:0] proc_dma    [N_PE],
  input  logic        proc_dmrd_n [N_PE],
  input  logic        proc_dmwr_n [N_PE],
  input  logic [15:0] proc_dmd_o  [N_PE],
  output logic [15:0] proc_dmd_i  [N_PE],
  output logic        proc_dmack  [N_PE],
  input  logic [13:0] proc_pma    [N_PE],
  input  logic        proc_pmda   [N_PE],
  input  logic        proc_pmrd_n [N_PE],
  input  logic        proc_pmwr_n [N_PE],
  input  logic [23:0] proc_pmd_o  [N_PE],
  output logic [23:0] proc_pmd_i  [N_PE],
  output logic        proc_br_n   [N_PE],
  input  logic        proc_bg_n   [N_PE],
  output logic        proc_reset_n[N_PE],
  output logic        proc_halt_n [N_PE],
  input  logic        proc_trap   [N_PE],
  output logic [3:0]  proc_irq_n  [N_PE]
);
  import adsp_array_pkg::*;

  logic [7:0] cr;
  logic       wrxf1_n, mcs_n, reset_n;
  logic [7:0] sr_d;
  logic       sr_oe;

  // per-PE links; index i+1 is the right neighbour of i (ring for Y)
  logic        bgo_n [N_PE], htro [N_PE], mcs16o_n [N_PE];
  logic [15:0] xd [N_PE];
  logic        xwr_n [N_PE], xff_n [N_PE];
  logic [15:0] yd [N_PE];
  logic        ywr_n [N_PE], yff_n [N_PE];
  logic [15:0] ybq [N_PE];
  logic        ybrd_n [N_PE], ybef_n [N_PE];
  logic [15:0] pe_sd [N_PE];
  logic        pe_oe [N_PE];

  host_interface u_host (
    .clk(clk), .rst_n(por_n), .sa(sa), .aen(aen), .iow_n(iow_n), .ior_n(ior_n),
    .sd_w(sd_w), .sd_r(sr_d), .sd_oe(sr_oe), .iocs16_n(iocs16_n), .irq(irq), .dip(dip),
    .cr(cr), .wrxf1_n(wrxf1_n), .mcs_n(mcs_n),
    .bgh_n(bgo_n[0]), .traph(htro[0]), .ffh_n(xff_n[0])
  );

  reset_gen u_rst (.clk(clk), .por_n(por_n), .hrs_n(cr[CR_HRS_N]), .reset_n(reset_n));

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    localparam int R = (i + 1) % N_PE;   // right neighbour (ring for Y)
    localparam int L = (i + N_PE - 1) % N_PE;
    localparam bit LAST = (i == N_PE - 1);

    pe_card #(.PE_ID(i)) u_pe (
      .clk(clk),
      .proc_dma(proc_dma[i]), .proc_dmrd_n(proc_dmrd_n[i]), .proc_dmwr_n(proc_dmwr_n[i]),
      .proc_dmd_o(proc_dmd_o[i]), .proc_dmd_i(proc_dmd_i[i]), .proc_dmack(proc_dmack[i]),
      .proc_pma(proc_pma[i]), .proc_pmda(proc_pmda[i]), .proc_pmrd_n(proc_pmrd_n[i]),
      .proc_pmwr_n(proc_pmwr_n[i]), .proc_pmd_o(proc_pmd_o[i]), .proc_pmd_i(proc_pmd_i[i]),
      .proc_br_n(proc_br_n[i]), .proc_bg_n(proc_bg_n[i]), .proc_reset_n(proc_reset_n[i]),
      .proc_halt_n(proc_halt_n[i]), .proc_trap(proc_trap[i]), .proc_irq_n(proc_irq_n[i]),
      .reset_n(reset_n), .sa(sa[15:0]), .sd_w(sd_w), .memr_n(memr_n), .memw_n(memw_n),
      .sbhe_n(sbhe_n), .aen(mcs_n), .cr(cr), .sd_r(pe_sd[i]), .sd_r_oe(pe_oe[i]),
      .bghi_n(LAST ? 1'b0 : bgo_n[R]), .bgho_n(bgo_n[i]),
      .htrapi(LAST ? 1'b1 : htro[R]), .htrapo(htro[i]),
      .memcs16i_n(LAST ? 1'b1 : mcs16o_n[R]), .memcs16o_n(mcs16o_n[i]),
      // X: input from the left PE (the host for PE 0), output to the right
      .xin_d(i == 0 ? sd_w : xd[L]), .xin_wr_n(i == 0 ? wrxf1_n : xwr_n[L]),
      .xf1_ff_n(xff_n[i]),
      .xout_d(xd[i]), .xout_wr_n(xwr_n[i]), .ffxf2_n(LAST ? 1'b1 : xff_n[R]),
      // Y forward ring
      .yin_d(yd[L]), .yin_wr_n(ywr_n[L]), .yf1_ff_n(yff_n[i]),
      .yout_d(yd[i]), .yout_wr_n(ywr_n[i]), .ffyf2_n(yff_n[R]),
      // Y backward ring
      .yf1d_q(ybq[i]), .yf1d_rd_n(ybrd_n[L]), .yf1d_ef_n(ybef_n[i]),
      .yf2d_q(ybq[R]), .yf2d_rd_n(ybrd_n[i]), .efyf2d_n(ybef_n[R])
    );
  end

  assign memcs16_n = mcs16o_n[0];

  always_comb begin
    sd_r  = {8'h00, sr_d};
    sd_oe = sr_oe;
    for (int i = 0; i < N_PE; i++) begin
      sd_r  = sd_r | pe_sd[i];
      sd_oe = sd_oe | pe_oe[i];
    end
  end

  // The X output of the last PE is not connected.
  logic [15:0] unused_xout;
  logic        unused_xwr;
  assign unused_xout = xd[N_PE-1];
  assign unused_xwr  = xwr_n[N_PE-1];
endmodule
