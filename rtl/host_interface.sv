// host_interface: the PC plug-in card that connects the host to the array.
//
// It decodes the three host I/O ports (XFIFO of the first PE at 300H,
// control register at 301H, status register at 302H), holds the control
// register whose eight bits are broadcast on the backplane, returns the
// status register (bus grant, trap, XFIFO full), asserts IOCS16# for the
// 16-bit XFIFO port, forms the write strobe for the first XFIFO, latches the
// XFIFO-full flag into a host interrupt, and generates the master chip
// select MCS# from SA19..SA16/AEN and a switch setting. The address, data
// and control buffers of the card are wires here. The control register and
// interrupt latch are clocked by clk; everything else is combinational.
module host_interface (
  input  logic        clk,
  input  logic        rst_n,      // host RESET DRV, active low
  // host ISA bus
  input  logic [19:0] sa,
  input  logic        aen,
  input  logic        iow_n,
  input  logic        ior_n,
  input  logic [15:0] sd_w,       // data written by the host
  output logic [7:0]  sd_r,       // status register read data
  output logic        sd_oe,      // card drives SD7..SD0
  output logic        iocs16_n,
  output logic        irq,
  input  logic [4:0]  dip,
  // to/from the backplane
  output logic [7:0]  cr,
  output logic        wrxf1_n,    // write strobe to XFIFO of the first PE
  output logic        mcs_n,
  input  logic        bgh_n,
  input  logic        traph,
  input  logic        ffh_n
);
  logic io1_n, io2_n, io3_n;

  io_port_select u_iosel (
    .sa(sa[9:0]), .aen(aen), .io1_n(io1_n), .io2_n(io2_n), .io3_n(io3_n)
  );

  control_register u_cr (
    .clk(clk), .rst_n(rst_n), .io2_n(io2_n), .iow_n(iow_n), .sd(sd_w[7:0]), .cr(cr)
  );

  status_register u_sr (
    .io3_n(io3_n), .ior_n(ior_n), .bgh_n(bgh_n), .traph(traph), .ffh_n(ffh_n),
    .sd(sd_r), .sd_oe(sd_oe)
  );

  ffh_irq_latch u_irq (
    .clk(clk), .rst_n(rst_n), .iow_n(iow_n), .ffh_n(ffh_n), .irq(irq)
  );

  master_cs u_mcs (
    .sa_hi(sa[19:16]), .aen(aen), .dip(dip), .mcs_n(mcs_n)
  );

  assign iocs16_n = io1_n;
  assign wrxf1_n  = io1_n | iow_n;
endmodule
