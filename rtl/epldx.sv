// epldx: X-channel decoder for single-cycle multiple-destination transfers.
//
// The DM address space of the processor is cut into eight 2K-word slots by
// DMA13..DMA11. A read (DMRD#) or write (DMWR#) in a slot turns into one or
// more strobes at once, so that, for example, a single read of slot 7 moves
// a word from the input FIFO XF1 into the processor, into the transfer
// memory DMT and into the next PE's XFIFO (XF2) in the same cycle:
//   slot 0  DM <-> processor (CSDM#)
//   slot 1  write: processor -> XF2          read: no operation
//   slot 2  DMT <-> processor
//   slot 3  DMT -> processor and XF2 / processor -> DMT and XF2
//   slot 4  read XF1                         write: no operation
//   slot 5  read XF1, copy to XF2
//   slot 6  read XF1, copy to DMT
//   slot 7  read XF1, copy to DMT and XF2    write: retransmit XF1
// The XF1 read and XF2 write requests (RDXF1D#, WRXF2D#) pass through the
// flow control before reaching the FIFOs. All outputs are active low and
// combinational; CSDM# is the slot-0 decode alone, as on the board.
module epldx
  import adsp_array_pkg::*;
(
  input  logic [2:0] dma_hi,   // DMA13..DMA11
  input  logic       dmrd_n,
  input  logic       dmwr_n,
  output logic       csdm_n,
  output logic       rdxf1d_n,
  output logic       rddmt_n,
  output logic       wrdmt_n,
  output logic       wrxf2d_n,
  output logic       rtxf1_n
);
  xslot_e slot;
  logic   rd, wr;

  always_comb begin
    slot = xslot_e'(dma_hi);
    rd   = !dmrd_n;
    wr   = !dmwr_n;

    csdm_n   = !(slot == XS_DM);
    rdxf1d_n = !(rd && dma_hi[2]);
    rddmt_n  = !(rd && (slot == XS_DMT || slot == XS_DMT_XF2));
    wrdmt_n  = !((wr && (slot == XS_DMT || slot == XS_DMT_XF2)) ||
                 (rd && (slot == XS_XF1_DMT || slot == XS_XF1_ALL)));
    wrxf2d_n = !((wr && (slot == XS_XF2 || slot == XS_DMT_XF2)) ||
                 (rd && (slot == XS_DMT_XF2 || slot == XS_XF1_XF2 || slot == XS_XF1_ALL)));
    rtxf1_n  = !(wr && slot == XS_XF1_ALL);
  end
endmodule
