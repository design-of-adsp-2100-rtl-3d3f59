// xflow_ctrl: run-time flow control of the X channel.
//
// A processor read of the input FIFO XF1 (RDXF1D# from the decoder) or a
// write to the next PE's XFIFO XF2 (WRXF2D#) is let through only when it can
// complete: XF1 not empty (EFXF1# high) for a read, XF2 not full (FFXF2#
// high) for a write. Otherwise DMACK is pulled low, the processor waits, and
// the strobe is held back until the flag clears; in that same cycle DMACK
// returns high and the real strobe (RDXF1# / WRXF2#) is issued. When one
// instruction both reads XF1 and writes XF2, either flag holds both strobes,
// so the two transfers happen together. The flags come from the FIFOs'
// registered flag outputs, which change on the clock edge of the last valid
// access; they play the part of the flag latches of the board. Combinational.
module xflow_ctrl (
  input  logic rdxf1d_n,
  input  logic wrxf2d_n,
  input  logic efxf1_n,
  input  logic ffxf2_n,
  output logic rdxf1_n,
  output logic wrxf2_n,
  output logic dmack
);
  logic rd_req, wr_req, stall;

  always_comb begin
    rd_req  = !rdxf1d_n;
    wr_req  = !wrxf2d_n;
    stall   = (rd_req && !efxf1_n) || (wr_req && !ffxf2_n);
    dmack   = !stall;
    rdxf1_n = !(rd_req && !stall);
    wrxf2_n = !(wr_req && !stall);
  end
endmodule
