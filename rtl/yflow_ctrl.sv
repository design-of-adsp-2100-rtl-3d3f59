// yflow_ctrl: run-time flow control of the Y channel.
//
// The Y channel is guarded by software and hardware together. The empty
// flags of YF1 (this PE's forward input) and YF2D (the right PE's backward
// FIFO) and the full flags of YF1D (this PE's backward output) and YF2 (the
// right PE's forward input) are watched; when the processor tries to read or
// write a FIFO whose flag is active, the matching interrupt line is pulled
// low for that cycle (the FIFO itself ignores the access). The interrupt
// routine polls the flags through INTBUF and repeats the aborted transfer.
//   irq_n[0]  read of empty YF1      irq_n[1]  write of full YF1D
//   irq_n[2]  read of empty YF2D     irq_n[3]  write of full YF2
// The flag inputs are the FIFOs' registered flags, updated on the edge of
// the last valid access. status is the flag word presented through INTBUF:
// {FFYF2#, EFYF2D#, FFYF1D#, EFYF1#}. Combinational.
module yflow_ctrl (
  input  logic       rdyf1_n,
  input  logic       wryf1d_n,
  input  logic       rdyf2d_n,
  input  logic       wryf2_n,
  input  logic       efyf1_n,
  input  logic       ffyf1d_n,
  input  logic       efyf2d_n,
  input  logic       ffyf2_n,
  output logic [3:0] irq_n,
  output logic [3:0] status
);
  always_comb begin
    irq_n[0] = !(!rdyf1_n  && !efyf1_n);
    irq_n[1] = !(!wryf1d_n && !ffyf1d_n);
    irq_n[2] = !(!rdyf2d_n && !efyf2d_n);
    irq_n[3] = !(!wryf2_n  && !ffyf2_n);
    status   = {ffyf2_n, efyf2d_n, ffyf1d_n, efyf1_n};
  end
endmodule
