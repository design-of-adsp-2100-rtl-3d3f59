// ffh_irq_latch: host interrupt from the full flag of the first XFIFO.
//
// The full flag FFH# is sampled at the end (rising edge) of every host I/O
// write and the sampled value drives the interrupt line chosen by a jumper
// on the card. Once the XFIFO has filled, the next I/O write therefore
// raises the interrupt, and the host waits in its service routine until the
// FIFO drains. The rising edge of IOW# is detected with one register on the
// clock; irq is active high (ISA convention) and changes in the cycle after
// the edge.
module ffh_irq_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic iow_n,
  input  logic ffh_n,
  output logic irq
);
  logic iow_n_q;
  logic ffh_n_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iow_n_q <= 1'b1;
      ffh_n_l <= 1'b1;
    end else begin
      iow_n_q <= iow_n;
      if (iow_n && !iow_n_q) ffh_n_l <= ffh_n;  // rising edge of IOW#
    end
  end

  assign irq = !ffh_n_l;
endmodule
