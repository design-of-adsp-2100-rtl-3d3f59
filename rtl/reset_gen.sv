// reset_gen: backplane reset of the array.
//
// The host's software reset HRS# (control register bit 0) is ANDed with the
// push-button/power-on reset and clocked into a D flip-flop by the master
// clock; its output is RESET#, broadcast to every processor and every FIFO.
// RESET# therefore follows either source one master-clock edge later. The
// RC network and push button are outside the logic and arrive as por_n.
module reset_gen (
  input  logic clk,
  input  logic por_n,
  input  logic hrs_n,
  output logic reset_n
);
  always_ff @(posedge clk) reset_n <= hrs_n & por_n;
endmodule
