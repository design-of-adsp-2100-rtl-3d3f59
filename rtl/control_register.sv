// control_register: 8-bit host output port (I/O 301H) of the interface card.
//
// Holds the control lines that the host drives onto the backplane: HRS#
// (software reset), HBR# (bus request), PESL/PESM/PESU (PE select), BC#
// (broadcast), HLT# (halt) and MS (memory select); bit positions are in
// adsp_array_pkg. The original card uses a permanently enabled transparent
// latch; here the word is loaded on the clock edge in which both the port
// select IO2# and the host I/O write IOW# are low, and is visible from the
// next cycle. The reset value 63H (no reset, no bus request, no broadcast,
// no halt, MS=0) is this design's choice.
module control_register #(
  parameter logic [7:0] RESET_VALUE = adsp_array_pkg::CW_RUN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       io2_n,
  input  logic       iow_n,
  input  logic [7:0] sd,
  output logic [7:0] cr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cr <= RESET_VALUE;
    else if (!io2_n && !iow_n)  cr <= sd;
  end
endmodule
