// status_register: 8-bit host input port (I/O 302H) of the interface card.
//
// While the port select IO3# and the host I/O read IOR# are both low it
// drives the array status onto SD7..SD0: bit 0 BGH# (every PE has granted
// its bus), bit 1 TRAPH (every PE has executed TRAP), bit 2 FFH# (the XFIFO
// of the first PE is full). Bits 7..3 are unused and read as 0. The
// tri-state buffer of the card becomes a data output plus an output enable
// (sd_oe); combinational.
module status_register (
  input  logic       io3_n,
  input  logic       ior_n,
  input  logic       bgh_n,
  input  logic       traph,
  input  logic       ffh_n,
  output logic [7:0] sd,
  output logic       sd_oe
);
  always_comb begin
    sd_oe = !io3_n && !ior_n;
    sd    = '0;
    if (sd_oe) begin
      sd[adsp_array_pkg::SR_BGH_N] = bgh_n;
      sd[adsp_array_pkg::SR_TRAPH] = traph;
      sd[adsp_array_pkg::SR_FFH_N] = ffh_n;
    end
  end
endmodule
