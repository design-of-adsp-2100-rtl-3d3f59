// io_port_select: host I/O port-select generator of the interface card.
//
// Compares the host address SA9..SA0 with the three I/O ports of the array
// while AEN is low (a processor cycle, not DMA) and drives one active-low
// select per port: IO1 for the XFIFO of the first PE (300H), IO2 for the
// control register (301H) and IO3 for the status register (302H). The port
// numbers are the ones of the original card; they are parameters here so the
// array can be moved in I/O space. Purely combinational; I/O read/write
// strobes are applied by the registers that use the selects.
module io_port_select #(
  parameter logic [9:0] XF_PORT = adsp_array_pkg::IO_XFIFO,
  parameter logic [9:0] CR_PORT = adsp_array_pkg::IO_CTRL,
  parameter logic [9:0] SR_PORT = adsp_array_pkg::IO_STATUS
) (
  input  logic [9:0] sa,
  input  logic       aen,
  output logic       io1_n,
  output logic       io2_n,
  output logic       io3_n
);
  always_comb begin
    io1_n = !(!aen && sa == XF_PORT);
    io2_n = !(!aen && sa == CR_PORT);
    io3_n = !(!aen && sa == SR_PORT);
  end
endmodule
