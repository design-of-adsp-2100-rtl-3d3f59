// sram: static RAM of the PE card (DM, DMT, PMDM, PMT and PM).
//
// One array of WORDS words of WIDTH bits, built on the board from byte-wide
// chips; each byte lane has its own write enable because the host loads the
// bytes separately. Reads are asynchronous (rdata follows addr in the same
// cycle, like the static parts); writes happen on the rising clock edge
// while the lane's enable is high. Contents are not reset.
module sram #(
  parameter int WORDS = 2048,
  parameter int WIDTH = 16,
  localparam int BYTES = WIDTH / 8,
  localparam int AW    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic [BYTES-1:0] we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int b = 0; b < BYTES; b++)
      if (we[b]) mem[addr][b*8 +: 8] <= wdata[b*8 +: 8];
  end

  assign rdata = mem[addr];
endmodule
