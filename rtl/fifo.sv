// fifo: first-in first-out port used on the X and Y channels (XF1, YF1, YF1D).
//
// Behaves like the 1K-deep catalogue FIFO of the PE card (two 9-bit parts
// side by side give 16 bits): active-low write, read and retransmit inputs,
// active-low empty (ef_n) and full (ff_n) flags. A write of a full FIFO and
// a read of an empty FIFO are ignored. The word at the head is always on
// dout, so a one-cycle read strobe carries it to the reader and the pointer
// moves on at the clock edge. Retransmit returns the read pointer to the
// first word written since reset, so the data can be read again (valid while
// fewer than DEPTH words have been written since reset). Flags are
// registered: they change on the clock edge of the access that empties or
// fills the FIFO, so the very next access sees them.
module fifo #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_n,
  input  logic             rd_n,
  input  logic             rt_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             ef_n,
  output logic             ff_n
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;
  logic [AW:0]      wptr_nx, rptr_nx, used_nx;

  assign do_wr = !wr_n && ff_n;
  assign do_rd = !rd_n && ef_n;

  always_comb begin
    wptr_nx = wptr + (AW+1)'(do_wr);
    if (!rt_n) rptr_nx = '0;
    else       rptr_nx = rptr + (AW+1)'(do_rd);
    used_nx = wptr_nx - rptr_nx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      ef_n <= 1'b0;
      ff_n <= 1'b1;
    end else begin
      wptr <= wptr_nx;
      rptr <= rptr_nx;
      ef_n <= (used_nx != '0);
      ff_n <= (used_nx != (AW+1)'(DEPTH));
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= din;
  end

  assign dout = mem[rptr[AW-1:0]];
endmodule
