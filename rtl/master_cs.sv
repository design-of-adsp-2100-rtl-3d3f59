// master_cs: master chip select MCS# of the interface card.
//
// Two cascaded 4-bit magnitude comparators check that host address lines
// SA19..SA16 equal a DIP-switch setting and that AEN equals a fifth switch;
// the A=B output is inverted into MCS#. MCS# enables the card's data
// buffers and is broadcast to the PEs in place of AEN, so the array answers
// only in one 64 KB host memory segment (A0000H-A3FFFH in the original
// host, dip = 5'b0_1010). dip[3:0] compare with SA19..SA16, dip[4] with AEN.
// Combinational.
module master_cs (
  input  logic [3:0] sa_hi,
  input  logic       aen,
  input  logic [4:0] dip,
  output logic       mcs_n
);
  logic comp1_eq, comp2_eq;
  always_comb begin
    comp1_eq = (sa_hi == dip[3:0]);
    comp2_eq = comp1_eq && (aen == dip[4]);   // cascaded through A=B input
    mcs_n    = !comp2_eq;
  end
endmodule
