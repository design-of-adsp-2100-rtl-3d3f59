// epldy: Y-channel decoder for single-cycle multiple-destination transfers.
//
// The data part of the PM address space (PMDA high) is cut into eight
// 2K-word slots by PMA13..PMA11. YF1 is this PE's forward input FIFO,
// YF1D its backward output FIFO (read by the left PE), YF2 the right PE's
// forward FIFO and YF2D the right PE's backward FIFO; PMT is the Y-channel
// transfer memory:
//   slot 0  PMDM <-> processor (CSPMDM#)
//   slot 1  read YF2D                 / write YF2
//   slot 2  PMT <-> processor
//   slot 3  read YF2D, copy to PMT    / write PMT and YF2
//   slot 4  read YF1                  / write YF1D
//   slot 5  no operation
//   slot 6  read YF1, copy to PMT     / write YF1D and PMT
//   slot 7  read: INTBUF (FIFO flag word)   write: no operation
// Outputs are active low and combinational; with PMDA low (instruction
// fetch or program-memory access) every output is inactive.
module epldy
  import adsp_array_pkg::*;
(
  input  logic       pmda,
  input  logic [2:0] pma_hi,   // PMA13..PMA11
  input  logic       pmrd_n,
  input  logic       pmwr_n,
  output logic       cspmdm_n,
  output logic       rdyf1_n,
  output logic       rdpmt_n,
  output logic       rdyf2d_n,
  output logic       wryf1d_n,
  output logic       wryf2_n,
  output logic       wrpmt_n,
  output logic       intbuf_n
);
  yslot_e slot;
  logic   rd, wr;

  always_comb begin
    slot = yslot_e'(pma_hi);
    rd   = pmda && !pmrd_n;
    wr   = pmda && !pmwr_n;

    cspmdm_n = !(pmda && slot == YS_PMDM);
    rdyf1_n  = !(rd && (slot == YS_YF1 || slot == YS_YF1_PMT));
    rdpmt_n  = !(rd && slot == YS_PMT);
    rdyf2d_n = !(rd && (slot == YS_YF2 || slot == YS_PMT_YF2));
    wryf1d_n = !(wr && (slot == YS_YF1 || slot == YS_YF1_PMT));
    wryf2_n  = !(wr && (slot == YS_YF2 || slot == YS_PMT_YF2));
    wrpmt_n  = !((wr && (slot == YS_PMT || slot == YS_PMT_YF2 || slot == YS_YF1_PMT)) ||
                 (rd && (slot == YS_PMT_YF2 || slot == YS_YF1_PMT)));
    intbuf_n = !(rd && slot == YS_INTBUF);
  end
endmodule
