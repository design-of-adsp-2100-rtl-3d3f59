// pe_global_if: a PE card's connection to the host's broadcast (global) bus.
//
// Host memory map of one PE, 16 KB, with the memory-select bit MS acting as
// a 17th address line (SA0 = 0 selects the even byte lane SD7..0, SBHE#
// the odd lane SD15..8):
//   MS=0  0000-3FFF  PM upper byte (even) / PM middle byte (odd), word-wise
//   MS=1  0000-1FFF  PM lower byte, byte-wise
//   MS=1  2000-2FFF  PMDM low byte (even) / high byte (odd), word-wise
//   MS=1  3000-3FFF  DM   low byte (even) / high byte (odd), word-wise
// A chip select is active only while U1 is low, i.e. this PE's processor has
// granted its bus (BG# low) and the PE is addressed: either the broadcast
// line BC# is low (every PE written at once) or PE select PES equals PE_ID.
// The block also carries three daisy chains from the right neighbour to the
// left: bus grant (BGHO# = BG# OR BGHI#, low only when every PE has
// granted), trap (HTRAPO = TRAP AND HTRAPI) and MEMCS16# (low when a
// word-wise memory of this or a PE to the right is selected). The address
// input aen is the master chip select MCS# in the full system. Combinational.
module pe_global_if #(
  parameter int PE_ID = 0
) (
  input  logic [15:0] sa,
  input  logic        sbhe_n,
  input  logic        aen,
  input  logic        ms,
  input  logic [2:0]  pes,
  input  logic        bc_n,
  input  logic        bg_n,
  input  logic        trap,
  input  logic        bghi_n,
  output logic        bgho_n,
  input  logic        htrapi,
  output logic        htrapo,
  input  logic        memcs16i_n,
  output logic        memcs16o_n,
  output logic        u1,
  output logic        hcs_pmu_n,
  output logic        hcs_pmm_n,
  output logic        hcs_pml_n,
  output logic        hcs_pmdml_n,
  output logic        hcs_pmdmu_n,
  output logic        hcs_dml_n,
  output logic        hcs_dmu_n
);
  logic sel_pe, blk_pmum, blk_pml, blk_pmdm, blk_dm;

  always_comb begin
    sel_pe = !bc_n || (pes == 3'(PE_ID));
    u1     = !sel_pe || bg_n;

    blk_pmum = !sa[15] && !sa[14] && !aen && !ms;
    blk_pml  = !sa[15] && !sa[14] && !sa[13] && !aen && ms;
    blk_pmdm = !sa[15] && !sa[14] &&  sa[13] && !sa[12] && !aen && ms;
    blk_dm   = !sa[15] && !sa[14] &&  sa[13] &&  sa[12] && !aen && ms;

    hcs_pmu_n   = sa[0]  || u1 || !blk_pmum;
    hcs_pmm_n   = sbhe_n || u1 || !blk_pmum;
    hcs_pml_n   =           u1 || !blk_pml;
    hcs_pmdml_n = sa[0]  || u1 || !blk_pmdm;
    hcs_pmdmu_n = sbhe_n || u1 || !blk_pmdm;
    hcs_dml_n   = sa[0]  || u1 || !blk_dm;
    hcs_dmu_n   = sbhe_n || u1 || !blk_dm;

    memcs16o_n = hcs_pmu_n && hcs_pmm_n && hcs_pmdml_n && hcs_pmdmu_n &&
                 hcs_dml_n && hcs_dmu_n && memcs16i_n;
    bgho_n = bg_n || bghi_n;
    htrapo = trap && htrapi;
  end
endmodule
