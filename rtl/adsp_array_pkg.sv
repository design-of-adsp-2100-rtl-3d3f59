// adsp_array_pkg: constants shared by the host interface card and the PE
// cards of the ADSP-2100 linear processor array.
//
// Host I/O ports, control/status register bit positions and the 2K-word
// slot codes that the X- and Y-channel decoders use (DMA13..11 / PMA13..11)
// are collected here so that the decoders, the PE card and the testbenches
// agree on one set of numbers. The port numbers, bit positions and slot
// meanings follow the design description; nothing here is timing-related.
package adsp_array_pkg;

  // Host I/O map (A9..A0)
  localparam logic [9:0] IO_XFIFO  = 10'h300;  // XFIFO of the first PE
  localparam logic [9:0] IO_CTRL   = 10'h301;  // control register
  localparam logic [9:0] IO_STATUS = 10'h302;  // status register

  // Control register bit positions
  localparam int CR_HRS_N = 0;  // host reset, active low
  localparam int CR_HBR_N = 1;  // host bus request, active low
  localparam int CR_PESL  = 2;  // PE select, lower bit
  localparam int CR_PESM  = 3;  // PE select, middle bit
  localparam int CR_PESU  = 4;  // PE select, upper bit
  localparam int CR_BC_N  = 5;  // broadcast to all PEs, active low
  localparam int CR_HLT_N = 6;  // halt all processors, active low
  localparam int CR_MS    = 7;  // memory select

  // Status register bit positions
  localparam int SR_BGH_N = 0;  // all PEs granted their buses, active low
  localparam int SR_TRAPH = 1;  // all PEs executed TRAP
  localparam int SR_FFH_N = 2;  // XFIFO of PE1 full, active low

  // Control words used in the operating sequence
  localparam logic [7:0] CW_BUS_REQ = 8'h61;
  localparam logic [7:0] CW_RESET   = 8'h62;
  localparam logic [7:0] CW_RUN     = 8'h63;
  localparam logic [7:0] CW_HALT    = 8'h23;

  // DM-side slots (DMA13..DMA11), Table "SCMD transfers on X-channel"
  typedef enum logic [2:0] {
    XS_DM        = 3'd0,  // local DM
    XS_XF2       = 3'd1,  // write: processor -> next XFIFO
    XS_DMT       = 3'd2,  // DMT <-> processor
    XS_DMT_XF2   = 3'd3,  // DMT/processor -> also next XFIFO
    XS_XF1       = 3'd4,  // read XF1
    XS_XF1_XF2   = 3'd5,  // read XF1, copy to next XFIFO
    XS_XF1_DMT   = 3'd6,  // read XF1, copy to DMT
    XS_XF1_ALL   = 3'd7   // read XF1, copy to DMT and next XFIFO; write: retransmit
  } xslot_e;

  // PM-data-side slots (PMA13..PMA11 with PMDA high)
  typedef enum logic [2:0] {
    YS_PMDM      = 3'd0,
    YS_YF2       = 3'd1,  // read YF2D / write YF2
    YS_PMT       = 3'd2,
    YS_PMT_YF2   = 3'd3,
    YS_YF1       = 3'd4,  // read YF1 / write YF1D
    YS_NOP       = 3'd5,
    YS_YF1_PMT   = 3'd6,
    YS_INTBUF    = 3'd7
  } yslot_e;

endpackage
