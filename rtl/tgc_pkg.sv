// tgc_pkg: constants and record types shared by the three on-detector chips of the
// end-cap muon trigger/readout chain (patch-panel chip, slave-board chip, high-pT chip).
//
// All logic runs on the 40 MHz bunch-crossing clock (25 ns per crossing). The numbers below
// that come from the design description are marked as such; every other number is a choice
// of this implementation and is repeated in the header of the module that uses it.
package tgc_pkg;

  // ---------------------------------------------------------------- patch-panel chip
  localparam int unsigned PP_NCH      = 16;  // hit channels per chip (design description)
  localparam int unsigned PP_NREG     = 4;   // configuration registers (own choice)
  localparam int unsigned PP_REG_W    = 16;  // configuration register width (own choice)
  localparam int unsigned PP_AW       = 2;   // register address width

  // Register map of the patch-panel chip (own choice)
  localparam logic [PP_AW-1:0] PP_REG_MASK   = 2'd0; // per-channel hit enable
  localparam logic [PP_AW-1:0] PP_REG_TPMASK = 2'd1; // channels that receive test pulses
  localparam logic [PP_AW-1:0] PP_REG_TPDLY  = 2'd2; // test pulse delay in crossings
  localparam logic [PP_AW-1:0] PP_REG_CTRL   = 2'd3; // bit0: test pulse enable

  // ---------------------------------------------------------------- slave-board chip
  localparam int unsigned SLB_PIV_BLK = 32;  // pivot channels per matrix half (32-5 encoder)
  localparam int unsigned SLB_NBLK    = 2;   // matrix halves A and B
  localparam int unsigned SLB_MAXD    = 7;   // displacement window +-7 (16-4 encoder)
  localparam int unsigned SLB_NDISP   = 2*SLB_MAXD + 1;
  localparam int unsigned SLB_NPIV    = SLB_NBLK*SLB_PIV_BLK;          // 64
  localparam int unsigned SLB_NREF    = SLB_NPIV + 2*SLB_MAXD;         // 78
  localparam int unsigned SLB_NIN     = SLB_NPIV + SLB_NREF;           // 142 input pins
  localparam int unsigned SLB_TW_NCH  = 36;  // triplet wire: 36 channels per plane
  localparam int unsigned SLB_TS_NCH  = 32;  // triplet strip: 32 channels per plane
  localparam int unsigned SLB_NSLOT   = 4;   // trigger output slots (max four candidates)
  localparam int unsigned SLB_DW      = 9;   // track word: 4-bit displacement + 5-bit position

  typedef enum logic [1:0] {
    MODE_DOUBLET_WIRE  = 2'b00,
    MODE_DOUBLET_STRIP = 2'b01,
    MODE_TRIPLET_WIRE  = 2'b10,
    MODE_TRIPLET_STRIP = 2'b11
  } slb_mode_e;  // {triplet, strip} select pins

  // One trigger output slot of the slave-board chip.
  // Doublet: data = {delta[3:0] (two's complement), pos[4:0]} (slot 0 = half A, 1 = half B).
  // Triplet: data = channel index of the candidate, zero-extended.
  typedef struct packed {
    logic                valid;
    logic [SLB_DW-1:0]   data;
  } slb_slot_t;

  typedef slb_slot_t [SLB_NSLOT-1:0] slb_trig_t;

  localparam int unsigned BCID_W = 12;  // bunch crossing number width (ATLAS convention)
  localparam int unsigned L1ID_W = 24;  // level-1 event number width (ATLAS convention)
  localparam int unsigned SLB_TRIG_W = SLB_NSLOT*(SLB_DW+1);
  localparam int unsigned SLB_RO_W   = SLB_NIN + SLB_TRIG_W + BCID_W; // one crossing, 194 bits

  // ---------------------------------------------------------------- high-pT chip
  localparam int unsigned HPT_NBLK    = 6;   // matrix blocks (design description)
  localparam int unsigned HPT_POS_BLK = 32;  // doublet positions per block (one SLB half)
  localparam int unsigned HPT_MAXD_W  = 15;  // wire window +-15 (own choice, 5-bit delta)
  localparam int unsigned HPT_MAXD_S  = 7;   // strip window +-7 (own choice)
  localparam int unsigned HPT_NCOL    = HPT_NBLK*HPT_POS_BLK + 2*HPT_MAXD_W; // 222 columns
  localparam int unsigned HPT_NTRIP   = 12;  // triplet candidates per crossing: 4 wire boards x 3
  localparam int unsigned HPT_COL_W   = 8;

  // Doublet candidate as it arrives from a slave board (same layout as a doublet slot).
  typedef struct packed {
    logic        valid;
    logic [3:0]  dlow;   // low-pT displacement from the slave board
    logic [4:0]  pos;    // position inside the 32-channel half
  } hpt_din_t;

  // Triplet candidate: column index in the high-pT matrix.
  typedef struct packed {
    logic                 valid;
    logic [HPT_COL_W-1:0] col;
  } hpt_tin_t;

  // Candidate inside the chip and at its output.
  typedef struct packed {
    logic        valid;
    logic        high;   // 1: high-pT coincidence found, delta is the chip's own
    logic [2:0]  blk;    // matrix block (0..5)
    logic [4:0]  pos;
    logic [4:0]  delta;  // two's complement
  } hpt_cand_t;

  // |d| of a 5-bit two's complement displacement
  function automatic logic [4:0] abs5(input logic [4:0] d);
    return d[4] ? 5'(-d) : d;
  endfunction

endpackage
