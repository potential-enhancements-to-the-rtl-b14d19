// xs_pkg: widths shared by the blocks of the XE/XS missing-energy trigger path.
//
// The trigger receives the x and y components of the missing transverse energy
// as 15-bit values and the total transverse energy as a 12-bit value. Every
// non-linear operation (vector sum, square root, threshold on a ratio) is a
// look-up table held in block RAM; the widths below are the ones these LUTs
// and the logic between them use. The 15/12/6/7/9/8 widths are the design's
// printed widths; the VME word width of 16 bits is the bus the LUTs are loaded
// through.
package xs_pkg;
  localparam int unsigned EXY_W    = 15;  // Ex, Ey input width (two's complement)
  localparam int unsigned MAG_W    = 14;  // magnitude width of Ex, Ey
  localparam int unsigned SEL_W    = 6;   // width of one range window of Ex, Ey
  localparam int unsigned RANGE_W  = 2;   // range code: window = bits (5+r):r
  localparam int unsigned N_RANGES = 4;
  localparam int unsigned MET_W    = 7;   // ETmiss out of the MET LUT
  localparam int unsigned XE_AW    = RANGE_W + MET_W;  // XEH LUT address, 9 bits
  localparam int unsigned HITS_W   = 8;   // threshold hit bits per trigger
  localparam int unsigned ET_W     = 12;  // total ET input width
  localparam int unsigned SQRT_W   = 6;   // sqrt(ET) out of the RET LUT
  localparam int unsigned VME_DW   = 16;  // VME data word
  localparam int unsigned VME_LANE = 8;   // one LUT location per byte lane

  // LUT select field of the VME address of the top level.
  typedef enum logic [1:0] {
    LUT_MET = 2'd0,
    LUT_RET = 2'd1,
    LUT_XEH = 2'd2,
    LUT_XSH = 2'd3
  } lut_sel_e;
endpackage
