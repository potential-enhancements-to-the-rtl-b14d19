// xs_range_adjust: turns the ranged ETmiss into the XE address and the XS value.
//
// The MET LUT returns ETmiss as a 7-bit value in units of 2^range (range is the
// window chosen by xs_range_select). The XE threshold LUT takes the 7 bits
// and the 2-bit range together as its 9-bit address, so no shifting is
// needed on that side. The XS trigger instead wants a plain ETmiss in GeV,
// XS_BITS wide, and saturated (all ones) when it does not fit:
//
//   XS_BITS = 6, XS_HALVE = 0: the 6 LSBs; saturate if the top bit of the
//                              7-bit value or the range is set (63 GeV ceiling).
//   XS_BITS = 6, XS_HALVE = 1: bits 6:1, 2 GeV per count; saturate if the range
//                              is set (127 GeV ceiling).
//   XS_BITS >= 7:              met << range while range <= XS_BITS-7, otherwise
//                              saturate (7 bits: 127 GeV, 8 bits: 255 GeV).
//
// Purely combinational.
//
// Follows the design: the {range, met} XEH address, the 6-bit rule and the
// halved-precision rule. The rule for 7 to 9 bits is this implementation's
// generalisation: the design gives only their widths and GeV ceilings.
module xs_range_adjust
  import xs_pkg::*;
#(
  parameter int unsigned XS_BITS  = 7,  // 6..9
  parameter bit          XS_HALVE = 1'b0
) (
  input  logic [RANGE_W-1:0] range,
  input  logic [MET_W-1:0]   met,
  output logic [XE_AW-1:0]   xe_addr,
  output logic [XS_BITS-1:0] xs_met,
  output logic               xs_sat
);

  localparam int unsigned MAX_RANGE = (XS_BITS > MET_W) ? XS_BITS - MET_W : 0;
  localparam int unsigned WIDE_W    = MET_W + N_RANGES - 1;  // met << 3

  logic [WIDE_W-1:0] wide;

  assign xe_addr = {range, met};

  always_comb begin
    wide   = WIDE_W'(met) << range;
    xs_sat = 1'b0;
    if (XS_HALVE) begin
      xs_sat = (range != '0);
      wide   = WIDE_W'(met) >> 1;
    end else if (32'(range) > MAX_RANGE) begin
      xs_sat = 1'b1;
    end else if (wide >= WIDE_W'(2 ** XS_BITS)) begin
      xs_sat = 1'b1;
    end
    xs_met = xs_sat ? {XS_BITS{1'b1}} : XS_BITS'(wide);
  end

  initial begin
    assert (XS_BITS >= 6 && XS_BITS <= 9)
      else $fatal(1, "xs_range_adjust: XS_BITS must be 6..9");
    assert (!XS_HALVE || XS_BITS == 6)
      else $fatal(1, "xs_range_adjust: XS_HALVE applies to 6 bits only");
  end

endmodule
