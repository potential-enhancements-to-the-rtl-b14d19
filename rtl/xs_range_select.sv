// xs_range_select: picks a 6-bit window of |Ex| and |Ey| for the MET look-up.
//
// The vector sum of Ex and Ey is computed by a LUT addressed by 6 bits of each
// component. To cover the full dynamic range, this block finds the most
// significant populated bit of the two magnitudes and selects the smallest of
// four windows, bits (5+r):r for r = 0..3, that holds both of them. The window
// index r is passed on as the 2-bit range code so that the result can be scaled
// back later. A magnitude with a bit above bit 8 set does not fit any window:
// instead of a separate overflow flag, saturated data is sent on, range 3 with
// both windows all ones, which yields the largest ETmiss the LUT can produce.
//
// Inputs are 15-bit two's complement; the magnitude is 14 bits (|-16384| is
// clamped to 16383). Bits below the chosen window are truncated.
//
// Timing: one register stage; outputs change one clock after ex/ey.
//
// Follows the design: window positions, four ranges, selection by the most
// significant populated bit, saturated values instead of an overflow signal.
// This implementation's own choices: two's complement input, truncation, the
// register stage, the synchronous reset and the 'sat' status output (not used
// by the trigger path).
module xs_range_select
  import xs_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [EXY_W-1:0]    ex,
  input  logic [EXY_W-1:0]    ey,
  output logic [SEL_W-1:0]    ex_sel,
  output logic [SEL_W-1:0]    ey_sel,
  output logic [RANGE_W-1:0]  range,
  output logic                sat
);

  function automatic logic [MAG_W-1:0] magnitude(input logic [EXY_W-1:0] v);
    logic [EXY_W-1:0] a;
    a = v[EXY_W-1] ? (~v + 1'b1) : v;
    return a[EXY_W-1] ? {MAG_W{1'b1}} : a[MAG_W-1:0];
  endfunction

  logic [MAG_W-1:0]   mx, my, both;
  logic [RANGE_W-1:0] r_d;
  logic               sat_d;
  logic [SEL_W-1:0]   ex_d, ey_d;

  always_comb begin
    mx   = magnitude(ex);
    my   = magnitude(ey);
    both = mx | my;   // most significant populated bit of either value
    sat_d = |both[MAG_W-1:SEL_W+N_RANGES-1];
    // priority encoding of the window from the top populated bit
    if (sat_d || both[SEL_W+2])      r_d = 2'd3;
    else if (both[SEL_W+1])          r_d = 2'd2;
    else if (both[SEL_W])            r_d = 2'd1;
    else                             r_d = 2'd0;
    if (sat_d) begin
      ex_d = '1;
      ey_d = '1;
    end else begin
      ex_d = SEL_W'(mx >> r_d);
      ey_d = SEL_W'(my >> r_d);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_sel <= '0;
      ey_sel <= '0;
      range  <= '0;
      sat    <= 1'b0;
    end else begin
      ex_sel <= ex_d;
      ey_sel <= ey_d;
      range  <= r_d;
      sat    <= sat_d;
    end
  end

endmodule
