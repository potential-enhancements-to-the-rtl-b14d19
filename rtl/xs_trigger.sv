// xs_trigger: XE (missing ET) and XS (missing ET significance) trigger path.
//
// The crate-level sums deliver Ex, Ey (15 bits each) and the total ET (12
// bits) every bunch crossing. Two sets of 8 threshold hits are produced:
//
//   XE hits: ETmiss = |(Ex, Ey)| above each of 8 thresholds.
//   XS hits: ETmiss / sqrt(ET) above each of 8 thresholds.
//
// All arithmetic is done by look-up tables in block RAM, loaded over VME:
//
//   ex,ey -> range select -> MET LUT (12x7, vector sum) -> range adjust
//            range adjust -> XEH LUT (9x8, {range, ETmiss} -> XE hits)
//            range adjust -> XSH LUT ((XS_BITS+6)x8, {ETmiss, sqrtET} -> XS hits)
//   et    -> RET LUT (12x6, sqrt(ET))  ------------------^
//
// The range select keeps the MET LUT small by feeding it only a 6-bit window of
// each component plus a 2-bit range; range adjust re-scales the result. The
// XS_BITS parameter is the width of ETmiss sent to the XSH LUT: 6 bits caps
// it at 63 GeV, 7 bits (default) at 127 GeV, 8 bits at 255 GeV. XS_HALVE=1
// with 6 bits keeps the 6-bit XSH LUT and halves the precision instead. The
// XSH LUT doubles in size with every extra bit (13x8 = 16 block RAMs of 4 Kbit).
//
// Timing: inputs are registered by range select (clock 1), the MET and RET
// LUTs are read in clock 2, the XEH and XSH LUTs in clock 3: xe_hits and
// xs_hits belong to the ex/ey/et sampled three rising edges earlier. A new
// set of inputs is accepted every clock.
//
// VME: vme_addr = {LUT select (xs_pkg::lut_sel_e), word index}. Each 16-bit
// word holds two LUT locations (see xs_lut_ram). Word indices beyond a small
// LUT's size alias onto it. vme_rdata follows vme_re by one clock and is
// flagged by vme_rvalid.
//
// Follows the design: the block structure, LUT sizes and the widths on every
// connection (6, 7, 9, 6, 8). This implementation's own choices: the number of
// pipeline stages, the LUT address bit order ({Ex, Ey}, {range, ETmiss},
// {ETmiss, sqrtET}), the VME address map and bus protocol, and the reset.
module xs_trigger
  import xs_pkg::*;
#(
  parameter int unsigned XS_BITS  = 7,
  parameter bit          XS_HALVE = 1'b0,
  localparam int unsigned XSH_AW  = XS_BITS + SQRT_W,
  localparam int unsigned WORD_W  = XSH_AW - 1,   // largest LUT's word index
  localparam int unsigned VME_AW  = 2 + WORD_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [EXY_W-1:0]   ex,
  input  logic [EXY_W-1:0]   ey,
  input  logic [ET_W-1:0]    et,
  output logic [HITS_W-1:0]  xe_hits,
  output logic [HITS_W-1:0]  xs_hits,
  // VME access to the LUTs
  input  logic               vme_we,
  input  logic               vme_re,
  input  logic [VME_AW-1:0]  vme_addr,
  input  logic [VME_DW-1:0]  vme_wdata,
  output logic [VME_DW-1:0]  vme_rdata,
  output logic               vme_rvalid
);

  localparam int unsigned MET_AW = 2 * SEL_W;   // 12
  localparam int unsigned RET_AW = ET_W;        // 12

  // ---------------- VME decode ----------------
  lut_sel_e          sel, sel_q;
  logic [WORD_W-1:0] word;
  logic [3:0]        we, re;
  logic [VME_DW-1:0] rdata [4];

  assign sel  = lut_sel_e'(vme_addr[VME_AW-1 -: 2]);
  assign word = vme_addr[WORD_W-1:0];

  always_comb begin
    we = '0;
    re = '0;
    we[sel] = vme_we;
    re[sel] = vme_re;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vme_rvalid <= 1'b0;
      sel_q      <= LUT_MET;
    end else begin
      vme_rvalid <= vme_re;
      if (vme_re) sel_q <= sel;
    end
  end

  assign vme_rdata = rdata[sel_q];

  // ---------------- stage 1: range select, ET register ----------------
  logic [SEL_W-1:0]   ex_sel, ey_sel;
  logic [RANGE_W-1:0] range_1, range_2;
  logic [ET_W-1:0]    et_1;

  xs_range_select u_range_select (
    .clk, .rst_n, .ex, .ey,
    .ex_sel, .ey_sel, .range(range_1), .sat()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      et_1    <= '0;
      range_2 <= '0;
    end else begin
      et_1    <= et;
      range_2 <= range_1;
    end
  end

  // ---------------- stage 2: MET and RET LUTs ----------------
  logic [MET_W-1:0]  met_2;
  logic [SQRT_W-1:0] sqrt_et_2;

  xs_lut_ram #(.AW(MET_AW), .DW(MET_W)) u_met_lut (
    .clk,
    .rd_addr  ({ex_sel, ey_sel}),
    .rd_data  (met_2),
    .vme_we   (we[LUT_MET]),
    .vme_re   (re[LUT_MET]),
    .vme_word (word[MET_AW-2:0]),
    .vme_wdata,
    .vme_rdata(rdata[LUT_MET])
  );

  xs_lut_ram #(.AW(RET_AW), .DW(SQRT_W)) u_ret_lut (
    .clk,
    .rd_addr  (et_1),
    .rd_data  (sqrt_et_2),
    .vme_we   (we[LUT_RET]),
    .vme_re   (re[LUT_RET]),
    .vme_word (word[RET_AW-2:0]),
    .vme_wdata,
    .vme_rdata(rdata[LUT_RET])
  );

  // ---------------- range adjust (combinational) ----------------
  logic [XE_AW-1:0]   xe_addr_2;
  logic [XS_BITS-1:0] xs_met_2;

  xs_range_adjust #(.XS_BITS(XS_BITS), .XS_HALVE(XS_HALVE)) u_range_adjust (
    .range  (range_2),
    .met    (met_2),
    .xe_addr(xe_addr_2),
    .xs_met (xs_met_2),
    .xs_sat ()
  );

  // ---------------- stage 3: XEH and XSH LUTs ----------------
  xs_lut_ram #(.AW(XE_AW), .DW(HITS_W)) u_xeh_lut (
    .clk,
    .rd_addr  (xe_addr_2),
    .rd_data  (xe_hits),
    .vme_we   (we[LUT_XEH]),
    .vme_re   (re[LUT_XEH]),
    .vme_word (word[XE_AW-2:0]),
    .vme_wdata,
    .vme_rdata(rdata[LUT_XEH])
  );

  xs_lut_ram #(.AW(XSH_AW), .DW(HITS_W)) u_xsh_lut (
    .clk,
    .rd_addr  ({xs_met_2, sqrt_et_2}),
    .rd_data  (xs_hits),
    .vme_we   (we[LUT_XSH]),
    .vme_re   (re[LUT_XSH]),
    .vme_word (word[XSH_AW-2:0]),
    .vme_wdata,
    .vme_rdata(rdata[LUT_XSH])
  );

endmodule
