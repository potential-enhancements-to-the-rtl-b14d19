// xs_lut_ram: block-RAM look-up table with a 16-bit VME load/read-back port.
//
// Every non-linear step of the trigger (vector sum, square root, thresholds)
// is a table of 2^AW entries of DW bits. The trigger path reads it through a
// synchronous port: rd_data is the entry at rd_addr one clock later, as a
// block RAM delivers it. Software loads and checks the contents through a
// 16-bit VME port. One VME word holds two consecutive locations, one per
// byte:
//
//      15   14 .. 8        7    6 .. 0
//     | 0 | location 2w+1 | 0 | location 2w |     (DW = 7)
//
// Bits of a byte above DW have no RAM behind them: writes to them are lost and
// they always read as zero. The RAM is dual-ported with ports of different
// widths: the VME side sees it as 2^(AW-1) words of two locations, the trigger
// side as 2^AW locations. This is how a block RAM column of 4096x1 blocks
// behaves when its second port is configured 2048x2, so the table costs
// DW * 2^AW / 4096 blocks (at least one) and nothing more.
//
// Interface: vme_we writes vme_wdata to word vme_word; vme_re returns that
// word on vme_rdata one clock later (held until the next read). rd_addr/rd_data
// work independently of the VME port (a true dual-port RAM). The RAM has no
// reset; its contents are undefined until software loads them.
//
// Follows the design: LUT sizes (AW x DW), block RAM, the VME word layout with
// zero bits above each location. This implementation's own choices: the VME
// strobe/address/data port and its one-clock read latency.
module xs_lut_ram
  import xs_pkg::*;
#(
  parameter int unsigned AW = 12,   // address bits: 2^AW locations
  parameter int unsigned DW = 7     // location width, at most 8
) (
  input  logic               clk,
  // trigger-path look-up
  input  logic [AW-1:0]      rd_addr,
  output logic [DW-1:0]      rd_data,
  // VME access, two locations per 16-bit word
  input  logic               vme_we,
  input  logic               vme_re,
  input  logic [AW-2:0]      vme_word,
  input  logic [VME_DW-1:0]  vme_wdata,
  output logic [VME_DW-1:0]  vme_rdata
);

  logic [DW-1:0] mem [2 ** AW];

  logic [DW-1:0] vme_even, vme_odd;

  // VME port: two adjacent locations per access
  always_ff @(posedge clk) begin
    if (vme_we) begin
      mem[{vme_word, 1'b0}] <= vme_wdata[DW-1:0];
      mem[{vme_word, 1'b1}] <= vme_wdata[VME_LANE+DW-1:VME_LANE];
    end
  end

  always_ff @(posedge clk) begin
    if (vme_re) begin
      vme_even <= mem[{vme_word, 1'b0}];
      vme_odd  <= mem[{vme_word, 1'b1}];
    end
  end

  // trigger read port
  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
  end

  always_comb begin
    vme_rdata = '0;
    vme_rdata[DW-1:0]                 = vme_even;
    vme_rdata[VME_LANE+DW-1:VME_LANE] = vme_odd;
  end

  initial begin
    assert (DW >= 1 && DW <= VME_LANE)
      else $fatal(1, "xs_lut_ram: DW must be 1..8");
  end

  // A VME read and write of the same word in one clock has no defined order.
  a_no_rw_collision: assert property (@(posedge clk) !(vme_we && vme_re));

endmodule
