// tb_xs_range_adjust: exhaustive test of range adjust in all five XS widths.
//
// Five instances: 6 bits, 6 bits with halved precision, 7, 8 and 9 bits.
// Every (range, met) pair is applied and each output is compared with the
// rule written out per width: the XEH address {range, met}, and the XS value
// (the scaled ETmiss in GeV, or all ones when it does not fit).
module tb_xs_range_adjust;
  import xs_pkg::*;

  logic [RANGE_W-1:0] range;
  logic [MET_W-1:0]   met;
  logic [XE_AW-1:0]   xe6, xe6h, xe7, xe8, xe9;
  logic [5:0] xs6, xs6h;
  logic [6:0] xs7;
  logic [7:0] xs8;
  logic [8:0] xs9;
  logic s6, s6h, s7, s8, s9;
  int checks = 0, failures = 0;
  int sat_seen = 0, pass_seen = 0;

  xs_range_adjust #(.XS_BITS(6), .XS_HALVE(1'b0)) u6  (.range, .met, .xe_addr(xe6),  .xs_met(xs6),  .xs_sat(s6));
  xs_range_adjust #(.XS_BITS(6), .XS_HALVE(1'b1)) u6h (.range, .met, .xe_addr(xe6h), .xs_met(xs6h), .xs_sat(s6h));
  xs_range_adjust #(.XS_BITS(7))                  u7  (.range, .met, .xe_addr(xe7),  .xs_met(xs7),  .xs_sat(s7));
  xs_range_adjust #(.XS_BITS(8))                  u8  (.range, .met, .xe_addr(xe8),  .xs_met(xs8),  .xs_sat(s8));
  xs_range_adjust #(.XS_BITS(9))                  u9  (.range, .met, .xe_addr(xe9),  .xs_met(xs9),  .xs_sat(s9));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s range=%0d met=%0d: got %0d want %0d", what, range, met, got, want);
    end
  endtask

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int m = 0; m < 128; m++) begin
        int gev, e6, e6h, e7, e8, e9;
        range = r[1:0];
        met   = m[6:0];
        #1;
        gev = m * (1 << r);
        e6  = (m >= 64 || r != 0) ? 63 : m;
        e6h = (r != 0) ? 63 : m / 2;
        e7  = (r != 0) ? 127 : m;
        e8  = (r > 1) ? 255 : gev;
        e9  = (r > 2) ? 511 : gev;
        check("xe6",  xe6,  r * 128 + m);
        check("xe6h", xe6h, r * 128 + m);
        check("xe7",  xe7,  r * 128 + m);
        check("xe8",  xe8,  r * 128 + m);
        check("xe9",  xe9,  r * 128 + m);
        check("xs6",  xs6,  e6);
        check("xs6h", xs6h, e6h);
        check("xs7",  xs7,  e7);
        check("xs8",  xs8,  e8);
        check("xs9",  xs9,  e9);
        check("s6",  s6,  int'(e6 == 63 && (m >= 64 || r != 0)));
        check("s7",  s7,  int'(r != 0));
        check("s9",  s9,  int'(r > 2));
        if (s8) sat_seen++; else pass_seen++;
      end
    end
    checks++;
    if (sat_seen == 0 || pass_seen == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
