// tb_xs_trigger_configs: the trigger in the other XS widths.
//
// Runs xs_trigger_env on four instances of the trigger side by side:
//   XS_BITS=6            63 GeV ceiling, 12x8 XSH LUT
//   XS_BITS=6, halved    bits 6:1 of ETmiss, 127 GeV ceiling, 12x8 XSH LUT
//   XS_BITS=8            255 GeV ceiling, 14x8 XSH LUT
//   XS_BITS=9            15x8 XSH LUT
// and sums their checks. The default width (7 bits) is covered by
// tb_xs_trigger.
module tb_xs_trigger_configs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [4];
  int   chk  [4];
  int   fail [4];
  int   checks, failures;

  xs_trigger_env #(.XS_BITS(6), .XS_HALVE(1'b0), .EVENTS(8000)) u_6  (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  xs_trigger_env #(.XS_BITS(6), .XS_HALVE(1'b1), .EVENTS(8000)) u_6h (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  xs_trigger_env #(.XS_BITS(8), .XS_HALVE(1'b0), .EVENTS(8000)) u_8  (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  xs_trigger_env #(.XS_BITS(9), .XS_HALVE(1'b0), .EVENTS(8000)) u_9  (.clk, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  function automatic void report(input int extra_fail);
    checks = 0;
    failures = extra_fail;
    for (int k = 0; k < 4; k++) begin
      checks   += chk[k];
      failures += fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3]);
    report(0);
    $finish;
  end
endmodule
