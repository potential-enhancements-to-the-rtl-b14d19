// tb_xs_range_select: self-checking test of the range select.
//
// Drives directed values (zero, every window boundary, the most negative
// input, values just past the top window) and random values of every
// magnitude, and compares the registered outputs one clock later with a model
// that finds the window by counting the bit length of the larger magnitude.
// Checks the one-clock latency and the reset value.
module tb_xs_range_select;
  import xs_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic [EXY_W-1:0] ex, ey;
  logic [SEL_W-1:0] ex_sel, ey_sel;
  logic [RANGE_W-1:0] range;
  logic sat;
  int checks = 0, failures = 0;
  int range_seen [4] = '{default: 0};
  int sat_seen = 0;

  always #5 clk = ~clk;

  xs_range_select dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mag(input logic [EXY_W-1:0] v);
    int s;
    s = int'($signed(v));
    if (s < 0) s = -s;
    if (s > 16383) s = 16383;
    return s;
  endfunction

  function automatic int bitlen(input int v);
    int n = 0;
    while (v != 0) begin v = v / 2; n++; end
    return n;
  endfunction

  task automatic apply_and_check(input logic [EXY_W-1:0] x, input logic [EXY_W-1:0] y);
    int mx, my, n, r;
    bit s;
    int ex_e, ey_e;
    mx = mag(x);
    my = mag(y);
    n  = bitlen(mx > my ? mx : my);
    s  = (n > 9);
    r  = (n <= 6) ? 0 : (s ? 3 : n - 6);
    ex_e = s ? 63 : (mx / (1 << r)) % 64;
    ey_e = s ? 63 : (my / (1 << r)) % 64;
    @(negedge clk);
    ex = x;
    ey = y;
    @(posedge clk);
    #1;
    checks++;
    if (range !== r[1:0] || ex_sel !== ex_e[5:0] || ey_sel !== ey_e[5:0] || sat !== s) begin
      failures++;
      $display("FAIL ex=%0d ey=%0d: got r=%0d x=%0d y=%0d sat=%0b, want r=%0d x=%0d y=%0d sat=%0b",
               $signed(x), $signed(y), range, ex_sel, ey_sel, sat, r, ex_e, ey_e, s);
    end
    range_seen[r]++;
    if (s) sat_seen++;
  endtask

  initial begin
    rst_n = 1'b0;
    ex = 15'h1234;
    ey = 15'h0777;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ex_sel !== '0 || ey_sel !== '0 || range !== '0 || sat !== 1'b0) begin
      failures++;
      $display("FAIL reset value");
    end
    @(negedge clk);
    rst_n = 1'b1;
    // directed: boundaries of every window
    apply_and_check(0, 0);
    apply_and_check(63, 0);
    apply_and_check(0, 63);
    apply_and_check(64, 0);
    apply_and_check(-15'sd64, 5);
    apply_and_check(127, 127);
    apply_and_check(128, 1);
    apply_and_check(255, 3);
    apply_and_check(3, 256);
    apply_and_check(511, -15'sd511);
    apply_and_check(512, 0);
    apply_and_check(0, -15'sd512);
    apply_and_check(15'h4000, 0);     // most negative
    apply_and_check(15'h3FFF, 15'h3FFF);
    apply_and_check(-15'sd1, -15'sd1);
    // latency: output must not change before the clock edge
    @(negedge clk);
    ex = 15'd300;
    ey = 15'd0;
    #1;
    checks++;
    if (range !== 2'd0 || ex_sel !== 6'd1) begin
      failures++;
      $display("FAIL output changed before the clock edge");
    end
    // random, with the magnitude spread over all bit lengths
    for (int i = 0; i < 4000; i++) begin
      int sx, sy;
      sx = $urandom_range(0, 14);
      sy = $urandom_range(0, 14);
      apply_and_check(EXY_W'($urandom() & ((1 << sx) - 1)) ^ (($urandom_range(0, 1) != 0) ? '1 : '0),
                      EXY_W'($urandom() & ((1 << sy) - 1)) ^ (($urandom_range(0, 1) != 0) ? '1 : '0));
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (range_seen[k] == 0) begin failures++; $display("FAIL range %0d never seen", k); end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
