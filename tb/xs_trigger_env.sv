// xs_trigger_env: end-to-end checker of xs_trigger for one XS configuration.
//
// Same procedure as tb_xs_trigger, for any XS_BITS / XS_HALVE: loads the four
// LUTs over VME (the XSH LUT is (XS_BITS+6) x 8), reads a sample back, streams
// directed and random events at one per clock and checks both hit words three
// clocks later against a model computed from ex, ey, et. The XS ETmiss rule
// of the model is written out per width. Counts each mechanism (four ranges,
// range-select saturation, XS saturation, XS values beyond range 0 for 8 and 9
// bits, zero bits on read-back, back-to-back events) and counts a failure for
// any that never happened. Reports through done/checks/failures.
module xs_trigger_env
  import xs_pkg::*;
#(
  parameter int XS_BITS  = 7,
  parameter bit XS_HALVE = 1'b0,
  parameter int EVENTS   = 20000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int XSH_AW  = XS_BITS + SQRT_W;
  localparam int WORD_W  = XSH_AW - 1;
  localparam int VME_AW  = 2 + WORD_W;
  localparam int LATENCY = 3;

  localparam int XE_THR   [8] = '{10, 20, 40, 60, 100, 150, 250, 400};  // GeV
  localparam int XS_THR10 [8] = '{5, 10, 20, 30, 40, 50, 70, 100};      // 0.1 sqrt(GeV)

  logic rst_n;
  logic [EXY_W-1:0] ex, ey;
  logic [ET_W-1:0]  et;
  logic [HITS_W-1:0] xe_hits, xs_hits;
  logic vme_we, vme_re, vme_rvalid;
  logic [VME_AW-1:0] vme_addr;
  logic [VME_DW-1:0] vme_wdata, vme_rdata;

  xs_trigger #(.XS_BITS(XS_BITS), .XS_HALVE(XS_HALVE)) dut (.*);

  int n_extended = 0;
  int n_range [4] = '{default: 0};
  int n_sel_sat = 0, n_xs_sat = 0, n_zero_bits = 0, n_back_to_back = 0;
  int n_xe_hit = 0, n_xs_hit = 0;


  // ---------------- LUT contents ----------------
  function automatic int isqrt_round(input int v);
    return $rtoi($sqrt(real'(v)) + 0.5);
  endfunction

  function automatic int met_lut(input int x6, input int y6);
    int v;
    v = isqrt_round(x6 * x6 + y6 * y6);
    return v > 127 ? 127 : v;
  endfunction

  function automatic int ret_lut(input int e);
    int v;
    v = isqrt_round(e);
    return v > 63 ? 63 : v;
  endfunction

  function automatic int xeh_lut(input int r, input int m);
    int h = 0;
    for (int i = 0; i < 8; i++) if (m * (1 << r) > XE_THR[i]) h |= (1 << i);
    return h;
  endfunction

  function automatic int xsh_lut(input int m, input int s);
    int h = 0;
    for (int i = 0; i < 8; i++) if (10 * m > XS_THR10[i] * s) h |= (1 << i);
    return h;
  endfunction

  function automatic int lut_value(input int sel, input int loc);
    case (sel)
      0: return met_lut(loc / 64, loc % 64);
      1: return ret_lut(loc);
      2: return xeh_lut(loc / 128, loc % 128);
      default: return xsh_lut(loc / 64, loc % 64);
    endcase
  endfunction

  function automatic int lut_aw(input int sel);
    case (sel)
      0: return 12;
      1: return 12;
      2: return 9;
      default: return XSH_AW;
    endcase
  endfunction

  task automatic vme_write(input int sel, input int w, input logic [15:0] d);
    vme_we = 1;
    vme_addr = VME_AW'((sel << WORD_W) | w);
    vme_wdata = d;
    @(negedge clk);
    vme_we = 0;
  endtask

  // ---------------- event model ----------------
  typedef struct { int xe; int xs; bit valid; } exp_t;
  exp_t pipe [LATENCY];

  function automatic int mag(input logic [EXY_W-1:0] v);
    int s;
    s = int'($signed(v));
    if (s < 0) s = -s;
    return s > 16383 ? 16383 : s;
  endfunction

  function automatic exp_t model(input logic [EXY_W-1:0] x, input logic [EXY_W-1:0] y,
                                 input logic [ET_W-1:0] e);
    exp_t o;
    int mx, my, r, x6, y6, m, xs;
    mx = mag(x);
    my = mag(y);
    if (mx >= 512 || my >= 512) begin
      r = 3; x6 = 63; y6 = 63; n_sel_sat++;
    end else begin
      r = 0;
      while ((mx >> r) >= 64 || (my >> r) >= 64) r++;
      x6 = mx >> r;
      y6 = my >> r;
    end
    n_range[r]++;
    m = met_lut(x6, y6);
    // XS ETmiss as the configured width sees it
    if (XS_HALVE) begin
      if (r != 0) begin xs = 63; n_xs_sat++; end
      else xs = m / 2;
    end else if (XS_BITS == 6) begin
      if (r != 0 || m >= 64) begin xs = 63; n_xs_sat++; end
      else xs = m;
    end else if (r > XS_BITS - 7) begin
      xs = (1 << XS_BITS) - 1; n_xs_sat++;
    end else begin
      xs = m << r;
      if (r > 0) n_extended++;
    end
    o.xe = xeh_lut(r, m);
    o.xs = xsh_lut(xs, ret_lut(int'(e)));
    o.valid = 1'b1;
    return o;
  endfunction

  task automatic event_cycle(input logic [EXY_W-1:0] x, input logic [EXY_W-1:0] y,
                             input logic [ET_W-1:0] e, input bit drive);
    exp_t now;
    // outputs now belong to the event driven LATENCY clocks ago
    if (pipe[LATENCY-1].valid) begin
      checks++;
      if (xe_hits !== pipe[LATENCY-1].xe[7:0] || xs_hits !== pipe[LATENCY-1].xs[7:0]) begin
        failures++;
        $display("FAIL hits: got xe=%02h xs=%02h want xe=%02h xs=%02h",
                 xe_hits, xs_hits, pipe[LATENCY-1].xe, pipe[LATENCY-1].xs);
      end
      if (pipe[LATENCY-2].valid) n_back_to_back++;
      if (xe_hits != 0) n_xe_hit++;
      if (xs_hits != 0) n_xs_hit++;
    end
    for (int k = LATENCY - 1; k > 0; k--) pipe[k] = pipe[k-1];
    if (drive) begin
      now = model(x, y, e);
      ex = x; ey = y; et = e;
    end else now.valid = 1'b0;
    pipe[0] = now;
    @(negedge clk);
  endtask

  function automatic logic [EXY_W-1:0] rnd_comp();
    int bits;
    logic [EXY_W-1:0] v;
    bits = $urandom_range(0, 11);
    v = EXY_W'($urandom() & ((1 << bits) - 1));
    return ($urandom_range(0, 1) != 0) ? -v : v;
  endfunction

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
    rst_n = 0;
    ex = 0; ey = 0; et = 0;
    vme_we = 0; vme_re = 0; vme_addr = 0; vme_wdata = 0;
    for (int k = 0; k < LATENCY; k++) pipe[k].valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---- load the four LUTs
    for (int sel = 0; sel < 4; sel++) begin
      for (int w = 0; w < (1 << (lut_aw(sel) - 1)); w++) begin
        logic [15:0] d;
        d[7:0]  = 8'(lut_value(sel, 2 * w));
        d[15:8] = 8'(lut_value(sel, 2 * w + 1));
        d = d | 16'h8080;   // try to set the bits that are not there
        if (sel == 2 || sel == 3) d = {8'(lut_value(sel, 2*w+1)), 8'(lut_value(sel, 2*w))};
        vme_write(sel, w, d);
      end
    end

    // ---- read back a sample of every LUT
    for (int sel = 0; sel < 4; sel++) begin
      for (int n = 0; n < 64; n++) begin
        int w, dw;
        logic [15:0] want;
        w  = $urandom_range(0, (1 << (lut_aw(sel) - 1)) - 1);
        dw = (sel == 0) ? 7 : (sel == 1) ? 6 : 8;
        want = {8'(lut_value(sel, 2 * w + 1)), 8'(lut_value(sel, 2 * w))};
        vme_re = 1;
        vme_addr = VME_AW'((sel << WORD_W) | w);
        @(posedge clk); #1;
        vme_re = 0;
        checks++;
        if (!vme_rvalid || vme_rdata !== want) begin
          failures++;
          $display("FAIL VME read lut %0d word %0d: got %04h want %04h", sel, w, vme_rdata, want);
        end
        if (dw < 8 && vme_rdata[7] == 1'b0 && vme_rdata[15] == 1'b0) n_zero_bits++;
        @(posedge clk); #1;
        checks++;
        if (vme_rvalid) begin failures++; $display("FAIL vme_rvalid held"); end
        @(negedge clk);
      end
    end

    // ---- directed events: each range, range-select saturation, XS saturation
    event_cycle(0, 0, 0, 1);
    event_cycle(30, -15'sd40, 100, 1);          // range 0, 50 GeV
    event_cycle(63, 63, 16, 1);                 // range 0, 89 GeV
    event_cycle(100, 0, 400, 1);                // range 1
    event_cycle(-15'sd200, 150, 900, 1);        // range 2
    event_cycle(400, -15'sd300, 2500, 1);       // range 3
    event_cycle(15'h4000, 3, 4095, 1);          // saturated
    event_cycle(5000, 5000, 20, 1);             // saturated, large XS
    event_cycle(1, 1, 0, 1);
    // ---- random events at full rate, with occasional idle clocks
    for (int i = 0; i < EVENTS; i++) begin
      event_cycle(rnd_comp(), rnd_comp(), ET_W'($urandom_range(0, 4095) >> $urandom_range(0, 11)),
                  ($urandom_range(0, 15) != 0));
    end
    for (int k = 0; k < LATENCY; k++) event_cycle(0, 0, 0, 0);

    // ---- every mechanism must have happened
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (n_range[r] == 0) begin failures++; $display("FAIL range %0d never used", r); end
    end
    checks++; if (n_sel_sat == 0)      begin failures++; $display("FAIL no range-select saturation"); end
    checks++; if (n_xs_sat == 0)       begin failures++; $display("FAIL no XS saturation"); end
    checks++; if (n_zero_bits == 0)    begin failures++; $display("FAIL no zero bits seen"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back events"); end
    checks++; if (XS_BITS >= 8 && !XS_HALVE && n_extended == 0) begin failures++; $display("FAIL XS range never extended"); end
    checks++; if (n_xe_hit == 0 || n_xs_hit == 0) begin failures++; $display("FAIL no hits"); end
    $display("XS_BITS=%0d XS_HALVE=%0d: XS beyond range 0 %0d", XS_BITS, XS_HALVE, n_extended);
    $display("ranges %0d %0d %0d %0d, range-select saturated %0d, XS saturated %0d, zero-bit reads %0d, back-to-back %0d, XE hit events %0d, XS hit events %0d",
             n_range[0], n_range[1], n_range[2], n_range[3], n_sel_sat, n_xs_sat,
             n_zero_bits, n_back_to_back, n_xe_hit, n_xs_hit);
    done = 1;
  end
endmodule
