// tb_xs_lut_ram: self-checking test of the VME-loadable look-up table.
//
// Three instances cover the widths the trigger uses: 12x7 (default, as the
// ETmiss LUT), 10x6 (a square-root style LUT with two dead bits per byte) and
// 9x8 (full bytes). Each is filled over VME with random words; a reference
// copy of what should be stored is kept. Then every location is read through
// the trigger port (one-clock latency checked) and every word is read back
// over VME, where the bits above the location width must read as zero even
// though ones were written to them. A trigger read running during VME writes
// to another word must be undisturbed.
module tb_xs_lut_ram;
  import xs_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  // ---------------- instance A: 12 x 7 (defaults) ----------------
  logic [11:0] a_rd_addr;
  logic [6:0]  a_rd_data;
  logic        a_we, a_re;
  logic [10:0] a_word;
  logic [15:0] a_wdata, a_rdata;
  logic [6:0]  a_ref [4096];

  xs_lut_ram dut_a (
    .clk, .rd_addr(a_rd_addr), .rd_data(a_rd_data),
    .vme_we(a_we), .vme_re(a_re), .vme_word(a_word),
    .vme_wdata(a_wdata), .vme_rdata(a_rdata)
  );

  // ---------------- instance B: 10 x 6 ----------------
  logic [9:0]  b_rd_addr;
  logic [5:0]  b_rd_data;
  logic        b_we, b_re;
  logic [8:0]  b_word;
  logic [15:0] b_wdata, b_rdata;
  logic [5:0]  b_ref [1024];

  xs_lut_ram #(.AW(10), .DW(6)) dut_b (
    .clk, .rd_addr(b_rd_addr), .rd_data(b_rd_data),
    .vme_we(b_we), .vme_re(b_re), .vme_word(b_word),
    .vme_wdata(b_wdata), .vme_rdata(b_rdata)
  );

  // ---------------- instance C: 9 x 8 ----------------
  logic [8:0]  c_rd_addr;
  logic [7:0]  c_rd_data;
  logic        c_we, c_re;
  logic [7:0]  c_word;
  logic [15:0] c_wdata, c_rdata;
  logic [7:0]  c_ref [512];

  xs_lut_ram #(.AW(9), .DW(8)) dut_c (
    .clk, .rd_addr(c_rd_addr), .rd_data(c_rd_data),
    .vme_we(c_we), .vme_re(c_re), .vme_word(c_word),
    .vme_wdata(c_wdata), .vme_rdata(c_rdata)
  );

  initial begin
    a_we = 0; a_re = 0; a_word = 0; a_wdata = 0; a_rd_addr = 0;
    b_we = 0; b_re = 0; b_word = 0; b_wdata = 0; b_rd_addr = 0;
    c_we = 0; c_re = 0; c_word = 0; c_wdata = 0; c_rd_addr = 0;
    @(negedge clk);

    // ---- load all three over VME; every written word has all 16 bits random
    for (int w = 0; w < 2048; w++) begin
      logic [15:0] d;
      d = 16'($urandom());
      a_we = 1; a_word = 11'(w); a_wdata = d;
      a_ref[2*w] = d[6:0]; a_ref[2*w+1] = d[14:8];
      if (w < 512) begin
        d = 16'($urandom()) | 16'hC0C0;   // force ones into the dead bits
        b_we = 1; b_word = 9'(w); b_wdata = d;
        b_ref[2*w] = d[5:0]; b_ref[2*w+1] = d[13:8];
      end else b_we = 0;
      if (w < 256) begin
        d = 16'($urandom());
        c_we = 1; c_word = 8'(w); c_wdata = d;
        c_ref[2*w] = d[7:0]; c_ref[2*w+1] = d[15:8];
      end else c_we = 0;
      @(negedge clk);
    end
    a_we = 0; b_we = 0; c_we = 0;

    // ---- trigger port, every location, back to back
    for (int i = 0; i <= 4096; i++) begin
      if (i < 4096) a_rd_addr = 12'(i);
      if (i < 1024) b_rd_addr = 10'(i);
      if (i < 512)  c_rd_addr = 9'(i);
      @(posedge clk);
      #1;
      // data for address i appears after this edge; the previous value before it
      check("A rd", a_rd_data, a_ref[i < 4096 ? i : 4095]);
      if (i < 1024) check("B rd", b_rd_data, b_ref[i]);
      if (i < 512)  check("C rd", c_rd_data, c_ref[i]);
      @(negedge clk);
    end

    // ---- latency: a new address does not change rd_data before the edge
    a_rd_addr = 12'd5;
    @(posedge clk); #1;
    a_rd_addr = 12'd6;
    #2;
    check("A latency", a_rd_data, a_ref[5]);
    @(negedge clk);

    // ---- VME read-back of every word, dead bits must be zero
    for (int w = 0; w < 2048; w++) begin
      a_re = 1; a_word = 11'(w);
      b_re = (w < 512); b_word = 9'(w);
      c_re = (w < 256); c_word = 8'(w);
      @(posedge clk); #1;
      check("A vme", a_rdata, {1'b0, a_ref[2*w+1], 1'b0, a_ref[2*w]});
      if (w < 512) check("B vme", b_rdata, {2'b00, b_ref[2*w+1], 2'b00, b_ref[2*w]});
      if (w < 256) check("C vme", c_rdata, {c_ref[2*w+1], c_ref[2*w]});
      @(negedge clk);
    end
    a_re = 0; b_re = 0; c_re = 0;

    // ---- VME read data is held while vme_re is low
    @(negedge clk);
    check("A vme hold", a_rdata, {1'b0, a_ref[4095], 1'b0, a_ref[4094]});

    // ---- trigger reads during VME writes to other words
    for (int i = 0; i < 200; i++) begin
      int loc;
      logic [15:0] d;
      loc = $urandom_range(0, 4095);
      a_rd_addr = 12'(loc);
      d = 16'($urandom());
      a_we = 1; a_word = 11'((loc / 2 + 1 + $urandom_range(0, 2000)) % 2048);
      a_wdata = d;
      @(posedge clk); #1;
      check("A rd during write", a_rd_data, a_ref[loc]);
      a_ref[2*a_word] = d[6:0]; a_ref[2*a_word+1] = d[14:8];
      @(negedge clk);
    end
    a_we = 0;
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
