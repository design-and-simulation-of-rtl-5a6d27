// tb_acs_array: runs the 256-state ACS array for many trellis steps with
// random branch metrics (0..2) and compares it with an integer reference of
// the trellis that never normalizes. Decision words must match exactly and
// every metric must equal the reference minus the same offset, which must be
// a multiple of 128 (normalization). It checks that normalization happened and
// that init restores the start metrics.
module tb_acs_array;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init, step;
  logic [1:0] bm [4];
  logic [7:0] pm [256];
  logic [255:0] dec;
  logic norm;
  int norm_events = 0;

  always #5 clk = ~clk;

  acs_array dut (.*);

  localparam bit [0:8] G0 = 9'b101110001;   // 561 octal, G0[0] taps the newest bit
  localparam bit [0:8] G1 = 9'b111101011;   // 753 octal

  longint refm [256];

  // Code symbol {c0,c1} on the branch into state j (8 bits, bit 7 = newest
  // input) from predecessor with oldest bit d.
  function automatic int sym(int j, int d);
    bit r [9];
    bit a = 0, b = 0;
    for (int i = 0; i < 8; i++) r[i] = 1'((j >> (7 - i)) & 1);
    r[8] = 1'(d);
    for (int i = 0; i < 9; i++) begin a ^= G0[i] & r[i]; b ^= G1[i] & r[i]; end
    return {30'b0, a, b};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(input string what);
    longint off = refm[0] - longint'(pm[0]);
    bit ok = (off % 128 == 0);
    for (int j = 0; j < 256; j++) if (refm[j] - longint'(pm[j]) != off) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("%s: metrics differ from reference", what); end
  endtask

  initial begin
    int bmv [4];
    longint nref [256];
    bit [255:0] edec;
    init = 0; step = 0;
    foreach (bm[i]) bm[i] = 0;
    for (int j = 0; j < 256; j++) refm[j] = (j == 0) ? 0 : 64;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state("after reset");
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      step = ($urandom_range(0, 7) != 0);
      for (int c = 0; c < 4; c++) begin bmv[c] = $urandom_range(0, 2); bm[c] = 2'(bmv[c]); end
      for (int j = 0; j < 256; j++) begin
        automatic int p0 = (2 * j) % 256;
        automatic longint c0 = refm[p0] + bmv[sym(j, 0)];
        automatic longint c1 = refm[p0 + 1] + bmv[sym(j, 1)];
        edec[j] = (c1 < c0);
        nref[j] = edec[j] ? c1 : c0;
      end
      #1;
      if (step) begin
        checks++;
        if (dec !== edec) begin failures++; $display("step %0d: decision word differs", t); end
        if (norm) norm_events++;
      end
      @(posedge clk);
      if (step) refm = nref;
      #1;
      check_state($sformatf("step %0d", t));
    end
    checks++;
    if (norm_events == 0) begin failures++; $display("normalization never happened"); end
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    for (int j = 0; j < 256; j++) refm[j] = (j == 0) ? 0 : 64;
    check_state("after init");
    checks++;
    if (pm[0] !== 0 || pm[1] !== 64) begin failures++; $display("init values wrong"); end
    $display("normalizations: %0d", norm_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
