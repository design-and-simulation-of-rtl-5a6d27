// tb_survivor_metric_unit: fills a model of the survivor memory with random
// decision words and runs tracebacks with random start state, start address,
// length and skip count. The decoded bits must equal those of a reference
// traceback, arrive oldest first right after the trace, with out_last only
// when requested, and the trace must take exactly n_steps cycles.
module tb_survivor_metric_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, last_frame;
  logic [7:0] start_state;
  logic [5:0] start_addr, rd_addr;
  logic [6:0] n_steps, n_skip;
  logic [255:0] rd_data;
  logic busy, trace_done, idle, out_bit, out_valid, out_last;
  logic [255:0] mem [64];

  always #5 clk = ~clk;
  assign rd_data = mem[rd_addr];

  survivor_metric_unit dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int st, int addr, int n, int skip, bit lastf);
    bit expb [$];
    bit gotb [$];
    int s = st, a = addr, cyc = 0, nout;
    bit seen_last = 0;
    // reference, newest step first
    for (int k = 0; k < n; k++) begin
      automatic int d = mem[a][s];
      if (k >= skip) expb.push_front(1'(s >> 7));
      s = ((s << 1) & 255) | d;
      a = (a + 63) % 64;
    end
    nout = expb.size();
    @(negedge clk);
    start = 1; start_state = 8'(st); start_addr = 6'(addr);
    n_steps = 7'(n); n_skip = 7'(skip); last_frame = lastf;
    @(negedge clk);
    start = 0;
    // trace: count cycles up to trace_done
    cyc = 1;
    while (!trace_done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != n) begin failures++; $display("trace of %0d steps took %0d cycles", n, cyc); end
    @(negedge clk);
    for (int i = 0; i < nout; i++) begin
      if (!out_valid) begin failures++; $display("gap in output at bit %0d", i); end
      gotb.push_back(out_bit);
      if (out_last) seen_last = (i == nout - 1);
      @(negedge clk);
    end
    checks++;
    if (out_valid) begin failures++; $display("too many output bits"); end
    checks++;
    if (gotb != expb) begin failures++; $display("decoded bits differ (n=%0d skip=%0d)", n, skip); end
    checks++;
    if (seen_last != (lastf && nout > 0)) begin failures++; $display("out_last wrong"); end
    checks++;
    if (!idle) begin failures++; $display("not idle after streaming"); end
  endtask

  initial begin
    start = 0; start_state = 0; start_addr = 0; n_steps = 0; n_skip = 0; last_frame = 0;
    for (int a = 0; a < 64; a++) for (int w = 0; w < 8; w++) mem[a][w*32 +: 32] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 63, 64, 32, 0);
    run(8'hA5, 10, 64, 32, 0);
    run(0, 5, 40, 8, 1);
    run(3, 0, 64, 0, 1);
    run(7, 30, 1, 0, 1);
    for (int i = 0; i < 40; i++) begin
      automatic int n = $urandom_range(1, 64);
      run($urandom_range(0, 255), $urandom_range(0, 63), n, $urandom_range(0, n), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
