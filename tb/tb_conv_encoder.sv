// tb_conv_encoder: checks the K = 9, rate 1/2 encoder against a bit-by-bit
// reference built from the octal generators 561 and 753, over several frames
// with random input gaps and random output back-pressure. It also checks the
// K-1 tail symbols and out_last, and that with no stalls one symbol leaves
// per clock.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0;
  logic in_bit, in_valid, in_last, in_ready;
  logic [1:0] out_sym;
  logic out_valid, out_last, out_ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  conv_encoder dut (.*);

  // Reference: generator taps as integer arrays, tap[8] on the current bit.
  localparam bit [0:8] G0 = 9'b101110001;   // 561 octal, G0[0] taps the current bit
  localparam bit [0:8] G1 = 9'b111101011;   // 753 octal
  bit hist [9];                                    // hist[0] current, hist[8] oldest

  // Expected symbol stream, filled as bits are accepted.
  bit [1:0] exp_sym [$];
  bit       exp_last [$];

  task automatic ref_push(input bit u, input bit lastsym);
    bit a, b;
    a = 0;
    b = 0;
    for (int i = 8; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = u;
    for (int i = 0; i < 9; i++) begin
      a ^= G0[i] & hist[i];
      b ^= G1[i] & hist[i];
    end
    exp_sym.push_back({a, b});
    exp_last.push_back(lastsym);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  int got = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_sym.size() == 0) begin
      failures++; $display("unexpected symbol");
    end else begin
      automatic bit [1:0] s = exp_sym.pop_front();
      automatic bit l = exp_last.pop_front();
      if (out_sym !== s || out_last !== l) begin
        failures++;
        $display("symbol %0d: got %b last %b, expected %b last %b", got, out_sym, out_last, s, l);
      end
    end
    got++;
  end

  bit random_ready;
  always @(negedge clk) out_ready <= random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic send_frame(input int n, input bit gaps);
    foreach (hist[i]) hist[i] = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      in_bit   = 1'($urandom);
      in_last  = (i == n - 1);
      #1;
      while (!(in_valid && in_ready)) begin
        @(negedge clk);
        in_valid = 1'b1;
        #1;
      end
      @(posedge clk);
      ref_push(in_bit, 1'b0);
      if (in_last) for (int t = 0; t < 8; t++) ref_push(1'b0, t == 7);
    end
    @(negedge clk);
    in_valid = 0;
    in_last  = 0;
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_bit = 0; random_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(40, 1);
    send_frame(256, 1);
    send_frame(5, 0);
    repeat (40) @(posedge clk);
    // Throughput: no gaps, always ready: 256 bits + 8 tail symbols in 264
    // cycles, plus the output register and the start of the count.
    random_ready = 0;
    @(negedge clk);
    begin
      automatic int start_got = got;
      automatic int cyc = 0;
      fork
        send_frame(256, 0);
        begin
          while (got - start_got < 264) begin @(posedge clk); cyc++; end
        end
      join
      checks++;
      if (cyc > 268) begin failures++; $display("264 symbols took %0d cycles", cyc); end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (exp_sym.size() != 0) begin failures++; $display("%0d symbols missing", exp_sym.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
