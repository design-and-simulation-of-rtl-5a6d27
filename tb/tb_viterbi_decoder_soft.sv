// tb_viterbi_decoder_soft: the decoder with 3-bit soft-decision inputs.
// Code bits are sent as levels 0 and 7 plus Gaussian noise (sigma = 1.5
// levels, approximated by a sum of 12 uniform values) and rounded and clipped
// to 0..7. At this noise level roughly 1 % of the code bits land on the wrong
// side of the decision threshold; the test counts those and requires some,
// and requires every 256-bit frame to be decoded without a bit error.
module tb_viterbi_decoder_soft;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] in_r0, in_r1;
  logic in_valid, in_last, in_ready;
  logic out_bit, out_valid, out_last;

  always #5 clk = ~clk;

  viterbi_decoder #(.SOFT_BITS(3)) dut (.*);

  localparam bit [0:8] G0 = 9'b101110001;
  localparam bit [0:8] G1 = 9'b111101011;

  bit exp_bits [$];
  bit exp_lastq [$];
  int n_out = 0, hard_errors = 0, bit_errors = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_bits.size() == 0) begin failures++; $display("unexpected output bit"); end
    else begin
      automatic bit b = exp_bits.pop_front();
      automatic bit l = exp_lastq.pop_front();
      if (out_bit !== b || out_last !== l) begin
        failures++; bit_errors++;
        $display("bit %0d: got %b/%b exp %b/%b", n_out, out_bit, out_last, b, l);
      end
    end
    n_out++;
  end

  function automatic logic [2:0] channel(bit c);
    real n = 0.0;
    real y;
    int q;
    for (int i = 0; i < 12; i++) n += real'($urandom_range(0, 9999)) / 10000.0;
    n -= 6.0;
    y = (c ? 7.0 : 0.0) + 1.5 * n;
    q = $rtoi(y + 100.5) - 100;     // round to nearest
    if (q < 0) q = 0;
    if (q > 7) q = 7;
    if ((q >= 4) != c) hard_errors++;
    return 3'(q);
  endfunction

  task automatic send_frame(int n);
    bit hist [9];
    foreach (hist[i]) hist[i] = 0;
    for (int i = 0; i < n + 8; i++) begin
      automatic bit a = 0, b = 0;
      automatic bit u = (i < n) ? 1'($urandom) : 1'b0;
      if (i < n) begin exp_bits.push_back(u); exp_lastq.push_back(i == n - 1); end
      for (int k = 8; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = u;
      for (int k = 0; k < 9; k++) begin a ^= G0[k] & hist[k]; b ^= G1[k] & hist[k]; end
      @(negedge clk);
      in_valid = 1; in_r0 = channel(a); in_r1 = channel(b); in_last = (i == n + 7);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_r0 = 0; in_r1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) send_frame(256);
    repeat (200) @(posedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d bits never decoded", exp_bits.size()); end
    checks++;
    if (hard_errors == 0) begin failures++; $display("channel produced no hard errors"); end
    $display("code bits past the threshold: %0d of %0d, decoded bit errors: %0d",
             hard_errors, 8 * 264 * 2, bit_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
