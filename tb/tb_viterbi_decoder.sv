// tb_viterbi_decoder: encodes random frames with a reference encoder written
// here (generators 561/753 octal, K-1 zero tail bits), flips isolated code
// bits, feeds the symbols to the decoder with random input gaps and checks
// that every information bit comes back, in order, with dec_last on the last
// one. It also checks the stall after each normal traceback window
// (2 x TB_LEN + 1 = 65 cycles) and counts normal windows, end-of-frame
// tracebacks and corrected errors.
module tb_viterbi_decoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [0:0] in_r0, in_r1;
  logic in_valid, in_last, in_ready;
  logic out_bit, out_valid, out_last;

  always #5 clk = ~clk;

  viterbi_decoder dut (.*);

  localparam bit [0:8] G0 = 9'b101110001;
  localparam bit [0:8] G1 = 9'b111101011;

  bit exp_bits [$];
  bit exp_lastq [$];
  int n_out = 0, n_windows = 0, n_flush = 0, n_errors = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_bits.size() == 0) begin failures++; $display("unexpected output bit"); end
    else begin
      automatic bit b = exp_bits.pop_front();
      automatic bit l = exp_lastq.pop_front();
      if (out_bit !== b || out_last !== l) begin
        failures++;
        $display("bit %0d: got %b/%b exp %b/%b", n_out, out_bit, out_last, b, l);
      end
    end
    n_out++;
  end

  // stall measurement
  int low_run = 0;
  bit after_last = 0;
  always @(posedge clk) if (rst_n) begin
    if (!in_ready) low_run++;
    else if (low_run != 0) begin
      if (!after_last) begin
        checks++;
        n_windows++;
        if (low_run != 65) begin failures++; $display("window stall %0d cycles, expected 65", low_run); end
      end else n_flush++;
      low_run = 0;
    end
    if (in_valid && in_ready) after_last = in_last;
  end

  task automatic send_frame(int n, int err_spacing, bit gaps);
    bit hist [9];
    bit u;
    int since_err = 0;
    foreach (hist[i]) hist[i] = 0;
    for (int i = 0; i < n + 8; i++) begin
      bit a = 0, b = 0;
      u = (i < n) ? 1'($urandom) : 1'b0;
      if (i < n) begin exp_bits.push_back(u); exp_lastq.push_back(i == n - 1); end
      for (int k = 8; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = u;
      for (int k = 0; k < 9; k++) begin a ^= G0[k] & hist[k]; b ^= G1[k] & hist[k]; end
      since_err++;
      if (err_spacing > 0 && since_err >= err_spacing && i < n) begin
        if ($urandom_range(0, 1)) a = !a; else b = !b;
        since_err = 0;
        n_errors++;
      end
      @(negedge clk);
      while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_r0 = a; in_r1 = b; in_last = (i == n + 7);
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
    send_frame(256, 0, 0);      // clean frame of 256 bits
    send_frame(256, 45, 0);     // isolated errors every 45 symbols
    send_frame(30, 0, 1);       // short frame, shorter than one window
    send_frame(600, 40, 1);     // long frame with gaps and errors
    send_frame(1, 0, 0);
    send_frame(56, 0, 0);       // ends exactly when the memory is full
    repeat (200) @(posedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d bits never decoded", exp_bits.size()); end
    checks++;
    if (n_windows == 0 || n_flush != 6 || n_errors == 0) begin
      failures++; $display("mechanism missing: windows %0d flushes %0d errors %0d", n_windows, n_flush, n_errors);
    end
    $display("windows %0d, end-of-frame tracebacks %0d, corrected code-bit errors %0d", n_windows, n_flush, n_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
