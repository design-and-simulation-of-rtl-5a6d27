// tb_viterbi_system: end-to-end test of encoder, error mask and decoder at the
// default parameters (K = 9, 256 states, 64-word survivor memory, traceback
// length 32). It sends 256-bit frames, the frame size the design is built
// around, plus shorter and longer ones; flips isolated code bits through
// err_mask and checks that all information bits come back in order with
// dec_last on the last one. One frame is sent through a channel that flips
// half of all code bits, so that the path metrics grow until normalization
// acts; its output is only counted, and the clean frame after it must decode
// correctly again. Each mechanism is counted and must occur: encoder tail
// symbols, traceback windows and their 65-cycle input stall, end-of-frame
// tracebacks, metric normalization and corrected errors.
module tb_viterbi_system;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_bit, in_valid, in_last, in_ready;
  logic [1:0] err_mask, code_sym;
  logic code_valid, dec_bit, dec_valid, dec_last;

  always #5 clk = ~clk;

  viterbi_system dut (.*);

  bit exp_bits [$];
  bit exp_lastq [$];
  bit exp_check [$];
  int n_out = 0, n_windows = 0, n_flush = 0, n_errors = 0, n_norm = 0;
  int n_tail = 0, n_symbols = 0, n_enc_stall = 0;
  int err_spacing = 0;
  bit noisy = 0;
  int since_err = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoded output checker
  always @(posedge clk) if (rst_n && dec_valid) begin
    if (exp_bits.size() == 0) begin checks++; failures++; $display("unexpected output bit"); end
    else begin
      automatic bit b = exp_bits.pop_front();
      automatic bit l = exp_lastq.pop_front();
      automatic bit c = exp_check.pop_front();
      if (c) begin
        checks++;
        if (dec_bit !== b) begin failures++; $display("output bit %0d: got %b exp %b", n_out, dec_bit, b); end
      end
      checks++;
      if (dec_last !== l) begin failures++; $display("output bit %0d: dec_last %b exp %b", n_out, dec_last, l); end
    end
    n_out++;
  end

  // channel: choose the error mask for the symbol on offer
  always @(negedge clk) begin
    err_mask = 2'b00;
    if (rst_n && dut.enc_valid && !dut.enc_last && dut.dec_ready) begin
      since_err++;
      if (noisy) err_mask = 2'($urandom);
      else if (err_spacing > 0 && since_err >= err_spacing) begin
        err_mask = $urandom_range(0, 1) ? 2'b10 : 2'b01;
        since_err = 0;
      end
    end
  end

  // mechanism counters
  int low_run = 0;
  bit after_last = 0;
  always @(posedge clk) if (rst_n) begin
    if (code_valid) begin
      n_symbols++;
      if (err_mask != 0 && !noisy) n_errors++;
    end
    if (dut.u_enc.tail_q != 0 && dut.u_enc.load) n_tail++;
    if (in_valid && !in_ready) n_enc_stall++;
    if (dut.u_dec.u_acs.step && dut.u_dec.u_acs.norm) n_norm++;
    if (!dut.dec_ready) low_run++;
    else if (low_run != 0) begin
      if (!after_last) begin
        checks++;
        n_windows++;
        if (low_run != 65) begin failures++; $display("window stall %0d cycles, expected 65", low_run); end
      end else n_flush++;
      low_run = 0;
    end
    if (dut.enc_valid && dut.dec_ready) after_last = dut.enc_last;
  end

  task automatic send_frame(int n, bit check_bits);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_bit = 1'($urandom); in_last = (i == n - 1);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      exp_bits.push_back(in_bit); exp_lastq.push_back(in_last); exp_check.push_back(check_bits);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    int t0, cyc;
    in_valid = 0; in_last = 0; in_bit = 0; err_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one clean 256-bit frame, timed from first bit to last decoded bit
    t0 = $time;
    send_frame(256, 1);
    wait (exp_bits.size() == 0);
    cyc = ($time - t0) / 10;
    $display("256-bit frame: %0d cycles from first input to last output", cyc);
    // 264 symbols, 7 window stalls of 65 cycles (after 64, 96, ..., 256
    // symbols), a 40-step end-of-frame traceback and 32 output bits give 791
    // cycles; the encoder register, controller hand-overs and the gap between
    // input bits add a few more.
    checks++;
    if (cyc < 791 || cyc > 830) begin failures++; $display("frame latency %0d outside 791..830", cyc); end
    err_spacing = 40;
    send_frame(256, 1);
    send_frame(256, 1);
    err_spacing = 33;
    send_frame(700, 1);
    err_spacing = 0;
    send_frame(17, 1);
    wait (exp_bits.size() == 0);   // all its symbols, tail included, are through
    noisy = 1;
    send_frame(3000, 0);
    wait (exp_bits.size() == 0);
    noisy = 0;
    send_frame(256, 1);
    wait (exp_bits.size() == 0);
    repeat (50) @(posedge clk);
    checks++;
    if (n_windows == 0) begin failures++; $display("no traceback window"); end
    checks++;
    if (n_flush != 7) begin failures++; $display("end-of-frame tracebacks %0d, expected 7", n_flush); end
    checks++;
    if (n_norm == 0) begin failures++; $display("normalization never happened"); end
    checks++;
    if (n_errors == 0) begin failures++; $display("no error corrected"); end
    checks++;
    if (n_tail != 7 * 8) begin failures++; $display("tail symbols %0d, expected %0d", n_tail, 7 * 8); end
    checks++;
    if (n_enc_stall == 0) begin failures++; $display("input never stalled"); end
    checks++;
    if (n_symbols != 256 * 3 + 700 + 17 + 3000 + 256 + 7 * 8) begin
      failures++; $display("symbols %0d", n_symbols);
    end
    $display("windows %0d, end-of-frame tracebacks %0d, normalizations %0d, corrected errors %0d, tail symbols %0d, input stall cycles %0d",
             n_windows, n_flush, n_norm, n_errors, n_tail, n_enc_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
