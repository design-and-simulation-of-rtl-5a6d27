// tb_best_state_finder: random metric sets (including many ties) over 256
// states, compared with a linear scan that keeps the lowest index on ties.
module tb_best_state_finder;
  int checks = 0, failures = 0;
  logic [7:0] pm [256];
  logic [7:0] best, best_pm;

  best_state_finder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic int range = (t % 3 == 0) ? 3 : 255;
      automatic int ri = 0;
      automatic int rv = 1000;
      for (int i = 0; i < 256; i++) pm[i] = 8'($urandom_range(0, range));
      if (t % 5 == 1) pm[$urandom_range(0, 255)] = 0;
      #1;
      for (int i = 0; i < 256; i++) if (int'(pm[i]) < rv) begin rv = pm[i]; ri = i; end
      checks++;
      if (best !== 8'(ri) || best_pm !== 8'(rv)) begin
        failures++; $display("trial %0d: got %0d (%0d) exp %0d (%0d)", t, best, best_pm, ri, rv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
