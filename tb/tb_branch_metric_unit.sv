// tb_branch_metric_unit: exhaustive check of the branch metrics for hard
// decisions (SOFT_BITS = 1, Hamming distance) and for 3-bit soft inputs
// (sum of absolute differences from 0 and 7).
module tb_branch_metric_unit;
  int checks = 0, failures = 0;

  logic [0:0] h0, h1;
  logic [1:0] hbm [4];
  logic [2:0] s0, s1;
  logic [3:0] sbm [4];

  branch_metric_unit dut_hard (.r0(h0), .r1(h1), .bm(hbm));
  branch_metric_unit #(.SOFT_BITS(3)) dut_soft (.r0(s0), .r1(s1), .bm(sbm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absd(int r, int e);
    return (r > e) ? r - e : e - r;
  endfunction

  initial begin
    for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++) begin
      h0 = 1'(a); h1 = 1'(b);
      #1;
      for (int c = 0; c < 4; c++) begin
        // Hamming distance between received {a,b} and code symbol c
        automatic int e = ((c >> 1) != a) + ((c & 1) != b);
        checks++;
        if (hbm[c] !== 2'(e)) begin
          failures++; $display("hard r=%0d%0d c=%0d got %0d exp %0d", a, b, c, hbm[c], e);
        end
      end
    end
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) begin
      s0 = 3'(a); s1 = 3'(b);
      #1;
      for (int c = 0; c < 4; c++) begin
        automatic int e = absd(a, (c >> 1) * 7) + absd(b, (c & 1) * 7);
        checks++;
        if (sbm[c] !== 4'(e)) begin
          failures++; $display("soft r=%0d,%0d c=%0d got %0d exp %0d", a, b, c, sbm[c], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
