// tb_acs_unit: random and corner-case operands for one ACS cell, compared
// with an integer reference (smaller candidate wins, predecessor 0 on ties).
module tb_acs_unit;
  int checks = 0, failures = 0;
  logic [7:0] pm0, pm1, pm_new;
  logic [1:0] bm0, bm1;
  logic dec;

  acs_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int a, int b, int x, int y);
    int c0, c1, en, ed;
    pm0 = 8'(a); pm1 = 8'(b); bm0 = 2'(x); bm1 = 2'(y);
    #1;
    c0 = a + x; c1 = b + y;
    ed = (c1 < c0);
    en = ed ? c1 : c0;
    checks++;
    if (dec !== 1'(ed) || pm_new !== 8'(en)) begin
      failures++;
      $display("pm0=%0d pm1=%0d bm0=%0d bm1=%0d: got %0d/%0d exp %0d/%0d", a, b, x, y, pm_new, dec, en, ed);
    end
  endtask

  initial begin
    check_one(10, 10, 1, 1);    // tie
    check_one(10, 9, 0, 1);     // tie after adding
    check_one(10, 9, 0, 0);
    check_one(0, 200, 2, 0);
    check_one(200, 0, 0, 2);
    check_one(253, 252, 2, 2);
    for (int i = 0; i < 2000; i++) begin
      automatic int a = $urandom_range(0, 253);
      automatic int b = (a + $urandom_range(0, 40)) % 254;
      check_one(a, b, $urandom_range(0, 2), $urandom_range(0, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
