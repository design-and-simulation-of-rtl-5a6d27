// tb_survivor_memory: writes random 256-bit words at random addresses while
// reading others, and checks that reads return the last word written there
// in the same cycle the address is given (asynchronous read), and that a
// write appears only after its clock edge.
module tb_survivor_memory;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we;
  logic [5:0] waddr, raddr;
  logic [255:0] wdata, rdata;
  logic [255:0] model [64];

  always #5 clk = ~clk;

  survivor_memory dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    // fill every word
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = rnd256(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 6'($urandom);
      wdata = rnd256();
      raddr = 6'($urandom);
      #1;
      checks++;   // read is combinational and shows the old content before the edge
      if (rdata !== model[raddr]) begin failures++; $display("read %0d mismatch", raddr); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;   // after the edge the written word is visible
      if (rdata !== model[raddr]) begin failures++; $display("read-after-write %0d mismatch", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
