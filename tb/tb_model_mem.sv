// Testbench of the learned-model memory at its full size (2048 x 16 bit,
// 4 KB). Writes a pattern computed from the address to every word, then
// reads random pairs of addresses on the two ports and checks that each
// read returns the word one clock after its address is presented (one-cycle
// synchronous read). Then random writes are mixed with reads, against a
// reference array; a read of the word being written returns the old value.
module tb_model_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [10:0] waddr, raddr0, raddr1;
  logic [15:0] wdata, rdata0, rdata1;
  logic [15:0] ref_m [2048];
  logic [15:0] exp0, exp1;
  int checks = 0, failures = 0;

  model_mem dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr0 = 0; raddr1 = 0;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      we = 1; waddr = 11'(a); wdata = 16'(a * 40503 + 17); ref_m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = (n >= 2000) && ($urandom % 2 == 1); waddr = 11'($urandom); wdata = 16'($urandom);
      raddr0 = 11'($urandom); raddr1 = (n % 5 == 0) ? waddr : 11'($urandom);
      exp0 = ref_m[raddr0]; exp1 = ref_m[raddr1];
      @(posedge clk);
      if (we) ref_m[waddr] = wdata;
      #1;
      checks++;
      if (rdata0 != exp0 || rdata1 != exp1) begin
        failures++; $display("FAIL read %0d/%0d: %h %h exp %h %h", raddr0, raddr1, rdata0, rdata1, exp0, exp1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
