// Testbench of the feature-vector buffer at its full size (128 x 16 bit).
// A reference array tracks every write. Random writes, with the write enable
// also toggled off, are interleaved with reads on both combinational ports,
// checked in the same cycle against the reference: each write must change
// exactly the addressed register and only when we is high. Reset must clear
// every register.
module tb_fv_buffer;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we;
  logic [6:0] waddr, raddr0, raddr1;
  logic signed [15:0] wdata, rdata0, rdata1;
  logic signed [15:0] ref_fv [128];
  int checks = 0, failures = 0;

  fv_buffer dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr0 = 0; raddr1 = 0;
    foreach (ref_fv[i]) ref_fv[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      raddr0 = 7'(i); raddr1 = 7'(127 - i); #1;
      checks++;
      if (rdata0 != 0 || rdata1 != 0) begin failures++; $display("FAIL reset value at %0d", i); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0; waddr = 7'($urandom); wdata = 16'($urandom);
      raddr0 = 7'($urandom); raddr1 = (n % 3 == 0) ? waddr : 7'($urandom);
      #1;
      checks++;
      if (rdata0 != ref_fv[raddr0] || rdata1 != ref_fv[raddr1]) begin
        failures++; $display("FAIL read %0d/%0d: %0d %0d exp %0d %0d", raddr0, raddr1, rdata0, rdata1, ref_fv[raddr0], ref_fv[raddr1]);
      end
      @(posedge clk);
      if (we) ref_fv[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 128; i++) begin
      raddr0 = 7'(i); raddr1 = 7'(i); #1;
      checks++;
      if (rdata0 != ref_fv[i] || rdata1 != ref_fv[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
