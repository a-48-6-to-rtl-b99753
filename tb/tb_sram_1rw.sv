// Self-checking testbench of the single-port memory at its 8 KB default:
// random word and byte-masked writes to random addresses, then reads of a
// shadow copy's addresses, with data due one clock after the read.
module tb_sram_1rw;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [3:0] be;
  logic [10:0] addr;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;

  sram_1rw dut (.*);

  initial begin
    repeat (100000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] shadow [int];

  initial begin
    en = 0; we = 0; be = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int k = 0; k < 3000; k++) begin
      int a;
      logic [31:0] v;
      logic [3:0] m;
      a = $urandom % 2048;
      v = $urandom;
      m = shadow.exists(a) ? 4'($urandom) : 4'hf;
      en = 1; we = 1; be = m; addr = 11'(a); wdata = v;
      @(negedge clk);
      if (!shadow.exists(a)) shadow[a] = 0;
      for (int b = 0; b < 4; b++) if (m[b]) shadow[a][8*b +: 8] = v[8*b +: 8];
    end
    foreach (shadow[a]) begin
      en = 1; we = 0; addr = 11'(a);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata != shadow[a]) begin failures++; $display("FAIL addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
