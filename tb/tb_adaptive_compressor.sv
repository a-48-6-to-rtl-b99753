// Self-checking testbench of the adaptive compressor. Blocks of 16 samples
// with chosen max-min ranges are sent, one per range class, then random
// blocks. For each block the expected decimation factor is derived here
// from the thresholds, and the emitted samples (x[0], x[N], ...) and their
// rate tags are compared, with random output back-pressure. Every factor
// 1, 2, 4, 8 and 16 must occur.
module tb_adaptive_compressor;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] th [4];
  logic in_valid, in_ready, out_valid, out_ready;
  sample_t in_data;
  csample_t out_data;
  int checks = 0, failures = 0;
  int seen [5];

  adaptive_compressor dut (.*);

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic block(input int base, input int rng);
    sample_t x [16];
    int mx, mn, r, code;
    for (int k = 0; k < 16; k++) x[k] = sample_t'(base + (rng == 0 ? 0 : $urandom % (rng + 1)));
    x[3] = sample_t'(base); x[9] = sample_t'(base + rng);
    mx = x[0]; mn = x[0];
    foreach (x[k]) begin if (x[k] > mx) mx = x[k]; if (x[k] < mn) mn = x[k]; end
    r = mx - mn;
    code = (r >= th[0]) ? 0 : (r >= th[1]) ? 1 : (r >= th[2]) ? 2 : (r >= th[3]) ? 3 : 4;
    seen[code]++;
    for (int k = 0; k < 16; k++) begin
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_data = x[k]; @(negedge clk);
    end
    in_valid = 0;
    for (int k = 0; k < 16; k += (1 << code)) begin
      forever begin
        out_ready = 1'($urandom % 2);

        if (out_valid && out_ready) break;
        @(negedge clk);
      end
      checks++;
      if (out_data.value != x[k] || out_data.rate != rate_t'(code)) begin
        failures++;
        $display("FAIL blk range %0d k=%0d got %0d/%0d exp %0d/%0d", r, k, out_data.value, out_data.rate, x[k], code);
      end
      @(negedge clk);
    end
    out_ready = 0;
  endtask

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0;
    th[0] = 800; th[1] = 400; th[2] = 200; th[3] = 100;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    block(100, 1000); block(-500, 500); block(0, 250); block(2000, 150); block(-3000, 50);
    block(0, 0); block(-32768, 65535);
    repeat (100) block($signed($urandom % 20001) - 10000, $urandom % 1200);
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL factor %0d never used", 1 << k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
