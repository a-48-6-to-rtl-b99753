// Self-checking testbench of the 32-tap FIR filter. Random Q1.15
// coefficients are loaded, then random samples (and a run of full-scale
// values to force saturation) are streamed with random gaps and random
// output back-pressure. Each output is compared with the convolution,
// rounding and saturation computed here; the time from acceptance to
// out_valid is checked to be TAPS+1 clocks.
module tb_fir_filter;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic coef_we, in_valid, in_ready, out_valid, out_ready;
  logic [4:0] coef_addr;
  logic signed [15:0] coef_wdata;
  sample_t in_data, out_data;
  int checks = 0, failures = 0;

  fir_filter dut (.*);

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] c [32];
  sample_t hist [$];

  function automatic sample_t expect_y();
    longint acc = 0;
    for (int k = 0; k < 32; k++) acc += longint'(c[k]) * longint'(hist[k]);
    acc = (acc + (1 << 14)) >>> 15;
    if (acc > 32767) return 16'sh7fff;
    if (acc < -32768) return 16'sh8000;
    return sample_t'(acc);
  endfunction

  task automatic push(input sample_t v, input bit big_coefs);
    int cyc;
    sample_t e;
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_data = v;
    @(negedge clk); in_valid = 0;
    hist.push_front(v); void'(hist.pop_back());
    cyc = 1;
    while (!out_valid) begin @(negedge clk); cyc++; end
    e = expect_y();
    checks++;
    if (out_data != e) begin failures++; $display("FAIL y=%0d exp %0d", out_data, e); end
    checks++;
    if (cyc != 33) begin failures++; $display("FAIL latency %0d", cyc); end
    repeat ($urandom % 3) @(negedge clk);   // back-pressure
    out_ready = 1; @(negedge clk); out_ready = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    coef_we = 0; coef_addr = 0; coef_wdata = 0; in_valid = 0; in_data = 0; out_ready = 0;
    for (int k = 0; k < 32; k++) hist.push_back(16'sd0);
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int k = 0; k < 32; k++) begin
      c[k] = 16'($signed($urandom % 8001) - 4000);
      coef_we = 1; coef_addr = 5'(k); coef_wdata = c[k]; @(negedge clk);
    end
    coef_we = 0;
    repeat (200) push(sample_t'($urandom), 0);
    // large positive coefficients and full-scale input saturate
    for (int k = 0; k < 32; k++) begin
      c[k] = 16'sd20000; coef_we = 1; coef_addr = 5'(k); coef_wdata = c[k]; @(negedge clk);
    end
    coef_we = 0;
    repeat (40) push(16'sh7fff, 1);
    repeat (40) push(16'sh8000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
