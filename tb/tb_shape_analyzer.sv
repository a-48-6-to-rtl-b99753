// Self-checking testbench of the shape analyzer. Random wave segments of
// several lengths (up to the 128-sample maximum) and shapes (symmetric,
// skewed, spiky) are sent through both orders; the result is compared with
// skewness/kurtosis computed here in floating point straight from the
// defining formula, within a tolerance for the integer mean and truncation.
// It also checks that a 128-sample window finishes within 300 clocks after
// its last sample, and that a flat window gives 0.
module tb_shape_analyzer;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, busy, done;
  logic [7:0] len;
  sa_order_e order;
  sample_t in_data;
  logic signed [15:0] result;
  int checks = 0, failures = 0;

  shape_analyzer dut (.clk, .rst_n, .start, .len, .order, .in_valid, .in_data,
                      .busy, .done, .result);

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t x [128];

  task automatic run(input int n, input sa_order_e o, input bit check_time);
    real mean, m2, mm, ref_v, tol, got;
    int cyc;
    start = 1; len = 8'(n); order = o;
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_data = x[i];
      @(negedge clk);
    end
    in_valid = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    mean = 0; foreach (x[i]) if (i < n) mean += x[i];
    mean /= n;
    m2 = 0; mm = 0;
    for (int i = 0; i < n; i++) begin
      m2 += (x[i]-mean)**2;
      mm += (o == SA_KURT) ? (x[i]-mean)**4 : (x[i]-mean)**3;
    end
    m2 /= n; mm /= n;
    ref_v = (m2 == 0) ? 0 : ((o == SA_KURT) ? mm / (m2*m2) : mm / (m2 * $sqrt(m2)));
    if (ref_v > 127.99) ref_v = 127.99;
    got = real'(result) / 256.0;
    tol = 0.02 + 0.01 * (ref_v < 0 ? -ref_v : ref_v);
    checks++;
    if ((got - ref_v > tol) || (ref_v - got > tol)) begin
      failures++;
      $display("FAIL n=%0d order=%0d got=%f ref=%f", n, o, got, ref_v);
    end
    if (check_time) begin
      checks++;
      if (cyc > 300) begin failures++; $display("FAIL latency %0d > 300", cyc); end
      else $display("len %0d order %0d: %0d clocks after last sample", n, o, cyc);
    end
  endtask

  initial begin
    start = 0; in_valid = 0; len = 0; order = SA_SKEW; in_data = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 24; t++) begin
      int n, shape;
      n = (t % 3 == 0) ? 128 : 16 + ($urandom % 100);
      shape = t % 4;
      for (int i = 0; i < 128; i++) begin
        case (shape)
          0: x[i] = sample_t'($signed($urandom % 2001) - 1000);
          1: x[i] = sample_t'(($urandom % 8 == 0) ? 3000 + $urandom % 2000 : $urandom % 400);
          2: x[i] = sample_t'(-(($urandom % 6 == 0) ? 5000 + $urandom % 3000 : $urandom % 300));
          default: x[i] = sample_t'(20000 * ((i % 32) == 5) - 1000 + $urandom % 50);
        endcase
      end
      run(n, SA_SKEW, n == 128);
      run(n, SA_KURT, n == 128);
    end
    for (int i = 0; i < 128; i++) x[i] = 16'sd1234;
    run(64, SA_KURT, 0);
    run(64, SA_SKEW, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
