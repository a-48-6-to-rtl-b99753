// Self-checking testbench of the data recovery unit. A random multi-rate
// stream (values and rate codes 0..4) is fed with random gaps and random
// output back-pressure. Between consecutive compressed samples p (rate r)
// and s the expected output is p + floor((s-p)*j / 2^r), j = 0..2^r-1,
// computed here; the number of outputs must equal the sum of the gaps.
module tb_data_recovery;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  csample_t in_data;
  sample_t out_data;
  int checks = 0, failures = 0;
  localparam int NS = 400;

  data_recovery dut (.*);

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int v [NS];
  int r [NS];
  int expq [$];

  initial begin
    int k = 0, got = 0, total;
    in_valid = 0; in_data = '0; out_ready = 0;
    for (int i = 0; i < NS; i++) begin
      v[i] = (i % 50 == 0) ? ((i % 100 == 0) ? 32767 : -32768) : $signed($urandom % 20001) - 10000;
      r[i] = $urandom % 5;
    end
    for (int i = 0; i + 1 < NS; i++)
      for (int j = 0; j < (1 << r[i]); j++)
        expq.push_back(v[i] + ((longint'(v[i+1] - v[i]) * j) >>> r[i]));
    total = expq.size();
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    while (got < total) begin
      in_valid  = (k < NS) && 1'($urandom % 3 != 0);
      in_data   = '{rate: rate_t'(r[k < NS ? k : 0]), value: sample_t'(v[k < NS ? k : 0])};
      out_ready = 1'($urandom % 4 != 0);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != sample_t'(expq[got])) begin
          failures++; $display("FAIL out %0d got %0d exp %0d", got, out_data, expq[got]);
        end
        got++;
      end
      if (in_valid && in_ready) k++;
      @(negedge clk);
    end
    out_ready = 1;
    repeat (40) begin
      #1;
      if (out_valid) begin failures++; $display("FAIL extra output"); end
      @(negedge clk);
    end
    checks++;
    $display("%0d outputs from %0d compressed samples", got, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
