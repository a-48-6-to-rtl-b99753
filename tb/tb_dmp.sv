// Self-checking testbench of the data management processor, sampling side
// and burst side on unrelated clocks. Three runs, each from reset:
//  1. MF bypassed, thresholds 0 (every sample kept), two-tap averaging FIR:
//     the output must be round((x[n]+x[n-1])/2) in order. The burst side is
//     held in reset at first so the FIFO fills: burst_req must rise exactly
//     when the level reaches burst_th.
//  2. Baseline filter on: a DC level of 5000 with one-sample spikes through
//     a unit FIR; the output must be the spikes alone (3000) at their places,
//     delayed by W_OPEN+W_CLOSE+1 samples, and 0 elsewhere.
//  3. MF bypassed, thresholds high (1-in-16 decimation) on a ramp: linear
//     recovery must give the ramp back sample for sample.
module tb_dmp;
  import cs_pkg::*;
  logic clk_pp = 0, clk_dsp = 0, rst_pp_n = 0, rst_dsp_n = 0;
  always #7 clk_pp = ~clk_pp;
  always #3 clk_dsp = ~clk_dsp;
  logic coef_we;
  logic [4:0] coef_addr;
  logic signed [15:0] coef_wdata;
  logic [15:0] th [4];
  logic [10:0] burst_th, fifo_level;
  logic smp_valid, smp_ready, burst_req, mf_bypass, out_valid, out_ready, fifo_empty;
  logic drain = 1'b1;
  sample_t smp_data, out_data;
  int checks = 0, failures = 0;

  dmp dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int outs [$];
  int req_level = -1;
  always @(posedge clk_pp) if (rst_pp_n && burst_req && req_level < 0) req_level = int'(fifo_level);
  always @(posedge clk_dsp) if (rst_dsp_n && out_valid && out_ready) outs.push_back(int'(out_data));

  task automatic reset_all();
    rst_pp_n = 0; rst_dsp_n = 0; smp_valid = 0; coef_we = 0;
    repeat (3) @(negedge clk_pp);
    rst_pp_n = 1; rst_dsp_n = 1;
    outs.delete();
    @(negedge clk_pp);
  endtask

  task automatic set_coefs(input int c0, input int c1);
    for (int k = 0; k < 32; k++) begin
      coef_we = 1; coef_addr = 5'(k);
      coef_wdata = (k == 0) ? 16'(c0) : (k == 1) ? 16'(c1) : 16'sd0;
      @(negedge clk_pp);
    end
    coef_we = 0;
  endtask

  task automatic send(input int v);
    smp_valid = 1; smp_data = sample_t'(v);
    @(posedge clk_pp);
    while (!smp_ready) @(posedge clk_pp);
    @(negedge clk_pp);
    smp_valid = 0;
    repeat ($urandom % 3) @(negedge clk_pp);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int x [$];
  initial begin
    out_ready = 1; burst_th = 11'd20; smp_valid = 0; smp_data = 0;
    coef_addr = 0; coef_wdata = 0; coef_we = 0;
    // ---------------- run 1 ----------------
    mf_bypass = 1; th = '{16'd0, 16'd0, 16'd0, 16'd0};
    reset_all();
    rst_dsp_n = 0;
    set_coefs(16384, 16384);
    x.delete();
    req_level = -1;
    for (int k = 0; k < 300; k++) begin
      x.push_back($signed($urandom % 20001) - 10000);
      send(x[k]);
      if (k == 40) begin
        check(req_level == 20, $sformatf("burst_req at level %0d", req_level));
        rst_dsp_n = 1;
      end
    end
    repeat (400) @(negedge clk_pp);
    check(outs.size() >= 270, $sformatf("run 1 output count %0d", outs.size()));
    for (int k = 0; k < outs.size(); k++) begin
      int e;
      e = (x[k] + (k > 0 ? x[k-1] : 0) + 1) >>> 1;
      check(outs[k] == e, $sformatf("run 1 out %0d = %0d exp %0d", k, outs[k], e));
    end
    // ---------------- run 2 ----------------
    mf_bypass = 0;
    reset_all();
    set_coefs(32767, 0);
    x.delete();
    for (int k = 0; k < 400; k++) begin
      x.push_back(5000 + ((k % 23 == 11) ? 3000 : 0));
      send(x[k]);
    end
    repeat (400) @(negedge clk_pp);
    check(outs.size() >= 300, $sformatf("run 2 output count %0d", outs.size()));
    for (int j = 0; j < outs.size(); j++) begin
      int e;
      e = (j >= 79) ? x[j-79] - 5000 : 0;
      check(outs[j] == e, $sformatf("run 2 out %0d = %0d exp %0d", j, outs[j], e));
    end
    // ---------------- run 3 ----------------
    mf_bypass = 1; th = '{16'd60000, 16'd60000, 16'd60000, 16'd60000};
    reset_all();
    set_coefs(32767, 0);
    x.delete();
    for (int k = 0; k < 320; k++) begin
      x.push_back(-4000 + 7 * k);
      send(x[k]);
    end
    repeat (400) @(negedge clk_pp);
    check(outs.size() >= 288, $sformatf("run 3 output count %0d", outs.size()));
    for (int j = 0; j < outs.size(); j++)
      check(outs[j] == x[j], $sformatf("run 3 out %0d = %0d exp %0d", j, outs[j], x[j]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
