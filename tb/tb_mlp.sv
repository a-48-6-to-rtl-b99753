// Self-checking testbench of the ML processor as a whole. For several
// "cardiac cycles": the host writes some features and the learned model,
// the shape analyzer takes a segment from the signal stream (skewness or
// kurtosis, checked against floating point), the CORDIC takes a vector
// (checked against $sqrt/$atan2), both results land in the feature vector
// at their addresses, and the classification engine (MLC, then SVM) runs.
// The expected scores are recomputed here from the feature values that
// were written, so the feature routing and the classifier are both
// checked; the alarm must follow the class.
module tb_mlp;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam real PI = 3.14159265358979;

  logic smp_valid; sample_t smp_data;
  logic sa_start; logic [7:0] sa_len; sa_order_e sa_order; logic [6:0] sa_fv_addr;
  logic sa_done; logic signed [15:0] sa_result;
  logic [19:0] dl_th_r, dl_th_on; logic [7:0] dl_win_qrs, dl_t_lo, dl_t_hi;
  logic dl_beat, dl_p_ok; logic [15:0] dl_p_pos, dl_q_pos, dl_r_pos, dl_s_pos, dl_t_pos, dl_rr;
  assign dl_th_r = 20'd4000; assign dl_th_on = 20'd1500;
  assign dl_win_qrs = 8'd30; assign dl_t_lo = 8'd30; assign dl_t_hi = 8'd100;
  logic cd_start; logic signed [15:0] cd_x, cd_y, cd_z; logic [6:0] cd_fv_addr; logic cd_done;
  logic host_fv_we; logic [6:0] host_fv_addr; logic signed [15:0] host_fv_wdata;
  logic host_m_we; logic [10:0] host_m_addr; logic [15:0] host_m_wdata;
  logic ce_start; ce_mode_e ce_mode; logic [7:0] ce_nfv; logic [2:0] ce_ncls;
  logic ce_done; logic [1:0] ce_cls; logic signed [63:0] ce_score;
  logic alarm, busy, sa_wr, cd_wr;
  int checks = 0, failures = 0;

  mlp dut (.*);

  initial begin
    repeat (500000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic signed [15:0] fv [128];
  logic signed [15:0] mem [2048];

  task automatic wr_fv(input int a, input int v);
    host_fv_we = 1; host_fv_addr = 7'(a); host_fv_wdata = 16'(v); fv[a] = 16'(v);
    @(negedge clk); host_fv_we = 0;
  endtask
  task automatic wr_m(input int a, input int v);
    host_m_we = 1; host_m_addr = 11'(a); host_m_wdata = 16'(v); mem[a] = 16'(v);
    @(negedge clk); host_m_we = 0;
  endtask

  task automatic shape(input int n, input sa_order_e o, input int addr);
    real xs [], mean, m2, mm, r;
    xs = new[n];
    sa_start = 1; sa_len = 8'(n); sa_order = o; sa_fv_addr = 7'(addr);
    @(negedge clk); sa_start = 0;
    for (int i = 0; i < n; i++) begin
      int v;
      v = (i % 17 == 4) ? 4000 + $urandom % 1000 : $signed($urandom % 601) - 300;
      xs[i] = v;
      smp_valid = 1; smp_data = sample_t'(v); @(negedge clk);
      smp_valid = 0; if ($urandom % 2) @(negedge clk);
    end
    while (!sa_done) @(negedge clk);
    mean = 0; foreach (xs[i]) mean += xs[i]; mean /= n;
    m2 = 0; mm = 0;
    foreach (xs[i]) begin m2 += (xs[i]-mean)**2; mm += (o == SA_KURT) ? (xs[i]-mean)**4 : (xs[i]-mean)**3; end
    m2 /= n; mm /= n;
    r = (o == SA_KURT) ? mm / (m2*m2) : mm / (m2*$sqrt(m2));
    check((real'(sa_result)/256.0 - r) < 0.02 + 0.01*r && (r - real'(sa_result)/256.0) < 0.02 + 0.01*r,
          $sformatf("SA order %0d got %0d ref %f", o, sa_result, r*256));
    fv[addr] = sa_result;
    @(negedge clk); @(negedge clk);
  endtask

  task automatic vec(input int x, input int y, input int z, input int addr);
    real rm;
    cd_start = 1; cd_x = 16'(x); cd_y = 16'(y); cd_z = 16'(z); cd_fv_addr = 7'(addr);
    @(negedge clk); cd_start = 0;
    while (!cd_done) @(negedge clk);
    rm = $sqrt(real'(x)*x + real'(y)*y + real'(z)*z);
    check(real'(dut.u_cordic.mag) - rm < 4 + rm*0.002 && rm - real'(dut.u_cordic.mag) < 4 + rm*0.002, "CORDIC magnitude");
    fv[addr] = $signed(dut.u_cordic.mag); fv[addr+1] = dut.u_cordic.theta; fv[addr+2] = dut.u_cordic.phi;
    repeat (5) @(negedge clk);
  endtask

  task automatic classify_mlc(input int n, input int nc);
    longint sc [4], inner, di, dj;
    int best = 0, stride = 2 + n + n*n;
    for (int c = 0; c < nc; c++) begin
      sc[c] = longint'($signed({mem[c*stride+1], mem[c*stride]})) <<< 16;
      for (int j = 0; j < n; j++) begin
        inner = 0;
        for (int i = 0; i < n; i++) begin
          di = longint'(fv[i]) - longint'(mem[c*stride+2+i]);
          inner += di * longint'(mem[c*stride+2+n+j*n+i]);
        end
        dj = longint'(fv[j]) - longint'(mem[c*stride+2+j]);
        sc[c] += inner * dj;
      end
      if (c == 0 || sc[c] < sc[best]) best = c;
    end
    ce_start = 1; ce_mode = CE_MLC; ce_nfv = 8'(n); ce_ncls = 3'(nc);
    @(negedge clk); ce_start = 0;
    while (!ce_done) @(negedge clk);
    check(ce_cls == 2'(best) && ce_score == sc[best] && alarm == (best != 0),
          $sformatf("MLC class %0d score %0d exp %0d %0d", ce_cls, ce_score, best, sc[best]));
  endtask

  task automatic classify_svm(input int n);
    longint d;
    d = -(longint'($signed({mem[1], mem[0]})) <<< 8);
    for (int i = 0; i < n; i++) d += longint'(fv[i]) * longint'(mem[2+i]);
    ce_start = 1; ce_mode = CE_SVM; ce_nfv = 8'(n); ce_ncls = 3'd1;
    @(negedge clk); ce_start = 0;
    while (!ce_done) @(negedge clk);
    check(ce_score == d && ce_cls == 2'(d > 0) && alarm == (d > 0),
          $sformatf("SVM score %0d exp %0d", ce_score, d));
  endtask

  initial begin
    smp_valid = 0; smp_data = 0; sa_start = 0; sa_len = 0; sa_order = SA_SKEW; sa_fv_addr = 0;
    cd_start = 0; cd_x = 0; cd_y = 0; cd_z = 0; cd_fv_addr = 0;
    host_fv_we = 0; host_fv_addr = 0; host_fv_wdata = 0; host_m_we = 0; host_m_addr = 0; host_m_wdata = 0;
    ce_start = 0; ce_mode = CE_MLC; ce_nfv = 0; ce_ncls = 0;
    foreach (fv[i]) fv[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int cycle = 0; cycle < 4; cycle++) begin
      // 10 features: 0..2 CORDIC, 3 skewness, 4 kurtosis, 5..9 host
      vec($signed($urandom % 4001) - 2000, $signed($urandom % 4001) - 2000, $signed($urandom % 4001) - 2000, 0);
      shape(40 + $urandom % 80, SA_SKEW, 3);
      shape(40 + $urandom % 80, SA_KURT, 4);
      for (int i = 5; i < 10; i++) wr_fv(i, $signed($urandom % 2001) - 1000);
      for (int c = 0; c < 2; c++) begin
        wr_m(c*112, $urandom % 65536); wr_m(c*112+1, $signed($urandom % 21) - 10);
        for (int i = 0; i < 10; i++) wr_m(c*112+2+i, $signed($urandom % 2001) - 1000);
        for (int k = 0; k < 100; k++) wr_m(c*112+12+k, $signed($urandom % 201) - 100);
      end
      classify_mlc(10, 2);
      for (int i = 0; i < 10; i++) wr_m(2+i, $signed($urandom % 401) - 200);
      classify_svm(10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
