// Testbench of the wavelet delineator. A synthetic ECG is generated with
// known fiducial points: a Gaussian P wave 40 samples before R, a small Q
// dip, a triangular R spike of 3000, an S dip, a Gaussian T wave 70 samples
// after R, noise of +-10, and beat periods drawn from 160..200 samples. One
// long gap holds a baseline step up and back down, an artifact that rises
// like a QRS but never falls, which must not be reported. Every reported beat
// is matched with the nearest true R and checked: R within 2 samples, P and
// T peaks within 6, QRS onset 3..14 samples before R, S point 3..14 after,
// and rr equal to the true distance within 2. Every true beat must be found,
// once, and the artifact must have been taken up and dropped.
module tb_wavelet_delineator;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid; sample_t in_data;
  logic [19:0] th_r, th_on; logic [7:0] win_qrs, t_lo, t_hi;
  logic beat, p_ok; logic [15:0] p_pos, q_pos, r_pos, s_pos, t_pos, rr;
  int checks = 0, failures = 0;

  wavelet_delineator dut (.*);

  localparam int NS = 6000;
  int sig [NS];
  int rtrue [$];
  int step_lo = -1, step_hi = -1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real bump(input int k, input int ctr, input real amp, input real w);
    return amp * $exp(-((k - ctr) * (k - ctr)) / (w * w));
  endfunction

  initial begin
    int r, nb;
    real v;
    r = 100;
    nb = 0;
    while (r < NS - 150) begin
      rtrue.push_back(r);
      nb++;
      if (nb == 10) begin step_lo = r + 110; step_hi = r + 260; r += 400; end
      else r += 160 + $urandom % 41;
    end
    for (int k = 0; k < NS; k++) begin
      v = 0;
      foreach (rtrue[i]) begin
        int dk;
        dk = k - rtrue[i];
        if (dk > -80 && dk < 120) begin
          v += bump(k, rtrue[i] - 40, 250.0, 6.0) + bump(k, rtrue[i] + 70, 500.0, 12.0);
          if (dk >= -5 && dk <= 0) v += 3000.0 * (dk + 5) / 5.0;
          if (dk > 0 && dk <= 5) v += 3000.0 * (5 - dk) / 5.0;
          if (dk >= -8 && dk <= -6) v -= 300.0 * (dk == -7 ? 1.0 : 0.5);
          if (dk >= 6 && dk <= 8) v -= 600.0 * (dk == 7 ? 1.0 : 0.5);
        end
      end
      if (k >= step_lo && k < step_hi) v += 2000.0;
      sig[k] = int'(v) + $signed($urandom % 21) - 10;
    end
  end

  // rejected QRS candidates (the step artifact must be one)
  int aborts = 0;
  always @(posedge clk) if (rst_n && in_valid && dut.warm &&
      ((dut.state == dut.S_RISE && dut.d > 0 && dut.since > 16'(win_qrs)) ||
       (dut.state == dut.S_FALL && !(dut.neg_ok && dut.d > -dut.thon) && dut.since > 16'(win_qrs)))) aborts++;

  // match reported beats
  int found [$];
  always @(posedge clk) if (rst_n && beat) begin
    int best, bd, ad;
    best = 0; bd = 1 << 30;
    foreach (rtrue[i]) begin
      ad = int'(r_pos) - rtrue[i]; if (ad < 0) ad = -ad;
      if (ad < bd) begin bd = ad; best = i; end
    end
    found.push_back(best);
    if (bd > 2) $display("beat at %0t: p %0d q %0d r %0d s %0d t %0d rr %0d", $time, p_pos, q_pos, r_pos, s_pos, t_pos, rr);
    check(bd <= 2, $sformatf("R at %0d, nearest true %0d", r_pos, rtrue[best]));
    check(int'(q_pos) <= rtrue[best] - 3 && int'(q_pos) >= rtrue[best] - 14, $sformatf("onset %0d for R %0d", q_pos, rtrue[best]));
    check(int'(s_pos) >= rtrue[best] + 3 && int'(s_pos) <= rtrue[best] + 14, $sformatf("S %0d for R %0d", s_pos, rtrue[best]));
    check(int'(t_pos) - (rtrue[best] + 70) <= 6 && (rtrue[best] + 70) - int'(t_pos) <= 6, $sformatf("T %0d for R %0d", t_pos, rtrue[best]));
    if (best > 0 && rtrue[best-1] < step_lo - 300 || best > 0 && rtrue[best-1] > step_hi) begin
      check(p_ok && int'(p_pos) - (rtrue[best] - 40) <= 6 && (rtrue[best] - 40) - int'(p_pos) <= 6,
            $sformatf("P %0d ok %0d for R %0d", p_pos, p_ok, rtrue[best]));
      check(int'(rr) - (rtrue[best] - rtrue[best-1]) <= 2 && (rtrue[best] - rtrue[best-1]) - int'(rr) <= 2,
            $sformatf("rr %0d for R %0d", rr, rtrue[best]));
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    th_r = 20'd4000; th_on = 20'd1500; win_qrs = 8'd30; t_lo = 8'd30; t_hi = 8'd100;
    #22 rst_n = 1;
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      in_valid = 1; in_data = sample_t'(sig[k]);
      if (k % 7 == 3) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    check(found.size() == rtrue.size() - ((rtrue[$] + 100 + 8 > NS) ? 1 : 0),
          $sformatf("beats reported %0d of %0d", found.size(), rtrue.size()));
    check(aborts >= 1, $sformatf("artifact rejected %0d times", aborts));
    foreach (found[i]) if (i > 0) check(found[i] == found[i-1] + 1, "beats reported once each, in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
