// Self-checking testbench of the morphological baseline filter. A synthetic
// trace (slow baseline wander plus narrow positive and negative peaks and
// noise) with random rate tags is streamed into two instances, one with the
// default windows and one with small ones, with random input gaps and
// output back-pressure. The expected output is computed here on whole
// arrays: left-pad with the first sample, centred erosion/dilation for the
// opening and the closing, y[k] = x[k-LAG] - B[k-LAG], LAG = W_OPEN+W_CLOSE+2.
// The rate tag must come out with its sample.
module tb_morph_filter;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NS = 700, P = 400;

  logic in_valid;
  csample_t in_data;
  logic rdy_a, rdy_b, ov_a, ov_b, ordy;
  csample_t od_a, od_b;
  sample_t bl_a, bl_b;

  morph_filter u_a (.clk, .rst_n, .in_valid, .in_ready(rdy_a), .in_data,
                    .out_valid(ov_a), .out_ready(ordy), .out_data(od_a), .baseline(bl_a));
  morph_filter #(.W_OPEN(5), .W_CLOSE(9)) u_b (.clk, .rst_n, .in_valid, .in_ready(rdy_b), .in_data,
                    .out_valid(ov_b), .out_ready(ordy), .out_data(od_b), .baseline(bl_b));

  initial begin
    repeat (100000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xp [P + NS];
  rate_t rt [NS];
  int yb_a [NS], yb_b [NS];

  function automatic void reference(input int wo, input int wc, output int y [NS]);
    int n = P + NS, h1 = (wo - 1) / 2, h2 = (wc - 1) / 2, lag = wo + wc + 2;
    int e [], o [], cd [], b [];
    e = new[n]; o = new[n]; cd = new[n]; b = new[n];
    for (int m = 0; m < n; m++) begin
      e[m] = xp[m];
      for (int u = m - h1; u <= m + h1; u++) if (u >= 0 && u < n && xp[u] < e[m]) e[m] = xp[u];
    end
    for (int m = 0; m < n; m++) begin
      o[m] = e[m];
      for (int u = m - h1; u <= m + h1; u++) if (u >= 0 && u < n && e[u] > o[m]) o[m] = e[u];
    end
    for (int m = 0; m < n; m++) begin
      cd[m] = o[m];
      for (int u = m - h2; u <= m + h2; u++) if (u >= 0 && u < n && o[u] > cd[m]) cd[m] = o[u];
    end
    for (int m = 0; m < n; m++) begin
      b[m] = cd[m];
      for (int u = m - h2; u <= m + h2; u++) if (u >= 0 && u < n && cd[u] < b[m]) b[m] = cd[u];
    end
    for (int k = 0; k < NS; k++) y[k] = xp[P + k - lag] - b[P + k - lag];
  endfunction

  initial begin
    int ka, kb;
    in_valid = 0; in_data = '0; ordy = 0;
    for (int k = 0; k < NS; k++) begin
      real t;
      int v;
      t = k;
      v = int'(800.0 * $sin(t / 60.0)) + ($urandom % 40);
      if (k % 37 == 3) v += 1500 + $urandom % 500;
      if (k % 53 == 7) v -= 900;
      xp[P + k] = v;
      rt[k] = rate_t'($urandom % 5);
    end
    for (int m = 0; m < P; m++) xp[m] = xp[P];
    reference(31, 47, yb_a);
    reference(5, 9, yb_b);
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    ka = 1; kb = 1;
    for (int k = 0; k < NS; ) begin
      in_valid = 1'($urandom % 3 != 0);
      in_data  = '{rate: rt[k], value: sample_t'(xp[P + k])};
      ordy     = 1'($urandom % 4 != 0);
      #1;
      // the two instances share the handshake, so accept only when both are ready
      if (ov_a && ordy) begin
        checks++;
        if (od_a.value != sample_t'(yb_a[ka]) || od_a.rate != (ka >= 80 ? rt[ka - 80] : rt[0])) begin
          failures++; $display("FAIL A k=%0d got %0d exp %0d", ka, od_a.value, yb_a[ka]);
        end
        ka++;
      end
      if (ov_b && ordy) begin
        checks++;
        if (od_b.value != sample_t'(yb_b[kb]) || od_b.rate != (kb >= 16 ? rt[kb - 16] : rt[0])) begin
          failures++; $display("FAIL B k=%0d got %0d exp %0d", kb, od_b.value, yb_b[kb]);
        end
        kb++;
      end
      if (in_valid && rdy_a) k++;
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (ka < NS - 2) begin failures++; $display("FAIL only %0d outputs", ka); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
