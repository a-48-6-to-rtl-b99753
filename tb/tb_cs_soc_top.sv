// End-to-end testbench of the SoC top at its default parameters (three
// channels). A synthetic ECG (baseline wander, a QRS-like spike every 100
// samples, a T-like hump, noise) is produced by three ADC models on every
// fs_tick, with gains 1, 0.6 and -0.5 as three leads would see one heart,
// and fed into the three pre-processing chains. The configuration FSM duty-cycles the chip: the
// FIFO fills while asleep, burst_req wakes the burst domain, and a model of
// the general-purpose processor, on each run, starts the shape analyzer on
// the recovered stream, the CORDIC on a vector, writes host features,
// exercises the instruction/data memories and runs the classifier (MLC on
// even bursts, SVM on odd ones). Later bursts run with the baseline filter
// bypassed. Checked: shape-analyzer results against floating point on the
// very samples it consumed; MLC/SVM scores recomputed from the feature
// vector; alarm on the SVM bursts set by the sign of a host feature; memory
// read-back; baseline removal (output much closer to zero with the filter
// than without); and that every mechanism happened: several sleep/wake
// bursts, at least three decimation factors, filter on and bypassed,
// skewness, kurtosis, CORDIC, MLC, SVM, alarm raised and not raised,
// heartbeats found by the delineator, most of them 100 samples apart, and
// the ML processor watching channel 0 and then channel 2, exactly as
// selected. The baseline and decimation checks watch channel 0.
module tb_cs_soc_top;
  import cs_pkg::*;
  logic clk_sys = 0, clk_pp = 0, clk_dsp = 0;
  logic rst_sys_n = 0, rst_pp_n = 0, rst_dsp_n = 0;
  always #500 clk_sys = ~clk_sys;
  always #25  clk_pp  = ~clk_pp;
  always #5   clk_dsp = ~clk_dsp;

  logic [15:0] fs_div, chop_div, bursts;
  logic [7:0] wake_cycles;
  logic [10:0] burst_th, fifo_level [3];
  logic [15:0] cmp_th [4];
  logic mf_bypass, fs_tick, chop_tick, en_sleep, cpro_en;
  logic smp_valid [3], smp_ready [3]; sample_t smp_data [3];
  logic [1:0] ch_sel;
  logic coef_we; logic [4:0] coef_addr; logic signed [15:0] coef_wdata;
  logic sig_valid [3]; sample_t sig_data [3]; logic run_dsp, dsp_done, gpp_done;
  logic sa_start; logic [7:0] sa_len; sa_order_e sa_order; logic [6:0] sa_fv_addr;
  logic sa_done; logic signed [15:0] sa_result;
  logic [19:0] dl_th_r, dl_th_on; logic [7:0] dl_win_qrs, dl_t_lo, dl_t_hi;
  logic dl_beat, dl_p_ok; logic [15:0] dl_p_pos, dl_q_pos, dl_r_pos, dl_s_pos, dl_t_pos, dl_rr;
  logic cd_start; logic signed [15:0] cd_x, cd_y, cd_z; logic [6:0] cd_fv_addr; logic cd_done;
  logic host_fv_we; logic [6:0] host_fv_addr; logic signed [15:0] host_fv_wdata;
  logic host_m_we; logic [10:0] host_m_addr; logic [15:0] host_m_wdata;
  logic ce_start; ce_mode_e ce_mode; logic [7:0] ce_nfv; logic [2:0] ce_ncls;
  logic ce_done; logic [1:0] ce_cls; logic signed [63:0] ce_score;
  logic alarm, sa_wr, cd_wr;
  logic im_en, im_we, dm_en, dm_we; logic [3:0] im_be, dm_be;
  logic [10:0] im_addr, dm_addr; logic [31:0] im_wdata, im_rdata, dm_wdata, dm_rdata;

  cs_soc_top dut (.*);

  int checks = 0, failures = 0;
  localparam int NBURST = 6;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired: nsmp %0d level %0d bursts %0d en_sleep %0d run %0d", nsmp, fifo_level, bursts, en_sleep, run_dsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- ADC model (sampling side) ----------------
  int nsmp = 0;
  real xsum_abs = 0;
  function automatic int ecg(input int k);
    real t, v;
    int ph;
    t = k;
    ph = k % 100;
    v = 1500.0 * $sin(2.0 * 3.14159265 * t / 400.0);
    if (ph == 20) v += 1500; else if (ph == 21) v += 4000; else if (ph == 22) v -= 800;
    if (ph >= 50 && ph < 62) v += 300.0 * $sin(3.14159265 * (ph - 50) / 12.0);
    return int'(v) + $signed($urandom % 41) - 20;
  endfunction

  logic tick_seen = 0;
  always @(posedge clk_sys) if (fs_tick) tick_seen <= ~tick_seen;
  // three leads: the same heart seen with different gains and polarity
  for (genvar ch = 0; ch < 3; ch++) begin : g_adc
    initial begin
      logic last;
      int k, v;
      smp_valid[ch] = 0; smp_data[ch] = 0;
      k = 0;
      wait (rst_pp_n);
      last = tick_seen;
      forever begin
        @(negedge clk_pp);
        if (tick_seen != last) begin
          last = tick_seen;
          v = ecg(k);
          v = (ch == 0) ? v : (ch == 1) ? (v * 3) / 5 : -v / 2;
          k++;
          if (ch == 0) nsmp++;
          smp_valid[ch] = 1; smp_data[ch] = sample_t'(v);
          @(posedge clk_pp);
          while (!smp_ready[ch]) @(posedge clk_pp);
          @(negedge clk_pp);
          smp_valid[ch] = 0;
        end
      end
    end
  end

  // ---------------- observation ----------------
  int rate_seen [5];
  int n_mf_on = 0, n_mf_off = 0, n_wake = 0;
  real ysum_on = 0, ysum_off = 0;
  always @(posedge clk_pp)
    if (dut.g_ch[0].u_dmp.cmp_v && dut.g_ch[0].u_dmp.cmp_r) rate_seen[dut.g_ch[0].u_dmp.cmp_d.rate]++;
  always @(posedge clk_dsp)
    if (sig_valid[0]) begin
      if (mf_bypass) begin n_mf_off++; ysum_off += (sig_data[0] < 0) ? -sig_data[0] : sig_data[0]; end
      else begin n_mf_on++; ysum_on += (sig_data[0] < 0) ? -sig_data[0] : sig_data[0]; end
    end
  // channel selection: the ML processor must see exactly the selected stream
  int n_sel [3];
  always @(posedge clk_dsp) if (rst_dsp_n) begin
    if (dut.u_mlp.smp_valid != sig_valid[ch_sel] || (sig_valid[ch_sel] && dut.u_mlp.smp_data != sig_data[ch_sel])) begin
      failures++; $display("FAIL channel %0d not routed to the ML processor", ch_sel);
    end
    if (sig_valid[ch_sel]) n_sel[ch_sel]++;
  end
  always @(negedge en_sleep) n_wake++;
  // delineator: the synthetic ECG has one beat every 100 samples
  // (rr is 0 for the first beat; the switch to bypass drops the samples held
  // in the filter and the switch to another channel joins two streams, each
  // of which may stretch one interval)
  int n_beat = 0, n_rr_ok = 0, n_rr_bad = 0;
  always @(posedge clk_dsp) if (rst_dsp_n && dl_beat) begin
    n_beat++;
    if (dl_rr >= 16'd97 && dl_rr <= 16'd103) n_rr_ok++;
    else if (dl_rr != 0) n_rr_bad++;
  end

  // samples consumed by the shape analyzer
  real sa_x [$];
  bit sa_taking = 0;
  always @(posedge clk_dsp)
    if (dut.u_mlp.u_sa.state == dut.u_mlp.u_sa.S_LOAD && dut.u_mlp.smp_valid) sa_x.push_back(real'(dut.u_mlp.smp_data));

  // ---------------- GPP model (burst side) ----------------
  int n_skew = 0, n_kurt = 0, n_cd = 0, n_mlc = 0, n_svm = 0, n_al1 = 0, n_al0 = 0;
  logic signed [15:0] mem [2048];

  task automatic wr_m(input int a, input int v);
    host_m_we = 1; host_m_addr = 11'(a); host_m_wdata = 16'(v); mem[a] = 16'(v);
    @(negedge clk_dsp); host_m_we = 0;
  endtask
  task automatic wr_fv(input int a, input int v);
    host_fv_we = 1; host_fv_addr = 7'(a); host_fv_wdata = 16'(v);
    @(negedge clk_dsp); host_fv_we = 0;
  endtask

  task automatic shape(input sa_order_e o, input int n, input int addr);
    real mean, m2, mm, r, got;
    sa_x.delete();
    sa_start = 1; sa_len = 8'(n); sa_order = o; sa_fv_addr = 7'(addr);
    @(negedge clk_dsp); sa_start = 0;
    while (!sa_done) @(negedge clk_dsp);
    mean = 0; foreach (sa_x[i]) mean += sa_x[i]; mean /= n;
    m2 = 0; mm = 0;
    foreach (sa_x[i]) begin m2 += (sa_x[i]-mean)**2; mm += (o == SA_KURT) ? (sa_x[i]-mean)**4 : (sa_x[i]-mean)**3; end
    m2 /= n; mm /= n;
    r = (m2 == 0) ? 0 : (o == SA_KURT) ? mm / (m2*m2) : mm / (m2*$sqrt(m2));
    if (r > 127.99) r = 127.99;
    got = real'(sa_result) / 256.0;
    check(sa_x.size() == n, $sformatf("SA consumed %0d samples", sa_x.size()));
    check(got - r < 0.03 + 0.01*(r < 0 ? -r : r) && r - got < 0.03 + 0.01*(r < 0 ? -r : r),
          $sformatf("SA order %0d got %f ref %f", o, got, r));
    if (o == SA_KURT) n_kurt++; else n_skew++;
  endtask

  function automatic longint fvv(input int i);
    return longint'(dut.u_mlp.u_fv.fv[i]);
  endfunction

  task automatic burst_work(input int b);
    int nf = 8;
    // GPP memories
    im_en = 1; im_we = 1; im_be = 4'hf; im_addr = 11'(b); im_wdata = 32'hC0DE_0000 + b;
    dm_en = 1; dm_we = 1; dm_be = 4'h3; dm_addr = 11'(100 + b); dm_wdata = 32'h1234_5678 * (b + 1);
    @(negedge clk_dsp);
    im_we = 0; dm_we = 0;
    @(negedge clk_dsp);
    im_en = 0; dm_en = 0;
    check(im_rdata == 32'hC0DE_0000 + b, "IM read-back");
    check(dm_rdata[15:0] == 16'(32'h1234_5678 * (b + 1)), "DM read-back");
    // features: 0..2 CORDIC, 3 skewness, 4 kurtosis, 5..7 host
    cd_start = 1; cd_x = 16'($signed($urandom % 3001) - 1500); cd_y = 16'($signed($urandom % 3001) - 1500);
    cd_z = 16'($signed($urandom % 3001) - 1500); cd_fv_addr = 7'd0;
    @(negedge clk_dsp); cd_start = 0;
    while (!cd_done) @(negedge clk_dsp);
    n_cd++;
    shape(SA_SKEW, 32 + 16 * (b % 3), 3);
    shape(SA_KURT, 48, 4);
    wr_fv(5, (b % 4 == 1) ? 100 : -100);
    wr_fv(6, $signed($urandom % 2001) - 1000);
    wr_fv(7, $signed($urandom % 2001) - 1000);
    repeat (4) @(negedge clk_dsp);
    if (b % 2 == 0) begin
      longint sc [2], inner, di, dj;
      int best, stride;
      stride = 2 + nf + nf*nf;
      for (int c = 0; c < 2; c++) begin
        wr_m(c*stride, $urandom % 65536); wr_m(c*stride+1, $signed($urandom % 11) - 5);
        for (int i = 0; i < nf; i++) wr_m(c*stride+2+i, $signed($urandom % 2001) - 1000);
        for (int k = 0; k < nf*nf; k++) wr_m(c*stride+2+nf+k, $signed($urandom % 61) - 30);
      end
      best = 0;
      for (int c = 0; c < 2; c++) begin
        sc[c] = longint'($signed({mem[c*stride+1], mem[c*stride]})) <<< 16;
        for (int j = 0; j < nf; j++) begin
          inner = 0;
          for (int i = 0; i < nf; i++) begin
            di = fvv(i) - longint'(mem[c*stride+2+i]);
            inner += di * longint'(mem[c*stride+2+nf+j*nf+i]);
          end
          dj = fvv(j) - longint'(mem[c*stride+2+j]);
          sc[c] += inner * dj;
        end
        if (c == 0 || sc[c] < sc[best]) best = c;
      end
      ce_start = 1; ce_mode = CE_MLC; ce_nfv = 8'(nf); ce_ncls = 3'd2;
      @(negedge clk_dsp); ce_start = 0;
      while (!ce_done) @(negedge clk_dsp);
      check(ce_cls == 2'(best) && ce_score == sc[best], $sformatf("MLC burst %0d", b));
      n_mlc++;
    end else begin
      longint d;
      wr_m(0, 0); wr_m(1, 0);
      for (int i = 0; i < nf; i++) wr_m(2 + i, (i == 5) ? 256 : 0);
      d = fvv(5) * 256;
      ce_start = 1; ce_mode = CE_SVM; ce_nfv = 8'(nf); ce_ncls = 3'd1;
      @(negedge clk_dsp); ce_start = 0;
      while (!ce_done) @(negedge clk_dsp);
      check(ce_score == d && alarm == (d > 0), $sformatf("SVM burst %0d score %0d exp %0d", b, ce_score, d));
      n_svm++;
    end
    if (alarm) n_al1++; else n_al0++;
  endtask

  initial begin
    fs_div = 16'd4; chop_div = 16'd2; wake_cycles = 8'd3; burst_th = 11'd48;
    cmp_th = '{16'd900, 16'd400, 16'd150, 16'd60};
    mf_bypass = 0; gpp_done = 0; ch_sel = 2'd0;
    dl_th_r = 20'd2000; dl_th_on = 20'd600; dl_win_qrs = 8'd20; dl_t_lo = 8'd20; dl_t_hi = 8'd60;
    coef_we = 0; coef_addr = 0; coef_wdata = 0;
    sa_start = 0; sa_len = 0; sa_order = SA_SKEW; sa_fv_addr = 0;
    cd_start = 0; cd_x = 0; cd_y = 0; cd_z = 0; cd_fv_addr = 0;
    host_fv_we = 0; host_fv_addr = 0; host_fv_wdata = 0; host_m_we = 0; host_m_addr = 0; host_m_wdata = 0;
    ce_start = 0; ce_mode = CE_MLC; ce_nfv = 0; ce_ncls = 0;
    im_en = 0; im_we = 0; im_be = 0; im_addr = 0; im_wdata = 0;
    dm_en = 0; dm_we = 0; dm_be = 0; dm_addr = 0; dm_wdata = 0;
    #3000;
    rst_pp_n = 1; rst_dsp_n = 1;
    // FIR: 4-tap moving average (Q1.15 0.25 each)
    @(negedge clk_pp);
    for (int k = 0; k < 32; k++) begin
      coef_we = 1; coef_addr = 5'(k); coef_wdata = (k < 4) ? 16'sd8192 : 16'sd0;
      @(negedge clk_pp);
    end
    coef_we = 0;
    rst_sys_n = 1;
    for (int b = 0; b < NBURST; b++) begin
      if (b == 4) mf_bypass = 1;
      if (b == 5) ch_sel = 2'd2;
      @(posedge run_dsp);
      @(negedge clk_dsp);
      $display("burst %0d starts at %0t, %0d samples taken", b, $time, nsmp);
      gpp_done = 0;
      burst_work(b);
      gpp_done = 1;
      wait (!run_dsp);
    end
    repeat (20) @(negedge clk_sys);
    // ---------------- mechanism coverage ----------------
    check(bursts >= NBURST - 1 && n_wake >= NBURST, $sformatf("bursts %0d wakes %0d", bursts, n_wake));
    begin
      int distinct = 0;
      foreach (rate_seen[r]) if (rate_seen[r] > 0) distinct++;
      check(distinct >= 3, $sformatf("decimation factors used: %0d", distinct));
      $display("rate codes seen: %0d %0d %0d %0d %0d", rate_seen[0], rate_seen[1], rate_seen[2], rate_seen[3], rate_seen[4]);
    end
    check(n_mf_on > 100 && n_mf_off > 50, $sformatf("filtered %0d bypassed %0d", n_mf_on, n_mf_off));
    check(ysum_on / n_mf_on < 0.5 * (ysum_off / n_mf_off),
          $sformatf("baseline removal: mean|y| %f filtered vs %f bypassed", ysum_on / n_mf_on, ysum_off / n_mf_off));
    check(n_skew > 0 && n_kurt > 0 && n_cd > 0, "SA and CORDIC used");
    check(n_sel[0] > 100 && n_sel[2] > 50, $sformatf("samples seen from channel 0: %0d, channel 2: %0d", n_sel[0], n_sel[2]));
    check(n_beat >= 6 && n_rr_bad <= 2, $sformatf("delineator beats %0d, rr of 100 +-3: %0d, other: %0d", n_beat, n_rr_ok, n_rr_bad));
    check(n_mlc > 0 && n_svm > 0, "MLC and SVM used");
    $display("bursts %0d wakes %0d filtered %0d bypassed %0d skew %0d kurt %0d cordic %0d mlc %0d svm %0d alarm %0d/%0d",
             bursts, n_wake, n_mf_on, n_mf_off, n_skew, n_kurt, n_cd, n_mlc, n_svm, n_al1, n_al0);
    check(n_al1 > 0 && n_al0 > 0, $sformatf("alarm raised %0d / clear %0d", n_al1, n_al0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
