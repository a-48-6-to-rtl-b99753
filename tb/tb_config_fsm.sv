// Self-checking testbench of the configuration FSM. It checks the sampling
// and chopper tick periods against fs_div and chop_div, then plays the
// burst domain: raises burst_req, expects the wake-up (en_sleep low,
// cpro_en high) within the synchroniser delay, run only after wake_cycles,
// answers run with done, and expects run to drop, sleep to resume after
// done falls and the burst counter to advance. Several bursts are run.
module tb_config_fsm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] fs_div, chop_div, bursts;
  logic [7:0] wake_cycles;
  logic fs_tick, chop_tick, burst_req, done, en_sleep, cpro_en, run;
  int checks = 0, failures = 0;

  config_fsm dut (.*);

  initial begin
    repeat (100000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick_period(input int want_fs, input int want_chop);
    int t_fs [$], t_ch [$];
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (fs_tick) t_fs.push_back(c);
      if (chop_tick) t_ch.push_back(c);
    end
    check(t_fs.size() > 3 && t_ch.size() > 3, "ticks present");
    for (int k = 1; k < t_fs.size(); k++) check(t_fs[k] - t_fs[k-1] == want_fs, "fs period");
    for (int k = 1; k < t_ch.size(); k++) check(t_ch[k] - t_ch[k-1] == want_chop, "chop period");
  endtask

  task automatic burst(input int wc);
    int c = 0;
    wake_cycles = 8'(wc);
    check(en_sleep && !cpro_en && !run, "asleep before request");
    burst_req = 1;
    while (en_sleep) begin @(negedge clk); c++; end
    check(c <= 4, "wake within synchroniser delay");
    check(cpro_en, "oscillator on when awake");
    c = 0;
    while (!run) begin @(negedge clk); c++; end
    check(c == wc + 1, $sformatf("run after wake_cycles (%0d)", c));
    burst_req = 0;
    repeat (20) @(negedge clk);
    check(run && !en_sleep, "run held until done");
    done = 1;
    c = 0;
    while (run) begin @(negedge clk); c++; end
    check(c <= 4, "run drops after done");
    repeat (6) @(negedge clk);
    check(!en_sleep, "stays awake while done is high");
    done = 0;
    c = 0;
    while (!en_sleep) begin @(negedge clk); c++; end
    check(c <= 4 && !cpro_en, "sleeps after done falls");
  endtask

  initial begin
    fs_div = 16'd32; chop_div = 16'd8; wake_cycles = 8'd5; burst_req = 0; done = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    tick_period(32, 8);
    fs_div = 16'd128; chop_div = 16'd4;
    tick_period(128, 4);
    for (int b = 0; b < 5; b++) begin
      burst(b * 3);
      check(bursts == 16'(b + 1), "burst count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
