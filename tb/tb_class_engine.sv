// Self-checking testbench of the classification engine, run together with
// the feature-vector buffer and the learned-model memory it reads. Random
// models and feature vectors of several lengths are loaded; the MLC scores
// of every class and the SVM decision value are computed here with 64-bit
// integer arithmetic from the formulas in the engine's header, and the
// engine's class, score and alarm are compared with them. Cycle counts are
// checked: MLC within ncls*(N*N+N+6)+4 clocks, SVM within ceil(N/2)+7.
module tb_class_engine;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, alarm;
  ce_mode_e mode;
  logic [7:0] nfv;
  logic [2:0] ncls;
  logic [6:0] fv_raddr0, fv_raddr1, fv_waddr;
  logic signed [15:0] fv_rdata0, fv_rdata1, fv_wdata;
  logic fv_we, m_we;
  logic [10:0] m_raddr0, m_raddr1, m_waddr;
  logic [15:0] m_rdata0, m_rdata1, m_wdata;
  logic [1:0] cls;
  logic signed [63:0] score;
  int checks = 0, failures = 0;

  class_engine dut (.clk, .rst_n, .start, .mode, .nfv, .ncls,
    .fv_raddr0, .fv_rdata0, .fv_raddr1, .fv_rdata1,
    .m_raddr0, .m_rdata0, .m_raddr1, .m_rdata1,
    .busy, .done, .cls, .score, .alarm);
  fv_buffer u_fv (.clk, .rst_n, .we(fv_we), .waddr(fv_waddr), .wdata(fv_wdata),
    .raddr0(fv_raddr0), .rdata0(fv_rdata0), .raddr1(fv_raddr1), .rdata1(fv_rdata1));
  model_mem u_mm (.clk, .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .raddr0(m_raddr0), .rdata0(m_rdata0), .raddr1(m_raddr1), .rdata1(m_rdata1));

  initial begin
    repeat (2000000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] fv [128];
  logic signed [15:0] mem [2048];

  task automatic wr_fv(input int a, input logic signed [15:0] v);
    fv_we = 1; fv_waddr = 7'(a); fv_wdata = v; fv[a] = v; @(negedge clk); fv_we = 0;
  endtask
  task automatic wr_m(input int a, input logic signed [15:0] v);
    m_we = 1; m_waddr = 11'(a); m_wdata = v; mem[a] = v; @(negedge clk); m_we = 0;
  endtask

  task automatic go(input ce_mode_e md, input int n, input int nc, output int cyc);
    mode = md; nfv = 8'(n); ncls = 3'(nc); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic test_mlc(input int n, input int nc);
    longint sc [4];
    longint kc, inner, dj, di;
    int stride = 2 + n + n*n, bestc = 0, cyc;
    for (int i = 0; i < n; i++) wr_fv(i, 16'($signed($urandom % 4001) - 2000));
    for (int c = 0; c < nc; c++) begin
      int b = c * stride;
      wr_m(b, 16'($urandom)); wr_m(b + 1, 16'($signed($urandom % 201) - 100));
      for (int i = 0; i < n; i++) wr_m(b + 2 + i, 16'($signed($urandom % 4001) - 2000));
      for (int k = 0; k < n*n; k++) wr_m(b + 2 + n + k, 16'($signed($urandom % 601) - 300));
    end
    for (int c = 0; c < nc; c++) begin
      int b = c * stride;
      kc = longint'($signed({mem[b+1], mem[b]}));
      sc[c] = kc <<< 16;
      for (int j = 0; j < n; j++) begin
        inner = 0;
        for (int i = 0; i < n; i++) begin
          di = longint'(fv[i]) - longint'(mem[b+2+i]);
          inner += di * longint'(mem[b+2+n+j*n+i]);
        end
        dj = longint'(fv[j]) - longint'(mem[b+2+j]);
        sc[c] += inner * dj;
      end
      if (c == 0 || sc[c] < sc[bestc]) bestc = c;
    end
    go(CE_MLC, n, nc, cyc);
    checks += 3;
    if (cls != 2'(bestc)) begin failures++; $display("FAIL MLC n=%0d cls %0d exp %0d", n, cls, bestc); end
    if (score != sc[bestc]) begin failures++; $display("FAIL MLC n=%0d score %0d exp %0d", n, score, sc[bestc]); end
    if (alarm != (bestc != 0)) begin failures++; $display("FAIL MLC alarm"); end
    checks++;
    if (cyc > nc * (n*n + n + 6) + 4) begin failures++; $display("FAIL MLC n=%0d cycles %0d", n, cyc); end
    $display("MLC n=%0d classes=%0d: %0d clocks, class %0d", n, nc, cyc, cls);
  endtask

  task automatic test_svm(input int n);
    longint dec;
    int cyc;
    for (int i = 0; i < n; i++) wr_fv(i, 16'($signed($urandom % 4001) - 2000));
    wr_m(0, 16'($urandom)); wr_m(1, 16'($signed($urandom % 41) - 20));
    for (int i = 0; i < n; i++) wr_m(2 + i, 16'($signed($urandom % 4001) - 2000));
    dec = -(longint'($signed({mem[1], mem[0]})) <<< 8);
    for (int i = 0; i < n; i++) dec += longint'(fv[i]) * longint'(mem[2+i]);
    go(CE_SVM, n, 1, cyc);
    checks += 3;
    if (score != dec) begin failures++; $display("FAIL SVM n=%0d score %0d exp %0d", n, score, dec); end
    if (cls != 2'(dec > 0)) begin failures++; $display("FAIL SVM cls"); end
    if (alarm != (dec > 0)) begin failures++; $display("FAIL SVM alarm"); end
    checks++;
    if (cyc > (n + 1) / 2 + 7) begin failures++; $display("FAIL SVM n=%0d cycles %0d", n, cyc); end
    $display("SVM n=%0d: %0d clocks, decision %0d", n, cyc, dec);
  endtask

  initial begin
    start = 0; fv_we = 0; m_we = 0; fv_waddr = 0; fv_wdata = 0; m_waddr = 0; m_wdata = 0;
    mode = CE_MLC; nfv = 0; ncls = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    test_mlc(1, 2); test_mlc(5, 2); test_mlc(12, 3); test_mlc(30, 2); test_mlc(20, 4);
    repeat (4) test_mlc(8, 2);
    test_svm(1); test_svm(2); test_svm(7); test_svm(36); test_svm(75); test_svm(128);
    repeat (10) test_svm(1 + $urandom % 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
