// Cardiac sensor SoC, digital top level.
// Three clock domains:
//   clk_sys - kHz system clock: configuration FSM (sampling-clock division,
//             sleep/burst duty cycling)
//   clk_pp  - pre-processing timing: FIR filter, adaptive compressor and the
//             FIFO's write side, running while the processors sleep
//   clk_dsp - MHz burst clock: FIFO read side, baseline filter, recovery,
//             ML processor (wavelet delineator, shape analyzer, CORDIC, feature vector,
//             classification engine, learned model) and the general-purpose
//             processor's instruction/data memories
// Channels: NCH (3, for a three-lead vectorcardiogram) data management
// processors run side by side, one per ADC channel, with shared FIR
// coefficients and compressor thresholds; each has its own FIFO and its
// own recovered output stream (sig_valid[c], sig_data[c]). ch_sel picks the
// stream that the ML processor's delineator and shape analyzer watch.
// A burst: any channel's FIFO level reaches burst_th -> the FSM wakes the processors
// (en_sleep low, cpro_en high) and raises run. The burst side reads the
// FIFO only while run is seen in clk_dsp (run_dsp); in between the FIFO
// fills. Once the processor reports its work finished (gpp_done) and the
// pipeline is drained (all FIFOs empty, ML processor idle, no sample in flight),
// dsp_done rises; the FSM drops run and returns to sleep when dsp_done falls.
// Parts that are analog or not designed here are outside this module and
// meet it at ports: the ADC (smp_*, fs_tick, chop_tick), the power switch
// and its standby controller (en_sleep), the oscillators (cpro_en and the
// clocks themselves), and the 32-bit processor core and bus (host_* ports,
// im_*/dm_* memory ports, the control inputs of the shape analyzer, CORDIC
// and classification engine). The recovered signal stream also leaves at
// sig_* (toward the data memory).
module cs_soc_top
  import cs_pkg::*;
#(
  parameter int unsigned NCH        = 3,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned W_OPEN     = 31,
  parameter int unsigned W_CLOSE    = 47
) (
  input  logic clk_sys,
  input  logic rst_sys_n,
  input  logic clk_pp,
  input  logic rst_pp_n,
  input  logic clk_dsp,
  input  logic rst_dsp_n,
  // configuration (static while running)
  input  logic [15:0] fs_div,
  input  logic [15:0] chop_div,
  input  logic [7:0]  wake_cycles,
  input  logic [$clog2(FIFO_DEPTH):0] burst_th,
  input  logic [15:0] cmp_th [4],
  input  logic        mf_bypass,
  // to the analog parts
  output logic fs_tick,
  output logic chop_tick,
  output logic en_sleep,
  output logic cpro_en,
  output logic [15:0] bursts,
  // ADC samples and FIR coefficients (clk_pp)
  input  logic    smp_valid [NCH],
  output logic    smp_ready [NCH],
  input  sample_t smp_data  [NCH],
  input  logic        coef_we,
  input  logic [4:0]  coef_addr,
  input  logic signed [15:0] coef_wdata,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level [NCH],
  // burst domain (clk_dsp)
  output logic    sig_valid [NCH],
  output sample_t sig_data  [NCH],
  input  logic [$clog2(NCH)-1:0] ch_sel,
  output logic    run_dsp,
  output logic    dsp_done,
  input  logic    gpp_done,
  input  logic        sa_start,
  input  logic [7:0]  sa_len,
  input  sa_order_e   sa_order,
  input  logic [6:0]  sa_fv_addr,
  output logic        sa_done,
  output logic signed [15:0] sa_result,
  input  logic [19:0] dl_th_r,
  input  logic [19:0] dl_th_on,
  input  logic [7:0]  dl_win_qrs,
  input  logic [7:0]  dl_t_lo,
  input  logic [7:0]  dl_t_hi,
  output logic        dl_beat,
  output logic        dl_p_ok,
  output logic [15:0] dl_p_pos,
  output logic [15:0] dl_q_pos,
  output logic [15:0] dl_r_pos,
  output logic [15:0] dl_s_pos,
  output logic [15:0] dl_t_pos,
  output logic [15:0] dl_rr,
  input  logic        cd_start,
  input  logic signed [15:0] cd_x,
  input  logic signed [15:0] cd_y,
  input  logic signed [15:0] cd_z,
  input  logic [6:0]  cd_fv_addr,
  output logic        cd_done,
  input  logic        host_fv_we,
  input  logic [6:0]  host_fv_addr,
  input  logic signed [15:0] host_fv_wdata,
  input  logic        host_m_we,
  input  logic [10:0] host_m_addr,
  input  logic [15:0] host_m_wdata,
  input  logic        ce_start,
  input  ce_mode_e    ce_mode,
  input  logic [7:0]  ce_nfv,
  input  logic [2:0]  ce_ncls,
  output logic        ce_done,
  output logic [1:0]  ce_cls,
  output logic signed [63:0] ce_score,
  output logic        alarm,
  output logic        sa_wr,
  output logic        cd_wr,
  // general-purpose processor memories (clk_dsp)
  input  logic        im_en, im_we,
  input  logic [3:0]  im_be,
  input  logic [10:0] im_addr,
  input  logic [31:0] im_wdata,
  output logic [31:0] im_rdata,
  input  logic        dm_en, dm_we,
  input  logic [3:0]  dm_be,
  input  logic [10:0] dm_addr,
  input  logic [31:0] dm_wdata,
  output logic [31:0] dm_rdata
);
  logic burst_req, run, mlp_busy;
  logic run_m;
  logic [NCH-1:0] ch_req, ch_empty, ch_valid;

  config_fsm u_cfg (
    .clk(clk_sys), .rst_n(rst_sys_n), .fs_div, .chop_div, .wake_cycles,
    .fs_tick, .chop_tick, .burst_req, .done(dsp_done),
    .en_sleep, .cpro_en, .run, .bursts);

  // one data management processor per channel; the FIR coefficients and
  // compressor thresholds are shared
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    dmp #(.FIFO_DEPTH(FIFO_DEPTH), .W_OPEN(W_OPEN), .W_CLOSE(W_CLOSE)) u_dmp (
      .clk_pp, .rst_pp_n, .coef_we, .coef_addr, .coef_wdata, .th(cmp_th), .burst_th,
      .smp_valid(smp_valid[c]), .smp_ready(smp_ready[c]), .smp_data(smp_data[c]),
      .burst_req(ch_req[c]), .fifo_level(fifo_level[c]),
      .clk_dsp, .rst_dsp_n, .mf_bypass, .drain(run_dsp),
      .out_valid(sig_valid[c]), .out_ready(1'b1), .out_data(sig_data[c]), .fifo_empty(ch_empty[c]));
    assign ch_valid[c] = sig_valid[c];
  end
  // any full-enough FIFO wakes the chip
  assign burst_req = |ch_req;

  // channel watched by the delineator and shape analyzer (out of range -> 0)
  logic    mlp_valid;
  sample_t mlp_data;
  always_comb begin
    mlp_valid = sig_valid[0];
    mlp_data  = sig_data[0];
    for (int c = 1; c < NCH; c++)
      if (ch_sel == ($clog2(NCH))'(c)) begin
        mlp_valid = sig_valid[c];
        mlp_data  = sig_data[c];
      end
  end

  // burst-domain side of the run/done handshake
  always_ff @(posedge clk_dsp or negedge rst_dsp_n) begin
    if (!rst_dsp_n) begin
      run_m <= 1'b0; run_dsp <= 1'b0; dsp_done <= 1'b0;
    end else begin
      run_m   <= run;
      run_dsp <= run_m;
      if (!run_dsp)                                   dsp_done <= 1'b0;
      else if (gpp_done && &ch_empty && !mlp_busy && !(|ch_valid)) dsp_done <= 1'b1;
    end
  end

  mlp u_mlp (
    .clk(clk_dsp), .rst_n(rst_dsp_n),
    .smp_valid(mlp_valid), .smp_data(mlp_data),
    .sa_start, .sa_len, .sa_order, .sa_fv_addr, .sa_done, .sa_result,
    .dl_th_r, .dl_th_on, .dl_win_qrs, .dl_t_lo, .dl_t_hi,
    .dl_beat, .dl_p_ok, .dl_p_pos, .dl_q_pos, .dl_r_pos, .dl_s_pos, .dl_t_pos, .dl_rr,
    .cd_start, .cd_x, .cd_y, .cd_z, .cd_fv_addr, .cd_done,
    .host_fv_we, .host_fv_addr, .host_fv_wdata, .host_m_we, .host_m_addr, .host_m_wdata,
    .ce_start, .ce_mode, .ce_nfv, .ce_ncls, .ce_done, .ce_cls, .ce_score, .alarm,
    .busy(mlp_busy), .sa_wr, .cd_wr);

  sram_1rw #(.WORDS(2048), .WW(32)) u_im (
    .clk(clk_dsp), .en(im_en), .we(im_we), .be(im_be), .addr(im_addr),
    .wdata(im_wdata), .rdata(im_rdata));
  sram_1rw #(.WORDS(2048), .WW(32)) u_dm (
    .clk(clk_dsp), .en(dm_en), .we(dm_we), .be(dm_be), .addr(dm_addr),
    .wdata(dm_wdata), .rdata(dm_rdata));
endmodule
