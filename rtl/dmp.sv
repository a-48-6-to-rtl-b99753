// Data management processor (DMP). It cleans and compresses the cardiac
// samples while the rest of the chip sleeps, and hands them to the burst
// computation domain:
//   sampling side (clk_pp): 32-tap FIR -> adaptive compressor -> FIFO write
//   burst side   (clk_dsp): FIFO read -> morphological baseline filter ->
//                           data recovery -> uniform output stream
// The output multiplexer of the document is the mf_bypass input: with it set
// the baseline filter is skipped and the compressed data go straight to
// recovery. The burst side takes entries from the FIFO only while drain is
// high (the processors are awake); otherwise the FIFO just fills. burst_req (clk_pp domain, a level) rises when the FIFO holds at
// least burst_th entries, which is what the configuration FSM uses to wake
// the processors. In the chip the sampling side is self-timed; here it runs
// on clk_pp, standing for the handshake controller's timing pulses.
module dmp
  import cs_pkg::*;
#(
  parameter int unsigned TAPS       = 32,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned W_OPEN     = 31,
  parameter int unsigned W_CLOSE    = 47
) (
  // sampling side
  input  logic clk_pp,
  input  logic rst_pp_n,
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  logic signed [15:0]      coef_wdata,
  input  logic [SAMPLE_W-1:0]     th [4],
  input  logic [$clog2(FIFO_DEPTH):0] burst_th,
  input  logic    smp_valid,
  output logic    smp_ready,
  input  sample_t smp_data,
  output logic    burst_req,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level,
  // burst side
  input  logic clk_dsp,
  input  logic rst_dsp_n,
  input  logic    mf_bypass,
  input  logic    drain,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data,
  output logic    fifo_empty
);
  logic    fir_v, fir_r;  sample_t fir_d;
  logic    cmp_v, cmp_r;  csample_t cmp_d;
  logic    ff_v, ff_r;    csample_t ff_d;
  logic    ff_vg;
  logic    mf_iv, mf_ir, mf_v, mf_r;  csample_t mf_d;
  logic    rc_v, rc_r;    csample_t rc_d;
  sample_t mf_base;

  fir_filter #(.TAPS(TAPS)) u_fir (
    .clk(clk_pp), .rst_n(rst_pp_n),
    .coef_we, .coef_addr, .coef_wdata,
    .in_valid(smp_valid), .in_ready(smp_ready), .in_data(smp_data),
    .out_valid(fir_v), .out_ready(fir_r), .out_data(fir_d));

  adaptive_compressor u_cmp (
    .clk(clk_pp), .rst_n(rst_pp_n), .th,
    .in_valid(fir_v), .in_ready(fir_r), .in_data(fir_d),
    .out_valid(cmp_v), .out_ready(cmp_r), .out_data(cmp_d));

  async_fifo #(.WIDTH($bits(csample_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk_pp), .wrst_n(rst_pp_n),
    .wvalid(cmp_v), .wready(cmp_r), .wdata(cmp_d), .wlevel(fifo_level),
    .rclk(clk_dsp), .rrst_n(rst_dsp_n),
    .rvalid(ff_v), .rready(ff_r), .rdata(ff_d));

  // the burst side reads the FIFO only while it runs
  assign ff_vg = ff_v && drain;

  assign burst_req  = (fifo_level >= burst_th);
  assign fifo_empty = !ff_v;

  // output multiplexer: through the baseline filter or around it
  assign mf_iv = ff_vg && !mf_bypass;
  assign ff_r  = drain && (mf_bypass ? rc_r : mf_ir);
  assign rc_v  = mf_bypass ? ff_vg : mf_v;
  assign rc_d  = mf_bypass ? ff_d : mf_d;
  assign mf_r  = !mf_bypass && rc_r;

  morph_filter #(.W_OPEN(W_OPEN), .W_CLOSE(W_CLOSE)) u_mf (
    .clk(clk_dsp), .rst_n(rst_dsp_n),
    .in_valid(mf_iv), .in_ready(mf_ir), .in_data(ff_d),
    .out_valid(mf_v), .out_ready(mf_r), .out_data(mf_d), .baseline(mf_base));

  data_recovery u_rec (
    .clk(clk_dsp), .rst_n(rst_dsp_n),
    .in_valid(rc_v), .in_ready(rc_r), .in_data(rc_d),
    .out_valid, .out_ready, .out_data);

  logic unused;
  assign unused = ^mf_base;
endmodule
