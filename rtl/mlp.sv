// Machine-learning processor (MLP), burst-clock domain. It gathers the
// features of one cardiac cycle in the feature-vector buffer and classifies
// them against the learned model:
//   shape analyzer   - skewness/kurtosis of the next sa_len samples of the
//                      incoming signal stream, written to FV[sa_fv_addr]
//   CORDIC           - magnitude, azimuth and elevation of a VCG vector,
//                      written to FV[cd_fv_addr], +1, +2
//   host port        - the general-purpose processor writes other features
//                      and loads the learned model
//   classification   - MLC or linear SVM over FV[0..nfv-1]
// One feature is written per clock: a host write wins, then a finished
// shape-analyzer result, then the CORDIC results in turn; results wait in
// their units until written. sa_wr/cd_wr report these writes.
// The units and their connections follow the document's ML processor. The
// segment boundaries that its wavelet delineator would give (which samples
// form a P, QRS or T wave) come in here as sa_start/sa_len from outside, and
// the write arbitration is this design's choice. The wavelet delineator
// watches the same stream and reports each beat's fiducial points (dl_*),
// as sample indices of that stream, for the processor to turn into SA
// windows and interval features.
module mlp
  import cs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // signal stream from the data management processor
  input  logic    smp_valid,
  input  sample_t smp_data,
  // shape analyzer control
  input  logic        sa_start,
  input  logic [7:0]  sa_len,
  input  sa_order_e   sa_order,
  input  logic [6:0]  sa_fv_addr,
  output logic        sa_done,
  output logic signed [15:0] sa_result,
  // delineator search rules and fiducial points
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
  // CORDIC control
  input  logic        cd_start,
  input  logic signed [15:0] cd_x, cd_y, cd_z,
  input  logic [6:0]  cd_fv_addr,
  output logic        cd_done,
  // host writes
  input  logic        host_fv_we,
  input  logic [6:0]  host_fv_addr,
  input  logic signed [15:0] host_fv_wdata,
  input  logic        host_m_we,
  input  logic [10:0] host_m_addr,
  input  logic [15:0] host_m_wdata,
  // classification
  input  logic        ce_start,
  input  ce_mode_e    ce_mode,
  input  logic [7:0]  ce_nfv,
  input  logic [2:0]  ce_ncls,
  output logic        ce_done,
  output logic [1:0]  ce_cls,
  output logic signed [63:0] ce_score,
  output logic        alarm,
  output logic        busy,
  output logic        sa_wr,
  output logic        cd_wr
);
  // shape analyzer
  logic sa_busy;
  wavelet_delineator u_dl (
    .clk, .rst_n, .in_valid(smp_valid), .in_data(smp_data),
    .th_r(dl_th_r), .th_on(dl_th_on), .win_qrs(dl_win_qrs), .t_lo(dl_t_lo), .t_hi(dl_t_hi),
    .beat(dl_beat), .p_ok(dl_p_ok), .p_pos(dl_p_pos), .q_pos(dl_q_pos), .r_pos(dl_r_pos),
    .s_pos(dl_s_pos), .t_pos(dl_t_pos), .rr(dl_rr));

  shape_analyzer u_sa (
    .clk, .rst_n, .start(sa_start), .len(sa_len), .order(sa_order),
    .in_valid(smp_valid), .in_data(smp_data),
    .busy(sa_busy), .done(sa_done), .result(sa_result));

  // CORDIC
  logic [15:0] cd_mag;
  logic signed [15:0] cd_theta, cd_phi;
  logic cd_busy;
  cordic_vec3 u_cordic (
    .clk, .rst_n, .start(cd_start), .x(cd_x), .y(cd_y), .z(cd_z),
    .done(cd_done), .mag(cd_mag), .theta(cd_theta), .phi(cd_phi));

  // pending feature writes
  logic        sa_pend;
  logic [6:0]  sa_addr_q;
  logic [1:0]  cd_pend;       // CORDIC results still to write: 3, 2, 1, 0
  logic [6:0]  cd_addr_q;
  logic signed [15:0] cd_val [3];

  logic        fv_we;
  logic [6:0]  fv_waddr;
  logic signed [15:0] fv_wdata;

  always_comb begin
    fv_we = 1'b0; fv_waddr = host_fv_addr; fv_wdata = host_fv_wdata;
    sa_wr = 1'b0; cd_wr = 1'b0;
    if (host_fv_we) begin
      fv_we = 1'b1;
    end else if (sa_pend) begin
      fv_we = 1'b1; fv_waddr = sa_addr_q; fv_wdata = sa_result; sa_wr = 1'b1;
    end else if (cd_pend != 2'd0) begin
      fv_we = 1'b1; cd_wr = 1'b1;
      fv_waddr = cd_addr_q + 7'(3 - cd_pend);
      fv_wdata = cd_val[2'(3 - cd_pend)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa_pend <= 1'b0; sa_addr_q <= '0; cd_pend <= '0; cd_addr_q <= '0; cd_busy <= 1'b0;
      for (int k = 0; k < 3; k++) cd_val[k] <= '0;
    end else begin
      if (sa_start) sa_addr_q <= sa_fv_addr;
      if (sa_done) sa_pend <= 1'b1;
      else if (sa_wr) sa_pend <= 1'b0;
      if (cd_start) begin cd_addr_q <= cd_fv_addr; cd_busy <= 1'b1; end
      if (cd_done) begin
        cd_busy <= 1'b0;
        cd_pend <= 2'd3;
        cd_val[0] <= $signed(cd_mag);
        cd_val[1] <= cd_theta;
        cd_val[2] <= cd_phi;
      end else if (cd_wr) begin
        cd_pend <= cd_pend - 1'b1;
      end
    end
  end

  // feature-vector buffer, learned model, classification engine
  logic [6:0]  fv_raddr0, fv_raddr1;
  logic signed [15:0] fv_rdata0, fv_rdata1;
  logic [10:0] m_raddr0, m_raddr1;
  logic [15:0] m_rdata0, m_rdata1;
  logic        ce_busy;

  fv_buffer u_fv (
    .clk, .rst_n, .we(fv_we), .waddr(fv_waddr), .wdata(fv_wdata),
    .raddr0(fv_raddr0), .rdata0(fv_rdata0), .raddr1(fv_raddr1), .rdata1(fv_rdata1));

  model_mem u_model (
    .clk, .we(host_m_we), .waddr(host_m_addr), .wdata(host_m_wdata),
    .raddr0(m_raddr0), .rdata0(m_rdata0), .raddr1(m_raddr1), .rdata1(m_rdata1));

  class_engine u_ce (
    .clk, .rst_n, .start(ce_start), .mode(ce_mode), .nfv(ce_nfv), .ncls(ce_ncls),
    .fv_raddr0, .fv_rdata0, .fv_raddr1, .fv_rdata1,
    .m_raddr0, .m_rdata0, .m_raddr1, .m_rdata1,
    .busy(ce_busy), .done(ce_done), .cls(ce_cls), .score(ce_score), .alarm);

  assign busy = sa_busy || cd_busy || ce_busy || sa_pend || (cd_pend != 2'd0);
endmodule
