// Shape analyzer (SA): skewness (order M=3) or kurtosis (M=4) of one wave
// segment of L samples, the normalised principal moment
//   SA = (1/L sum (x-m)^M) / (1/L sum (x-m)^2)^(M/2)
// One datapath serves both orders. With D = x - m, S2 = sum D^2 and
// SM = sum D^M it evaluates the equivalent ratio
//   M=4: SA = L*S4 / (S2 * S2)
//   M=3: SA = L*S3 / (S2 * sqrt(S2*L))
// so the only square root is a multiplexer input, as in the document's
// datapath. Mean, square root and final ratio use the multiplier-less
// shift-and-subtract divider and square-root units.
// Sequence: start (with len and order) -> LOAD, len samples on in_valid are
// stored and summed -> mean m = trunc(sum/len) (integer, toward zero) -> one
// pass over the stored window accumulating S2 and SM -> square root (M=3
// only) -> divide. Result is signed Q(15-FRAC).FRAC, saturated; a flat
// window (S2 = 0) gives 0. done pulses with result valid.
// Timing for len=128: about 190 clocks from the last sample to done, within
// the document's 300-cycle bound for a 128-sample window; each divide or
// square root takes at most 26 clocks (document: under 30).
// Window length up to 128 and the time-multiplexed datapath follow the
// document; the sample width, integer mean and output format are this
// design's choices.
module shape_analyzer
  import cs_pkg::*;
#(
  parameter int unsigned MAX_LEN = 128,
  parameter int unsigned FRAC    = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                       start,
  input  logic [$clog2(MAX_LEN):0]   len,
  input  sa_order_e                  order,
  input  logic                       in_valid,
  input  sample_t                    in_data,
  output logic                       busy,
  output logic                       done,
  output logic signed [FV_W-1:0]     result
);
  localparam int unsigned LW  = $clog2(MAX_LEN) + 1;
  localparam int unsigned S2W = 2*(SAMPLE_W+1) + LW;        // sum of squares
  localparam int unsigned SMW = 4*(SAMPLE_W+1) + LW;        // sum of M-th powers
  localparam int unsigned NW  = SMW + LW + FRAC;            // dividend
  localparam int unsigned RXW = ((S2W + LW) % 2 == 0) ? S2W + LW : S2W + LW + 1;
  localparam int unsigned DW  = 2*S2W;                      // divisor

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_MEAN_GO, S_MEAN, S_PASS, S_SQRT_GO, S_SQRT_WAIT, S_DIV_GO, S_DIV_WAIT, S_OUT
  } state_e;
  state_e state;

  sample_t                   win [MAX_LEN];
  logic [LW-1:0]             cnt, L;
  sa_order_e                 ord;
  logic signed [SAMPLE_W+LW:0] sum;
  sample_t                   mean;
  logic [S2W-1:0]            s2;
  logic signed [SMW:0]       sm;
  logic [DW-1:0]             den;

  // divider and square-root units
  logic          dv_start, dv_busy, dv_done;
  logic [NW-1:0] dv_n;
  logic [DW-1:0] dv_d;
  logic [15:0]   dv_q;
  logic          sq_start, sq_busy, sq_done;
  logic [RXW-1:0]   sq_x;
  logic [RXW/2-1:0] sq_r;

  udiv_seq #(.NW(NW), .DW(DW), .QW(16)) u_div (
    .clk, .rst_n, .start(dv_start), .n(dv_n), .d(dv_d),
    .busy(dv_busy), .done(dv_done), .q(dv_q));
  usqrt_seq #(.XW(RXW)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .x(sq_x),
    .busy(sq_busy), .done(sq_done), .r(sq_r));

  // pass datapath: deviation, square, M-th power
  logic signed [SAMPLE_W:0]       dev;
  logic signed [2*SAMPLE_W+1:0]   dev34;
  logic [2*SAMPLE_W+1:0]          dsq;
  logic signed [4*SAMPLE_W+3:0]   dsq68, dev68, dpow;
  assign dev   = {win[cnt[LW-2:0]][SAMPLE_W-1], win[cnt[LW-2:0]]} - {mean[SAMPLE_W-1], mean};
  assign dev34 = (2*SAMPLE_W+2)'(dev);
  assign dev68 = (4*SAMPLE_W+4)'(dev);
  assign dsq   = $unsigned(dev34 * dev34);
  assign dsq68 = $signed({{(2*SAMPLE_W+2){1'b0}}, dsq});
  assign dpow  = (ord == SA_KURT) ? dsq68 * dsq68 : dsq68 * dev68;

  logic [SMW:0] sm_abs;
  assign sm_abs = sm[SMW] ? -sm : sm;
  logic [SAMPLE_W+LW:0] sum_abs;
  assign sum_abs = sum[SAMPLE_W+LW] ? -sum : sum;

  always_comb begin
    dv_start = 1'b0;
    dv_n     = NW'(sum_abs);
    dv_d     = DW'(L);
    if (state == S_MEAN_GO) dv_start = 1'b1;
    if (state == S_DIV_GO) begin
      dv_start = 1'b1;
      dv_n     = NW'(sm_abs * L) << FRAC;
      dv_d     = den;
    end
    sq_start = (state == S_SQRT_GO) && (ord == SA_SKEW);
    sq_x     = RXW'(s2) * RXW'(L);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt <= '0; L <= '0; ord <= SA_SKEW;
      sum <= '0; mean <= '0; s2 <= '0; sm <= '0; den <= '0;
      done <= 1'b0; result <= '0;
      for (int i = 0; i < MAX_LEN; i++) win[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          L     <= (len == '0) ? LW'(1) : len;
          ord   <= order;
          cnt   <= '0;
          sum   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          win[cnt[LW-2:0]] <= in_data;
          sum <= sum + (SAMPLE_W+LW+1)'(in_data);
          cnt <= cnt + 1'b1;
          if (cnt == L - 1'b1) state <= S_MEAN_GO;
        end
        S_MEAN_GO: state <= S_MEAN;
        S_MEAN: if (dv_done) begin
          mean  <= sum[SAMPLE_W+LW] ? -sample_t'(dv_q) : sample_t'(dv_q);
          cnt   <= '0;
          s2    <= '0;
          sm    <= '0;
          state <= S_PASS;
        end
        S_PASS: begin
          s2  <= s2 + S2W'(dsq);
          sm  <= sm + (SMW+1)'(dpow);
          cnt <= cnt + 1'b1;
          if (cnt == L - 1'b1) state <= S_SQRT_GO;
        end
        S_SQRT_GO: begin
          if (ord == SA_KURT) begin
            den   <= DW'(s2) * DW'(s2);
            state <= S_DIV_GO;
          end else begin
            state <= S_SQRT_WAIT;
          end
        end
        S_SQRT_WAIT: if (sq_done) begin
          den   <= DW'(s2) * DW'(sq_r);
          state <= S_DIV_GO;
        end
        S_DIV_GO:   state <= S_DIV_WAIT;
        S_DIV_WAIT: if (dv_done) state <= S_OUT;
        S_OUT: begin
          state <= S_IDLE;
          done  <= 1'b1;
          if (den == '0) result <= '0;
          else if (dv_q > 16'd32767) result <= (ord == SA_SKEW && sm[SMW]) ? -16'sd32767 : 16'sd32767;
          else result <= (ord == SA_SKEW && sm[SMW]) ? -$signed({1'b0, dv_q[14:0]}) : $signed({1'b0, dv_q[14:0]});
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
