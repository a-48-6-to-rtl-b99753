// Wavelet cardiac delineator: finds the fiducial points of each heartbeat in
// the uniform signal stream, so that the P wave, QRS complex and T wave can
// be cut out for the shape analyzer and the interval features.
// Wavelet: a Haar wavelet at scale 2^K (H = 2^K samples), computed on the
// fly from two running sums over the last 2H samples:
//   A(n) = sum x(n-i), i = 0..H-1      B(n) = sum x(n-i), i = H..2H-1
//   d(n) = A - B   (detail: slope of the smoothed signal)
//   s(n) = A + B   (approximation: the signal smoothed over 2H samples)
// Both are centred on sample c = n - H, which is the position reported.
// Search rules (the thresholds and windows are inputs, so they can be
// updated at run time):
//   IDLE  quiet samples (|d| < th_on) move the QRS-onset candidate and, if
//         s is the largest seen since the last beat, the P-peak candidate.
//         d > th_r starts a QRS.
//   RISE  the first d <= 0 is the R peak (slope changes sign).
//   FALL  after d has gone below -th_r, the first d > -th_on is the S point
//         (end of the QRS complex).
//   TWIN  over positions R+t_lo .. R+t_hi the largest s is the T peak; at
//         R+t_hi the beat is reported.
//   RISE and FALL give up (back to IDLE, nothing reported) if they last more
//   than win_qrs positions past their start.
// Outputs: beat pulses for one clock with p_pos (p_ok low if no quiet sample
// was seen since the last beat), q_pos (QRS onset), r_pos, s_pos, t_pos, all
// sample indices modulo 2^16, and rr = r_pos minus the previous beat's r_pos
// (0 for the first beat). The first 2H samples only fill the sums.
// The unit observes the stream (no ready): one sample per clock at most,
// results registered.
// The wavelet decomposition, the P/Q/R/S/T points and the run-time
// updatable search rules follow the document. The Haar wavelet at one scale
// and these particular rules are this design's choice: the simplest
// delineator that does the job.
module wavelet_delineator
  import cs_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic               in_valid,
  input  sample_t            in_data,
  input  logic [19:0]        th_r,      // QRS slope threshold on d
  input  logic [19:0]        th_on,     // quiet-slope threshold on |d|
  input  logic [7:0]         win_qrs,   // longest rise or fall of a QRS
  input  logic [7:0]         t_lo,      // T search window after R
  input  logic [7:0]         t_hi,
  output logic               beat,
  output logic               p_ok,
  output logic [15:0]        p_pos,
  output logic [15:0]        q_pos,
  output logic [15:0]        r_pos,
  output logic [15:0]        s_pos,
  output logic [15:0]        t_pos,
  output logic [15:0]        rr
);
  localparam int unsigned H  = 1 << K;
  localparam int unsigned SW = SAMPLE_W + K + 3;   // width of sums, d, s and thresholds

  typedef enum logic [1:0] {S_IDLE, S_RISE, S_FALL, S_TWIN} state_e;
  state_e state;

  sample_t xs [2*H];
  logic signed [SW-1:0] sum_a, sum_b, na, nb, d, s, dmag, thr, thon;
  logic [15:0] n, c, since, rise_c, prev_r;
  logic [K+1:0] fill;
  logic warm, have_prev, neg_ok;
  logic signed [SW-1:0] p_max, t_max;
  logic p_cand;
  logic [15:0] p_cpos, q_cpos;

  assign na   = sum_a + SW'(in_data) - SW'(xs[H-1]);
  assign nb   = sum_b + SW'(xs[H-1]) - SW'(xs[2*H-1]);
  assign d    = na - nb;
  assign s    = na + nb;
  assign dmag = d[SW-1] ? -d : d;
  assign thr  = $signed(SW'(th_r));
  assign thon = $signed(SW'(th_on));
  assign c    = n - 16'(H);
  assign warm = (fill == (K+2)'(2*H));
  // positions past the start of the current rise, or past R
  assign since = c - ((state == S_RISE) ? rise_c : r_pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2*H; i++) xs[i] <= '0;
      sum_a <= '0; sum_b <= '0; n <= '0; fill <= '0;
      state <= S_IDLE; rise_c <= '0; prev_r <= '0; have_prev <= 1'b0; neg_ok <= 1'b0;
      p_max <= '0; t_max <= '0; p_cand <= 1'b0; p_cpos <= '0; q_cpos <= '0;
      beat <= 1'b0; p_ok <= 1'b0; p_pos <= '0; q_pos <= '0; r_pos <= '0;
      s_pos <= '0; t_pos <= '0; rr <= '0;
    end else begin
      beat <= 1'b0;
      if (in_valid) begin
        xs[0] <= in_data;
        for (int i = 1; i < 2*H; i++) xs[i] <= xs[i-1];
        sum_a <= na;
        sum_b <= nb;
        n     <= n + 1'b1;
        if (!warm) fill <= fill + 1'b1;
        else begin
          unique case (state)
            S_IDLE: begin
              if (dmag < thon) begin
                q_cpos <= c;
                if (!p_cand || s > p_max) begin
                  p_cand <= 1'b1; p_max <= s; p_cpos <= c;
                end
              end
              if (d > thr) begin
                state  <= S_RISE;
                rise_c <= c;
              end
            end
            S_RISE: begin
              if (d <= 0) begin
                state  <= S_FALL;
                r_pos  <= c;
                neg_ok <= 1'b0;
              end else if (since > 16'(win_qrs)) state <= S_IDLE;
            end
            S_FALL: begin
              if (d < -thr) neg_ok <= 1'b1;
              if (neg_ok && d > -thon) begin
                state <= S_TWIN;
                s_pos <= c;
                t_max <= '0;
                t_pos <= '0;
              end else if (since > 16'(win_qrs)) state <= S_IDLE;
            end
            S_TWIN: begin
              if (since >= 16'(t_lo) && since <= 16'(t_hi) && (since == 16'(t_lo) || s > t_max)) begin
                t_max <= s;
                t_pos <= c;
              end
              if (since >= 16'(t_hi)) begin
                state     <= S_IDLE;
                beat      <= 1'b1;
                p_ok      <= p_cand;
                p_pos     <= p_cpos;
                q_pos     <= q_cpos;
                rr        <= have_prev ? r_pos - prev_r : 16'd0;
                prev_r    <= r_pos;
                have_prev <= 1'b1;
                p_cand    <= 1'b0;
              end
            end
            default: state <= S_IDLE;
          endcase
        end
      end
    end
  end
endmodule
