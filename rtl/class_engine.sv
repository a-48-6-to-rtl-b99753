// Classification engine (CE): one switchable datapath for two classifiers,
// fed from the feature-vector buffer and the learned-model memory.
//
// MLC mode (maximum-likelihood / MAP classifier). For each class c the score
//   S_c = (K_c <<< CSH) + sum_j d_j * ( sum_i d_i * W_c[j][i] ),  d = FV - mu_c
// is accumulated feature by feature, where W_c holds the offline-trained
// 0.5*inverse covariance and K_c the constant -2 ln P(c) + 0.5 ln|Sigma_c|.
// The class with the smallest score is chosen (ties keep the lower index).
// Step 1 forms d (one subtraction per clock), step 2 runs the inner
// multiply-accumulate over i and folds each finished row into the outer
// accumulator with the second multiplier, so a class takes about
// N*N + N + 5 clocks, proportional to N^2 as the document states.
// Model layout per class, base c*(2+N+N*N): K lo, K hi, mu[0..N-1],
// W row-major (row j, column i).
//
// SVM mode (linear SVM). decision = sum_i FV_i * SV_i - (b <<< BSH), with
// SV the trained weight vector (sum of alpha*y*support vector). Both
// multipliers work in parallel on features 2k and 2k+1, halving the time:
// about N/2 + 5 clocks. Layout: b lo, b hi, SV[0..N-1]. Class 1 (abnormal)
// when decision > 0, else class 0.
//
// Interface: start (one clock) with mode, nfv (1..128) and ncls (MLC class
// count, 1..MAX_CLS); done pulses with cls, score (winning MLC score or SVM
// decision value) and alarm (cls != 0, class 0 being normal) held until the
// next start. Model reads have one clock of latency; FV reads none.
// Following the document: the shared adder/two-multiplier/two-accumulator
// datapath, MLC cost growing with N^2, the parallel-MAC SVM and the
// accumulation per feature for a variable N. This design's choices: word
// layout, fixed-point formats (features and parameters 16 bits, constants 32
// bits, CSH and BSH alignment shifts) and the tie rule.
module class_engine
  import cs_pkg::*;
#(
  parameter int unsigned N_MAX   = FV_MAX,
  parameter int unsigned AW      = 11,
  parameter int unsigned MAX_CLS = 4,
  parameter int unsigned CSH     = 16,
  parameter int unsigned BSH     = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                          start,
  input  ce_mode_e                      mode,
  input  logic [$clog2(N_MAX):0]        nfv,
  input  logic [$clog2(MAX_CLS):0]      ncls,
  // feature-vector buffer
  output logic [$clog2(N_MAX)-1:0]      fv_raddr0,
  input  logic signed [FV_W-1:0]        fv_rdata0,
  output logic [$clog2(N_MAX)-1:0]      fv_raddr1,
  input  logic signed [FV_W-1:0]        fv_rdata1,
  // learned-model memory
  output logic [AW-1:0]                 m_raddr0,
  input  logic [15:0]                   m_rdata0,
  output logic [AW-1:0]                 m_raddr1,
  input  logic [15:0]                   m_rdata1,
  // result
  output logic                          busy,
  output logic                          done,
  output logic [$clog2(MAX_CLS)-1:0]    cls,
  output logic signed [63:0]            score,
  output logic                          alarm
);
  localparam int unsigned NW = $clog2(N_MAX) + 1;
  localparam int unsigned CW = $clog2(MAX_CLS) + 1;

  typedef enum logic [3:0] {
    P_IDLE, P_CONST, P_DEV, P_QUAD, P_CEND, P_CCMP, P_BIAS, P_SVM, P_SEND, P_SCMP, P_DONE
  } phase_e;
  typedef enum logic [2:0] { K_NONE, K_CONST, K_DEV, K_QUAD, K_BIAS, K_SVM } kind_e;

  phase_e phase;
  logic [NW-1:0] n, i, j;
  logic [CW-1:0] nc, c;
  logic [AW-1:0] base, rowp;
  logic [AW-1:0] stride;

  // issue-stage tag, consumed one clock later with the model data
  kind_e        t_kind;
  logic [NW-1:0] t_i;
  logic [NW-2:0] t_j;
  logic         t_rowend, t_two;
  logic signed [FV_W-1:0] fvq0, fvq1;

  logic signed [FV_W:0]  d [N_MAX];
  logic signed [47:0]    inner;
  logic signed [63:0]    acc, best;
  logic signed [47:0]    inner_n;
  logic signed [31:0]    k32;

  assign busy = (phase != P_IDLE);
  assign k32  = {m_rdata1, m_rdata0};

  // address generation
  always_comb begin
    m_raddr0  = base;
    m_raddr1  = base + 1'b1;
    fv_raddr0 = i[NW-2:0];
    fv_raddr1 = i[NW-2:0];
    unique case (phase)
      P_DEV:  m_raddr0 = base + AW'(2) + AW'(i);
      P_QUAD: m_raddr0 = rowp + AW'(i);
      P_SVM: begin
        m_raddr0  = AW'(2) + AW'({i, 1'b0});
        m_raddr1  = AW'(3) + AW'({i, 1'b0});
        fv_raddr0 = (NW-1)'({i, 1'b0});
        fv_raddr1 = (NW-1)'({i, 1'b1});
      end
      default: ;
    endcase
  end

  assign inner_n = (t_i == '0 ? 48'sd0 : inner) + 48'(d[t_i[NW-2:0]]) * 48'($signed(m_rdata0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE; n <= '0; i <= '0; j <= '0; nc <= '0; c <= '0;
      base <= '0; rowp <= '0; stride <= '0;
      t_kind <= K_NONE; t_i <= '0; t_j <= '0; t_rowend <= 1'b0; t_two <= 1'b0;
      fvq0 <= '0; fvq1 <= '0; inner <= '0; acc <= '0; best <= '0;
      done <= 1'b0; cls <= '0; score <= '0; alarm <= 1'b0;
      for (int k = 0; k < N_MAX; k++) d[k] <= '0;
    end else begin
      done   <= 1'b0;
      t_kind <= K_NONE;
      fvq0   <= fv_rdata0;
      fvq1   <= fv_rdata1;

      // ---------------- issue stage ----------------
      unique case (phase)
        P_IDLE: if (start) begin
          n      <= (nfv == '0) ? NW'(1) : nfv;
          nc     <= (ncls == '0) ? CW'(1) : ncls;
          stride <= AW'(2) + AW'(nfv) + AW'(nfv) * AW'(nfv);
          c      <= '0;
          i      <= '0;
          j      <= '0;
          base   <= '0;
          phase  <= (mode == CE_SVM) ? P_BIAS : P_CONST;
        end
        P_CONST: begin
          t_kind <= K_CONST;
          i      <= '0;
          phase  <= P_DEV;
        end
        P_DEV: begin
          t_kind <= K_DEV;
          t_i    <= i;
          i      <= i + 1'b1;
          if (i == n - 1'b1) begin
            i     <= '0;
            j     <= '0;
            rowp  <= base + AW'(2) + AW'(n);
            phase <= P_QUAD;
          end
        end
        P_QUAD: begin
          t_kind   <= K_QUAD;
          t_i      <= i;
          t_j      <= j[NW-2:0];
          t_rowend <= (i == n - 1'b1);
          i        <= i + 1'b1;
          if (i == n - 1'b1) begin
            i    <= '0;
            j    <= j + 1'b1;
            rowp <= rowp + AW'(n);
            if (j == n - 1'b1) phase <= P_CEND;
          end
        end
        P_CEND: phase <= P_CCMP;
        P_CCMP: begin
          if (c == '0 || acc < best) begin
            best <= acc;
            cls  <= ($clog2(MAX_CLS))'(c);
          end
          c <= c + 1'b1;
          if (c == nc - 1'b1) phase <= P_DONE;
          else begin
            base  <= base + stride;
            phase <= P_CONST;
          end
        end
        P_BIAS: begin
          t_kind <= K_BIAS;
          i      <= '0;
          phase  <= P_SVM;
        end
        P_SVM: begin
          t_kind <= K_SVM;
          t_two  <= ({i, 1'b1} < {1'b0, n});
          i      <= i + 1'b1;
          if ({i, 1'b0} + (NW+1)'(2) >= {1'b0, n}) phase <= P_SEND;
        end
        P_SEND: phase <= P_SCMP;
        P_SCMP: begin
          best  <= acc;
          cls   <= ($clog2(MAX_CLS))'(acc > 0);
          phase <= P_DONE;
        end
        P_DONE: begin
          done  <= 1'b1;
          score <= best;
          alarm <= (cls != '0);
          phase <= P_IDLE;
        end
        default: phase <= P_IDLE;
      endcase

      // ---------------- data stage ----------------
      unique case (t_kind)
        K_CONST: acc <= 64'(k32) <<< CSH;
        K_BIAS:  acc <= -(64'(k32) <<< BSH);
        K_DEV:   d[t_i[NW-2:0]] <= (FV_W+1)'(fvq0) - (FV_W+1)'($signed(m_rdata0));
        K_QUAD: begin
          inner <= inner_n;
          if (t_rowend) acc <= acc + 64'(inner_n) * 64'(d[t_j]);
        end
        K_SVM: acc <= acc + 64'(fvq0) * 64'($signed(m_rdata0))
                          + (t_two ? 64'(fvq1) * 64'($signed(m_rdata1)) : 64'sd0);
        default: ;
      endcase
    end
  end
endmodule
