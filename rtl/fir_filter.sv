// 32-tap FIR filter of the data management processor's pre-processing.
// Each accepted input sample is shifted into a 32-entry delay line; a single
// multiply-accumulate unit then walks the 32 taps, one per clock, and the
// sum is rounded and saturated back to a 16-bit sample:
//   y[n] = sat16( (sum_k c[k]*x[n-k] + 2^(FRAC-1)) >>> FRAC )
// The tap count, the 16-bit input and the single-MAC structure with a
// coefficient store follow the document. The document builds this unit from
// latches and four-phase handshake cells instead of a clock; here the same
// sequence of operations is clocked, and the handshake is valid/ready.
// The coefficient format (signed Q1.15) and its write port are this
// design's choices. Timing: in_ready is high while idle; out_valid rises
// TAPS+1 clocks after a sample is accepted and holds until out_ready.
module fir_filter
  import cs_pkg::*;
#(
  parameter int unsigned TAPS = 32,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned FRAC = 15
) (
  input  logic clk,
  input  logic rst_n,
  // coefficient load port
  input  logic                      coef_we,
  input  logic [$clog2(TAPS)-1:0]   coef_addr,
  input  logic signed [COEF_W-1:0]  coef_wdata,
  // sample stream in
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  // filtered stream out
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data
);
  localparam int unsigned ACC_W = SAMPLE_W + COEF_W + $clog2(TAPS) + 1;
  localparam int unsigned IDX_W = $clog2(TAPS);

  typedef enum logic [1:0] { S_IDLE, S_MAC, S_OUT } state_e;
  state_e state;

  logic signed [COEF_W-1:0] coef  [TAPS];
  sample_t                  delay [TAPS];
  logic [IDX_W-1:0]         tap;
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  rounded;
  logic signed [ACC_W-1:0]  shifted;

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) coef[k] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tap   <= '0;
      acc   <= '0;
      for (int k = 0; k < TAPS; k++) delay[k] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          delay[0] <= in_data;
          for (int k = 1; k < TAPS; k++) delay[k] <= delay[k-1];
          acc   <= '0;
          tap   <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          acc <= acc + ACC_W'(coef[tap] * delay[tap]);
          tap <= tap + 1'b1;
          if (tap == IDX_W'(TAPS-1)) state <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rounded = acc + (ACC_W'(1) <<< (FRAC-1));
    shifted = rounded >>> FRAC;
    if (shifted > ACC_W'(32767))       out_data = 16'sh7fff;
    else if (shifted < -ACC_W'(32768)) out_data = 16'sh8000;
    else                               out_data = sample_t'(shifted);
  end
endmodule
