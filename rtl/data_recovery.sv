// Data recovery: turns the multi-rate stream back into a uniformly sampled
// signal. A compressed sample p with rate code r is followed 2**r raw sample
// periods later by the next compressed sample s; the missing samples are
// linearly interpolated:
//   y[j] = p + (((s - p) * j) >>> r),   j = 0 .. 2**r - 1
// (the shift is an arithmetic one, i.e. it rounds toward minus infinity).
// Because every factor is a power of two no divider is needed.
// The document gives the block's role (rebuilding the waveform from the
// compressed data); linear interpolation is this design's choice.
// Timing: the first compressed sample only primes the unit. Each later one
// is accepted when idle and yields 2**r output beats, one per clock while
// out_ready is high. The last compressed sample is never emitted on its own.
module data_recovery
  import cs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  csample_t in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output sample_t  out_data
);
  logic     have_prev, busy;
  sample_t  prev, next;
  rate_t    prate;
  rate_t    next_rate;
  logic [4:0] j;
  logic signed [SAMPLE_W:0]   diff;
  logic signed [SAMPLE_W+6:0] prod;
  logic signed [SAMPLE_W+6:0] interp;

  assign in_ready  = !busy;
  assign out_valid = busy;
  assign diff      = {next[SAMPLE_W-1], next} - {prev[SAMPLE_W-1], prev};
  assign prod      = diff * $signed({1'b0, j});
  assign interp    = (prod >>> prate) + {{7{prev[SAMPLE_W-1]}}, prev};
  assign out_data  = sample_t'(interp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0;
      busy      <= 1'b0;
      prev      <= '0;
      next      <= '0;
      prate     <= '0;
      j         <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        if (!have_prev) begin
          have_prev <= 1'b1;
          prev      <= in_data.value;
          prate     <= in_data.rate;
        end else begin
          next <= in_data.value;
          busy <= 1'b1;
          j    <= '0;
        end
      end
    end else if (out_ready) begin
      if (j == 5'((1 << prate) - 1)) begin
        busy <= 1'b0;
        prev <= next;
        // rate of the sample just consumed becomes the next gap
        prate <= next_rate;
      end
      j <= j + 1'b1;
    end
  end

  // the rate travels with the sample it was received with
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) next_rate <= '0;
    else if (!busy && in_valid && have_prev) next_rate <= in_data.rate;
  end
endmodule
