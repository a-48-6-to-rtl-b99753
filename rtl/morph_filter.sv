// Multi-rate morphological baseline filter of the data management processor.
// It works directly on the compressed (multi-rate) samples, so a window of W
// compressed samples spans many more raw samples; this is what shrinks the
// register count against a filter running at the raw rate.
// Baseline estimate: opening (erosion then dilation, window W_OPEN) removes
// positive peaks, then closing (dilation then erosion, window W_CLOSE)
// removes negative peaks. Each of the four stages is a shift register of W
// values and a min or max over all of them, as the document describes. The
// signal, delayed to line up with the baseline, minus the baseline is the
// output; the rate tag travels with the delayed sample.
// Alignment: for a symmetric window each stage lags (W-1)/2 samples, and
// every stage adds one register, so output number k is
//   y = x[k-LAG] - B[k-LAG],  LAG = W_OPEN + W_CLOSE + 2
// where B is the centred close(open(x)). The first accepted sample is
// copied into every register, i.e. the signal is padded on the left with it.
// One output per accepted input (push stream); window sizes are this
// design's choice, the document gives only the 2-3 s span they must cover.
module morph_filter
  import cs_pkg::*;
#(
  parameter int unsigned W_OPEN  = 31,
  parameter int unsigned W_CLOSE = 47
) (
  input  logic clk,
  input  logic rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  csample_t in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output csample_t out_data,
  output sample_t  baseline     // baseline that was subtracted from out_data
);
  localparam int unsigned LAG = W_OPEN + W_CLOSE + 2;

  sample_t  w1 [W_OPEN];
  sample_t  w2 [W_OPEN];
  sample_t  w3 [W_CLOSE];
  sample_t  w4 [W_CLOSE];
  sample_t  r1, r2, r3, r4;
  csample_t dl [LAG];
  logic     primed;
  logic     fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;


  sample_t e1_n, d2_n, d3_n, e4_n;
  always_comb begin
    e1_n = in_data.value;
    for (int i = 0; i < W_OPEN - 1; i++)  if (w1[i] < e1_n) e1_n = w1[i];
    d2_n = r1;
    for (int i = 0; i < W_OPEN - 1; i++)  if (w2[i] > d2_n) d2_n = w2[i];
    d3_n = r2;
    for (int i = 0; i < W_CLOSE - 1; i++) if (w3[i] > d3_n) d3_n = w3[i];
    e4_n = r3;
    for (int i = 0; i < W_CLOSE - 1; i++) if (w4[i] < e4_n) e4_n = w4[i];
  end

  logic signed [SAMPLE_W:0] diff;
  assign diff = {dl[LAG-1].value[SAMPLE_W-1], dl[LAG-1].value} - {r4[SAMPLE_W-1], r4};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      baseline  <= '0;
      r1 <= '0; r2 <= '0; r3 <= '0; r4 <= '0;
      for (int i = 0; i < W_OPEN; i++)  begin w1[i] <= '0; w2[i] <= '0; end
      for (int i = 0; i < W_CLOSE; i++) begin w3[i] <= '0; w4[i] <= '0; end
      for (int i = 0; i < LAG; i++)     dl[i] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire && !primed) begin
        // pad the history with the first sample; it produces no output
        primed <= 1'b1;
        r1 <= in_data.value; r2 <= in_data.value; r3 <= in_data.value; r4 <= in_data.value;
        for (int i = 0; i < W_OPEN; i++)  begin w1[i] <= in_data.value; w2[i] <= in_data.value; end
        for (int i = 0; i < W_CLOSE; i++) begin w3[i] <= in_data.value; w4[i] <= in_data.value; end
        for (int i = 0; i < LAG; i++)     dl[i] <= in_data;
      end else if (fire) begin
        w1[0] <= in_data.value; w2[0] <= r1; w3[0] <= r2; w4[0] <= r3;
        for (int i = 1; i < W_OPEN; i++)  begin w1[i] <= w1[i-1]; w2[i] <= w2[i-1]; end
        for (int i = 1; i < W_CLOSE; i++) begin w3[i] <= w3[i-1]; w4[i] <= w4[i-1]; end
        r1 <= e1_n; r2 <= d2_n; r3 <= d3_n; r4 <= e4_n;
        dl[0] <= in_data;
        for (int i = 1; i < LAG; i++) dl[i] <= dl[i-1];
        out_valid      <= 1'b1;
        baseline       <= r4;
        out_data.rate  <= dl[LAG-1].rate;
        if (diff > 17'sd32767)       out_data.value <= 16'sh7fff;
        else if (diff < -17'sd32768) out_data.value <= 16'sh8000;
        else                         out_data.value <= sample_t'(diff);
      end
    end
  end
endmodule
