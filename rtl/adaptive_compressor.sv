// Adaptive-sampling compressor of the data management processor.
// Samples are gathered in blocks of BLOCK (16) while a running maximum and
// minimum are kept. At the end of a block the max-min difference, taken as
// the block's information content, is compared with four thresholds and
// selects the decimation factor N = 1, 2, 4, 8 or 16: a busy block keeps
// every sample, a flat block keeps one in 16. The kept samples, x[0], x[N],
// x[2N], ... of the block, leave one per clock, each tagged with log2(N),
// which is also its distance to the next kept sample.
// The max-min measure, the threshold and the set of factors follow the
// document; the block length, the threshold port (th[0] > th[1] > th[2] >
// th[3]) and the valid/ready handshake are this design's choices. The
// document's lossless encoder after the decimator is not included.
// Timing: BLOCK accepted samples, then 16/N output beats; input is stalled
// (in_ready low) while a block is being emitted.
module adaptive_compressor
  import cs_pkg::*;
#(
  parameter int unsigned BLOCK = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [SAMPLE_W-1:0] th [4],   // range thresholds, descending
  input  logic     in_valid,
  output logic     in_ready,
  input  sample_t  in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output csample_t out_data
);
  localparam int unsigned IW = $clog2(BLOCK);

  typedef enum logic [1:0] { S_COLLECT, S_DECIDE, S_EMIT } state_e;
  state_e state;

  sample_t        blk [BLOCK];
  logic [IW-1:0]  cnt;
  sample_t        vmax, vmin;
  rate_t          code;
  logic [IW:0]    idx;
  logic [SAMPLE_W:0] range;

  assign in_ready  = (state == S_COLLECT);
  assign out_valid = (state == S_EMIT);
  assign out_data  = '{rate: code, value: blk[idx[IW-1:0]]};
  assign range     = {vmax[SAMPLE_W-1], vmax} - {vmin[SAMPLE_W-1], vmin};

  function automatic rate_t pick_rate(input logic [SAMPLE_W:0] r,
                                      input logic [SAMPLE_W-1:0] t [4]);
    if (r >= {1'b0, t[0]})      return rate_t'(0);
    else if (r >= {1'b0, t[1]}) return rate_t'(1);
    else if (r >= {1'b0, t[2]}) return rate_t'(2);
    else if (r >= {1'b0, t[3]}) return rate_t'(3);
    else                        return rate_t'(4);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_COLLECT;
      cnt   <= '0;
      vmax  <= '0;
      vmin  <= '0;
      code  <= '0;
      idx   <= '0;
      for (int k = 0; k < BLOCK; k++) blk[k] <= '0;
    end else begin
      unique case (state)
        S_COLLECT: if (in_valid) begin
          blk[cnt] <= in_data;
          if (cnt == '0 || in_data > vmax) vmax <= in_data;
          if (cnt == '0 || in_data < vmin) vmin <= in_data;
          cnt <= cnt + 1'b1;
          if (cnt == IW'(BLOCK-1)) state <= S_DECIDE;
        end
        S_DECIDE: begin
          code  <= pick_rate(range, th);
          idx   <= '0;
          state <= S_EMIT;
        end
        S_EMIT: if (out_ready) begin
          if (idx + (IW+1)'(1 << code) >= (IW+1)'(BLOCK)) state <= S_COLLECT;
          idx <= idx + (IW+1)'(1 << code);
        end
        default: state <= S_COLLECT;
      endcase
    end
  end
endmodule
