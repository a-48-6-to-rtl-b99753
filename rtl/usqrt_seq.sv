// Multiplier-less sequential integer square root (digit-by-digit, binary):
//   r = floor(sqrt(x))
// One result bit per clock using only shifts, adds and compares. start (one
// clock) loads x; done pulses XW/2+1 clocks later with r held until the next
// start. XW must be even. Used by the shape analyzer for the skewness
// normaliser; the document asks for a multiplier-less square root with a
// latency under 30 cycles, the algorithm is this design's choice.
module usqrt_seq #(
  parameter int unsigned XW = 50
) (
  input  logic clk,
  input  logic rst_n,
  input  logic              start,
  input  logic [XW-1:0]     x,
  output logic              busy,
  output logic              done,
  output logic [XW/2-1:0]   r
);
  logic [XW:0] op, res, one;
  logic [XW:0] trial;
  assign trial = res + one;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= '0; res <= '0; one <= '0; busy <= 1'b0; done <= 1'b0; r <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        op   <= (XW+1)'(x);
        res  <= '0;
        one  <= (XW+1)'(1) << (XW - 2);
        busy <= 1'b1;
      end else if (busy) begin
        if (op >= trial) begin
          op  <= op - trial;
          res <= (res >> 1) + one;
        end else begin
          res <= res >> 1;
        end
        one <= one >> 2;
        if (one == (XW+1)'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          r    <= (XW/2)'(op >= trial ? (res >> 1) + one : res >> 1);
        end
      end
    end
  end
endmodule
