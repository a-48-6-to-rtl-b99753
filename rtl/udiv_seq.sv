// Multiplier-less sequential divider: restoring shift-and-subtract, one
// quotient bit per clock, most significant first.
//   q = min(floor(n / d), 2**QW - 1);  d == 0 also gives the saturated value.
// start (one clock) loads the operands; done pulses QW+1 clocks later with q
// valid and held until the next start. Used by the shape analyzer for its
// mean and for the final moment ratio (the document specifies a divider
// without multipliers and under 30 cycles; the restoring scheme is this
// design's choice).
module udiv_seq #(
  parameter int unsigned NW = 96,
  parameter int unsigned DW = 84,
  parameter int unsigned QW = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic          start,
  input  logic [NW-1:0] n,
  input  logic [DW-1:0] d,
  output logic          busy,
  output logic          done,
  output logic [QW-1:0] q
);
  localparam int unsigned MW = ((NW > DW + QW) ? NW : DW + QW) + 1;
  logic [MW-1:0] rem, dsh;
  logic [$clog2(QW+1)-1:0] cnt;
  logic          sat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; dsh <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; q <= '0; sat <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= MW'(n);
        dsh  <= MW'(d) << (QW - 1);
        sat  <= (d == '0) || (MW'(n) >= (MW'(d) << QW));
        q    <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (rem >= dsh) begin
          rem <= rem - dsh;
          q   <= {q[QW-2:0], 1'b1};
        end else begin
          q   <= {q[QW-2:0], 1'b0};
        end
        dsh <= dsh >> 1;
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(QW+1))'(QW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (sat) q <= '1;
        end
      end
    end
  end
endmodule
