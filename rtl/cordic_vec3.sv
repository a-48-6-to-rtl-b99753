// CORDIC accelerator for the 3-D vectorcardiogram features: from a vector
// (x, y, z) it returns the magnitude sqrt(x^2+y^2+z^2), the azimuth
// theta = atan2(y, x) and the elevation phi = atan2(z, sqrt(x^2+y^2)).
// Two passes of a shift-and-add vectoring CORDIC: pass 1 rotates (x, y) onto
// the x axis, giving theta and the planar length; that length, corrected for
// the CORDIC gain, is paired with z for pass 2, giving phi and the full
// length, corrected again at the end. A vector with x < 0 is first turned by
// 180 degrees so that the iterations converge.
// Angles are binary angles: 16 bits, 0x8000 = 180 degrees (two extra
// fraction bits are kept inside; the vector keeps four). The arctangent table is
// atan(2^-i) * 2^17 / pi, rounded, i = 0..15.
// Interface: start (one clock) with x, y, z; done pulses 2*ITER+4 clocks
// after start, with the results held until the next start.
// The document names the CORDIC and the features it serves (vector angles
// and magnitudes); its iteration count, widths and angle format are this
// design's choices.
module cordic_vec3 #(
  parameter int unsigned ITER = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic               start,
  input  logic signed [15:0] x,
  input  logic signed [15:0] y,
  input  logic signed [15:0] z,
  output logic               done,
  output logic [15:0]        mag,
  output logic signed [15:0] theta,
  output logic signed [15:0] phi
);
  localparam int unsigned W = 26;     // datapath: 16 bits + 4 fraction + growth
  localparam logic signed [17:0] ATAN [16] = '{
    18'd32768, 18'd19344, 18'd10221, 18'd5188, 18'd2604, 18'd1303, 18'd652, 18'd326,
    18'd163, 18'd81, 18'd41, 18'd20, 18'd10, 18'd5, 18'd3, 18'd1 };
  localparam logic signed [16:0] KGAIN = 17'sd19898;   // 0.60725 in Q15

  typedef enum logic [2:0] { S_IDLE, S_PRE, S_ITER, S_MID, S_POST } state_e;
  state_e state;
  logic              pass2;
  logic [4:0]        it;
  logic signed [W-1:0] xr, yr, zr;
  logic signed [17:0]  ang;
  logic signed [W+16:0] scaled;

  assign scaled = xr * KGAIN;
  // final length: remove the CORDIC gain and the four fraction bits, rounded
  logic signed [W-1:0] mfin;
  assign mfin = W'((scaled + (W+17)'(1 << 18)) >>> 19);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pass2 <= 1'b0; it <= '0;
      xr <= '0; yr <= '0; zr <= '0; ang <= '0;
      done <= 1'b0; mag <= '0; theta <= '0; phi <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr <= W'(x) <<< 4;
          yr <= W'(y) <<< 4;
          zr <= W'(z) <<< 4;
          pass2 <= 1'b0;
          state <= S_PRE;
        end
        S_PRE: begin
          // turn the vector into the right half-plane
          if (xr < 0) begin
            xr  <= -xr;
            yr  <= -yr;
            ang <= 18'sh20000;   // 180 degrees
          end else begin
            ang <= '0;
          end
          it    <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          if (yr >= 0) begin
            xr  <= xr + (yr >>> it);
            yr  <= yr - (xr >>> it);
            ang <= ang + ATAN[it[3:0]];
          end else begin
            xr  <= xr - (yr >>> it);
            yr  <= yr + (xr >>> it);
            ang <= ang - ATAN[it[3:0]];
          end
          it <= it + 1'b1;
          if (it == 5'(ITER - 1)) state <= pass2 ? S_POST : S_MID;
        end
        S_MID: begin
          theta <= ang[17:2] + 16'(ang[1]);
          xr    <= W'(scaled >>> 15);
          yr    <= zr;
          pass2 <= 1'b1;
          state <= S_PRE;
        end
        S_POST: begin
          phi   <= ang[17:2] + 16'(ang[1]);
          mag   <= (mfin > W'(65535)) ? 16'hffff : mfin[15:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
