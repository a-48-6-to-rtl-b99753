// Self-checking testbench of the 3-D CORDIC. Random vectors, plus the axes
// and vectors in every octant, are compared with magnitude and angles
// computed here with $sqrt and $atan2. Tolerances: 0.2% + 3 LSB on the
// magnitude, 6 LSB (about 0.03 degree) on the angles plus
// the quantisation of a short vector, 20000/length LSB. Latency is checked
// against 2*ITER+4 clocks from start.
module tb_cordic_vec3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  logic signed [15:0] x, y, z, theta, phi;
  logic [15:0] mag;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  cordic_vec3 dut (.*);

  initial begin
    repeat (100000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real angdiff(input real a, input real b);
    real d = a - b;
    while (d > 32768.0) d -= 65536.0;
    while (d < -32768.0) d += 65536.0;
    return d < 0 ? -d : d;
  endfunction

  task automatic one(input int xi, input int yi, input int zi);
    real rm, rt, rp, tol;
    int cyc = 0;
    x = 16'(xi); y = 16'(yi); z = 16'(zi); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    rm = $sqrt(real'(xi)*xi + real'(yi)*yi + real'(zi)*zi);
    rt = $atan2(real'(yi), real'(xi)) / PI * 32768.0;
    rp = $atan2(real'(zi), $sqrt(real'(xi)*xi + real'(yi)*yi)) / PI * 32768.0;
    tol = 3.0 + rm * 0.002;
    checks++;
    if ((real'(mag) - rm > tol) || (rm - real'(mag) > tol)) begin
      failures++; $display("FAIL mag (%0d,%0d,%0d) got %0d ref %f", xi, yi, zi, mag, rm);
    end
    if (xi != 0 || yi != 0) begin
      checks++;
      if (angdiff(real'(theta), rt) > 6.0 + 20000.0 / $sqrt(real'(xi)*xi + real'(yi)*yi)) begin
        failures++; $display("FAIL theta (%0d,%0d,%0d) got %0d ref %f", xi, yi, zi, theta, rt);
      end
    end
    if (rm > 0) begin
      checks++;
      if (angdiff(real'(phi), rp) > 6.0 + 20000.0 / rm) begin
        failures++; $display("FAIL phi (%0d,%0d,%0d) got %0d ref %f", xi, yi, zi, phi, rp);
      end
    end
    checks++;
    if (cyc != 2*16 + 4) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    start = 0; x = 0; y = 0; z = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    one(1000, 0, 0); one(0, 1000, 0); one(0, 0, 1000); one(-1000, 0, 0);
    one(-700, -800, 300); one(32767, 32767, 32767); one(-32768, -32768, -32768);
    for (int sx = -1; sx <= 1; sx += 2)
      for (int sy = -1; sy <= 1; sy += 2)
        for (int sz = -1; sz <= 1; sz += 2)
          one(sx * 1234, sy * 4321, sz * 2222);
    repeat (300) one($signed($urandom % 65536) - 32768, $signed($urandom % 65536) - 32768,
                     $signed($urandom % 65536) - 32768);
    repeat (100) one($signed($urandom % 2001) - 1000, $signed($urandom % 2001) - 1000,
                     $signed($urandom % 2001) - 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
