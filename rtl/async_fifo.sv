// Dual-clock FIFO between the sampling-side pre-processing and the burst
// computation domain (25/40 MHz). Compressed samples are queued here while
// the processors sleep and drained in a burst when they wake.
// Classic Gray-coded pointer design: each side keeps a binary and a Gray
// pointer, the opposite Gray pointer crosses through two flip-flops, and
// full/empty are derived from the synchronised copies, so both flags are
// conservative. The read side is first-word-fall-through: rdata shows the
// head entry whenever rvalid is high. wlevel is the fill level seen from the
// write side, used to decide when a burst is worth waking up for.
// The document gives the FIFO's role and a 1-2 kB size; the 1024-entry depth
// (2 kB of 16-bit samples), the synchroniser and the Gray-code scheme are
// this design's choices, and the register/memory split of the chip's FIFO is
// not modelled.
module async_fifo #(
  parameter int unsigned WIDTH = 19,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wvalid,
  output logic             wready,
  input  logic [WIDTH-1:0] wdata,
  output logic [$clog2(DEPTH):0] wlevel,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             rvalid,
  input  logic             rready,
  output logic [WIDTH-1:0] rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  assign rbin_w = gray2bin(rgray_w2);
  assign wlevel = wbin - rbin_w;
  assign wready = (wlevel != (AW+1)'(DEPTH));

  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wvalid && wready) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read side
  assign rvalid = (rgray != wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rvalid && rready) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
