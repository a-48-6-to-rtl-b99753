// Feature-vector buffer: up to 128 features of 16 bits, the interface
// between the feature extractors and the classification engine.
// Features arrive at uneven times from different extractors, so each write
// updates exactly one register (address-decoded enable, so the other
// registers are not clocked in a gated implementation). Two combinational
// read ports let the classification engine take two features per clock for
// its dual-MAC SVM mode. The document gives the size, the 16-bit width and
// the one-register-per-write behaviour; the dual read port is this design's
// choice to feed the two multipliers.
module fv_buffer
  import cs_pkg::*;
#(
  parameter int unsigned N = FV_MAX
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                      we,
  input  logic [$clog2(N)-1:0]      waddr,
  input  logic signed [FV_W-1:0]    wdata,
  input  logic [$clog2(N)-1:0]      raddr0,
  output logic signed [FV_W-1:0]    rdata0,
  input  logic [$clog2(N)-1:0]      raddr1,
  output logic signed [FV_W-1:0]    rdata1
);
  logic signed [FV_W-1:0] fv [N];

  for (genvar k = 0; k < N; k++) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                              fv[k] <= '0;
      else if (we && waddr == ($clog2(N))'(k)) fv[k] <= wdata;
    end
  end

  assign rdata0 = fv[raddr0];
  assign rdata1 = fv[raddr1];
endmodule
