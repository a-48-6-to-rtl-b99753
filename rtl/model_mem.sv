// Learned-model memory of the ML processor: 4 KB, 2048 words of 16 bits,
// holding the offline-trained classifier parameters (class means, inverse
// covariance terms and constants for the maximum-likelihood classifier, or
// the weight vector and bias of a linear SVM).
// One write port, loaded over the system bus, and two synchronous read
// ports (data one clock after the address) so that the classification
// engine can fetch two parameters per clock. The document gives the size and
// says the memory is split into banks; in this model both read ports see the
// whole array, a behaviour that banking by address parity would give for the
// engine's paired accesses. Contents are not reset.
module model_mem #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned WW    = 16
) (
  input  logic clk,
  input  logic                       we,
  input  logic [$clog2(WORDS)-1:0]   waddr,
  input  logic [WW-1:0]              wdata,
  input  logic [$clog2(WORDS)-1:0]   raddr0,
  output logic [WW-1:0]              rdata0,
  input  logic [$clog2(WORDS)-1:0]   raddr1,
  output logic [WW-1:0]              rdata1
);
  logic [WW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end
endmodule
