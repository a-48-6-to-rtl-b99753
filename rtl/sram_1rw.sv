// Single-port synchronous memory used for the general-purpose processor's
// instruction and data memories (8 KB each: 2048 words of 32 bits). One
// access per clock; a read returns data on the next clock; byte enables
// select the bytes a write changes. The document gives the sizes; the word
// width and the byte-enable port are this design's choices (the processor
// is a 32-bit core). Contents are not reset.
module sram_1rw #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned WW    = 32
) (
  input  logic clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [WW/8-1:0]          be,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WW-1:0]            wdata,
  output logic [WW-1:0]            rdata
);
  logic [WW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < WW/8; b++)
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
