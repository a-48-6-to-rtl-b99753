// Shared types and constants of the cardiac sensor SoC.
// Sample words are 16 bits (the pre-processing input width). Compressed
// samples carry a 3-bit rate code: the decimation factor N = 2**code with
// N in {1,2,4,8,16}. Feature-vector entries are 16 bits, up to 128 of them.
package cs_pkg;
  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned RATE_W   = 3;
  localparam int unsigned FV_W     = 16;
  localparam int unsigned FV_MAX   = 128;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [RATE_W-1:0]          rate_t;   // log2 of the decimation factor

  // One compressed sample: its value and the spacing (log2) to the next one.
  typedef struct packed {
    rate_t   rate;
    sample_t value;
  } csample_t;

  typedef enum logic [0:0] { CE_MLC = 1'b0, CE_SVM = 1'b1 } ce_mode_e;
  typedef enum logic [0:0] { SA_SKEW = 1'b0, SA_KURT = 1'b1 } sa_order_e;
endpackage
