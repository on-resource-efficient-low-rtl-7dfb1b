// Shared constants of the turbo-decoder control: block length, LLR width,
// iteration limit and the early give-up thresholds.  None of these sizes is
// fixed by the technique itself; they are this design's defaults.
package turbo_pkg;
  localparam int unsigned BLK_LEN     = 1024;  // decoded bits per packet
  localparam int unsigned LLR_W       = 8;     // signed extrinsic / a-priori LLR
  localparam int unsigned MAX_ITER    = 8;     // full iterations (SISO1 + SISO2)
  localparam int unsigned EGU_INC_TH  = 4;     // a "significant" rise of mean |Le|
  localparam int unsigned EGU_OSC_LEN = 3;     // SISO-1 passes without such a rise

  typedef enum logic [1:0] {
    ST_NONE     = 2'd0,
    ST_DECODED  = 2'd1,   // early termination: hard decisions stable
    ST_GAVE_UP  = 2'd2,   // early give-up: resend requested, state kept
    ST_MAX_ITER = 2'd3    // iteration limit reached
  } result_e;
endpackage
