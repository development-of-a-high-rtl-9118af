// wfp_pkg: shared constants and types of the RFSoC waveform-processing pipeline.
//
// The ADC runs at 4.096 GS/s and the fabric at 512 MHz, so every fabric clock
// carries one 128-bit word holding LANES=8 consecutive samples, each a 12-bit
// value in a 16-bit lane. These numbers come from the design description; the
// index width, the smoothed-sample width and the A/B/threshold widths are this
// implementation's own choices.
package wfp_pkg;

  localparam int unsigned LANES    = 8;   // samples per fabric clock
  localparam int unsigned LANE_W   = 16;  // lane width in the ADC word
  localparam int unsigned WORD_W   = LANES * LANE_W;  // 128-bit ADC word
  localparam int unsigned RAW_W    = 12;  // ADC resolution
  localparam int unsigned LPT_W    = 6;   // width of the smoothing-points setting
  localparam int unsigned SM_W     = RAW_W + LPT_W;     // width of a moving sum
  localparam int unsigned IDX_W    = 32;  // running sample index (wraps)
  localparam int unsigned AB_W     = 8;   // width of A and B (samples)
  localparam int unsigned THR_W    = 16;  // peak threshold width
  localparam int unsigned ACC_W    = 32;  // charge / centroid accumulators

  // Delay-line depth in words: A up to 2**AB_W-1 plus the peak-search
  // latency, rounded up to whole words (see wfp_channel).
  localparam int unsigned DLY_DEPTH = ((1 << AB_W) - 1 + 9 + LANES - 1) / LANES;

  // Run-time configuration shared by all channels.
  typedef struct packed {
    logic [LPT_W-1:0] sm_point;   // smoothing window l, up to 63 (0 acts as 1)
    logic [AB_W-1:0]  pre_a;      // A: samples before the peak
    logic [AB_W-1:0]  post_b;     // B: samples after the peak
    logic [THR_W-1:0] thr;        // peak must lie below -thr
  } wfp_cfg_t;

  // One processed pulse.
  typedef struct packed {
    logic signed [ACC_W-1:0] q;       // charge: sum of v_i over the range
    logic signed [ACC_W-1:0] g;       // numerator by the recurrence g_i=g_{i-1}+q_i
    logic [IDX_W-1:0]        t_start; // sample index of i=1 (peak - A)
    logic [IDX_W-1:0]        t_peak;  // sample index of the peak
  } wfp_event_t;

endpackage
