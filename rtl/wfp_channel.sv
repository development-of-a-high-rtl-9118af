// wfp_channel: one complete waveform-processing channel.
//
// The ADC word is unpacked into 8 samples (adc_unpack), smoothed by a moving
// sum of l samples (smoothing_x8) and then splits in two: the peak search
// (peak_search_x8) looks for the zero crossing of the first difference, while
// a delay line (wave_delay_x8) holds back the smoothed waveform. When a peak
// at sample p is found, the integrator (centroid_calc_x8) sums the delayed
// waveform from p-A to p+B-1 into the charge q and the centroid numerator g.
// This is the structure of the design: smoothing, peak search, delay of the
// smoothed waveform, integration and centroid.
//
// Delay: the design delays the smoothed waveform by A. Here it is rounded up
// to whole words and lengthened by the peak-search latency: the peak is
// reported one clock after the word holding s[p+1], and p may be one sample
// before that word, so the delay is ceil((A+9)/8) words. The integrator picks
// its samples by index, so the rounding changes only the latency.
//
// Latency from the ADC word holding p+B-1 to ev_valid: about
// ceil((A+9)/8) + 4 clocks.
module wfp_channel
  import wfp_pkg::*;
#(
  parameter int unsigned DEPTH = DLY_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WORD_W-1:0]  adc_tdata,
  input  logic               adc_tvalid,
  input  wfp_cfg_t           cfg,
  output logic               ev_valid,
  output wfp_event_t         ev,
  output logic               ev_lost,
  output logic               busy
);

  localparam int unsigned D_W = $clog2(DEPTH + 1);

  logic                           u_valid;
  logic [IDX_W-1:0]               u_idx;
  logic [LANES-1:0][RAW_W-1:0]    u_s;

  logic                           s_valid;
  logic [IDX_W-1:0]               s_idx;
  logic [LANES-1:0][SM_W-1:0]     s_s;

  logic                           d_valid;
  logic [IDX_W-1:0]               d_idx;
  logic [LANES-1:0][SM_W-1:0]     d_s;

  logic                           pk_valid;
  logic [IDX_W-1:0]               pk_idx;

  logic [D_W-1:0]                 dly;

  always_comb begin
    int unsigned w;
    w = (int'(cfg.pre_a) + 9 + LANES - 1) / LANES;
    dly = (w > DEPTH) ? D_W'(DEPTH) : D_W'(w);
  end

  adc_unpack u_unpack (
    .clk, .rst_n,
    .in_data (adc_tdata), .in_valid (adc_tvalid),
    .out_valid (u_valid), .out_idx (u_idx), .out_s (u_s)
  );

  smoothing_x8 u_smooth (
    .clk, .rst_n,
    .in_valid (u_valid), .in_idx (u_idx), .in_s (u_s), .l (cfg.sm_point),
    .out_valid (s_valid), .out_idx (s_idx), .out_s (s_s)
  );

  peak_search_x8 u_peak (
    .clk, .rst_n,
    .in_valid (s_valid), .in_idx (s_idx), .in_s (s_s), .thr (cfg.thr),
    .pk_valid, .pk_idx
  );

  wave_delay_x8 #(.DEPTH (DEPTH)) u_delay (
    .clk, .rst_n, .dly,
    .in_valid (s_valid), .in_idx (s_idx), .in_s (s_s),
    .out_valid (d_valid), .out_idx (d_idx), .out_s (d_s)
  );

  centroid_calc_x8 u_centroid (
    .clk, .rst_n,
    .pk_valid, .pk_idx, .pre_a (cfg.pre_a), .post_b (cfg.post_b),
    .in_valid (d_valid), .in_idx (d_idx), .in_s (d_s),
    .ev_valid, .ev, .busy, .lost (ev_lost)
  );

endmodule
