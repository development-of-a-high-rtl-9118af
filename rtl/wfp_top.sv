// wfp_top: multi-channel RFSoC waveform processor.
//
// N_CH channels, each fed by its own ADC stream of 128-bit words (8 samples
// of 12 bits per 512 MHz clock, i.e. 4.096 GS/s), run the full chain of
// wfp_channel: smoothing, peak search, delayed integration and centroid.
// Every found pulse yields one event with its charge q, centroid numerator g
// and the sample indices of the range start and of the peak; software forms
// the time as t_start + (n+1) - g/q with n = A+B, and the timing
// resolution from the difference between two channels fed the same pulse.
// The default of two channels matches the two-channel timing measurement;
// the shared configuration is this implementation's choice.
module wfp_top
  import wfp_pkg::*;
#(
  parameter int unsigned N_CH = 2
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_CH-1:0][WORD_W-1:0]    adc_tdata,
  input  logic [N_CH-1:0]                adc_tvalid,
  input  wfp_cfg_t                       cfg,
  output logic [N_CH-1:0]                ev_valid,
  output wfp_event_t [N_CH-1:0]          ev,
  output logic [N_CH-1:0]                ev_lost,
  output logic [N_CH-1:0]                busy
);

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    wfp_channel u_ch (
      .clk, .rst_n,
      .adc_tdata  (adc_tdata[c]),
      .adc_tvalid (adc_tvalid[c]),
      .cfg,
      .ev_valid   (ev_valid[c]),
      .ev         (ev[c]),
      .ev_lost    (ev_lost[c]),
      .busy       (busy[c])
    );
  end

endmodule
