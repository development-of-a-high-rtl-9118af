// tb_timing_2ch: two-channel timing workload on the full design.
//
// Reproduces the timing-resolution measurement the design is built for: one
// pulse shape, like a plastic-scintillator signal about 40 ns wide, goes to
// channel 0 and channel 1, as through a fan-out. Channel 1 is offset by a
// known fraction of a sample, and both channels get independent white
// noise (sigma 2 ADC counts). For every pulse the time of each channel is formed from its event
// as t = t_start - 1 + (n+1) - g/q, and the difference between the channels
// is collected. The mean difference must match the injected offset to within
// 0.02 samples (about 5 ps). Its spread must be below the 25 ps (0.1 sample)
// goal of the application. Pulse amplitudes vary from pulse to pulse, so the
// time must not depend on amplitude.
module tb_timing_2ch;
  import wfp_pkg::*;

  localparam int    NC      = 2;
  localparam int    NPULSE  = 60;
  localparam int    SPACING = 600;    // samples between pulses
  localparam real   OFFSET  = 2.37;   // channel-1 delay in samples
  localparam real   TS_PS   = 1.0e6 / 4096.0;  // sample period in ps

  logic clk = 1'b0;
  logic rst_n;
  logic [NC-1:0][WORD_W-1:0] adc_tdata;
  logic [NC-1:0]             adc_tvalid;
  wfp_cfg_t                  cfg;
  logic [NC-1:0]             ev_valid;
  wfp_event_t [NC-1:0]       ev;
  logic [NC-1:0]             ev_lost;
  logic [NC-1:0]             busy;

  int checks = 0, failures = 0;
  real t_ev[NC][$];
  int  n_lost = 0;

  localparam int A = 40, B = 120, L = 9;

  wfp_top dut (.*);

  always #1 clk = ~clk;

  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) begin
      if (rst_n && ev_valid[c]) begin
        real n, q, g;
        n = real'(A + B);
        q = real'(ev[c].q);
        g = real'(ev[c].g);
        t_ev[c].push_back(real'(ev[c].t_start) - 1.0 + (n + 1.0) - g / q);
      end
      if (rst_n && ev_lost[c]) n_lost++;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pulse shape: Gaussian leading edge (sigma 8 samples, ~2 ns) and a
  // longer Gaussian tail (sigma 22 samples); about 40 ns at the base.
  function automatic real shape(real t);
    if (t < 0.0) return $exp(-(t * t) / (2.0 * 8.0 * 8.0));
    else         return $exp(-(t * t) / (2.0 * 22.0 * 22.0));
  endfunction

  // Approximately Gaussian noise of the given sigma (sum of 12 uniforms).
  function automatic real noise(real sigma);
    real s = 0.0;
    for (int j = 0; j < 12; j++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return (s - 6.0) * sigma;
  endfunction

  initial begin
    int  len;
    real amp[NPULSE];
    real mean, var_, sd;
    len = SPACING * (NPULSE + 2);
    for (int p = 0; p < NPULSE; p++) amp[p] = 600.0 + real'($urandom_range(0, 1200));
    rst_n = 1'b0; adc_tvalid = '0; adc_tdata = '0;
    cfg = '{sm_point: LPT_W'(L), pre_a: AB_W'(A), post_b: AB_W'(B), thr: THR_W'(2000)};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < len / 8; w++) begin
      adc_tvalid = '1;
      for (int c = 0; c < NC; c++)
        for (int k = 0; k < 8; k++) begin
          int  i, p, vi;
          real t, v;
          i = w * 8 + k;
          p = i / SPACING - 1;
          v = noise(2.0);
          if (p >= 0 && p < NPULSE) begin
            t = real'(i % SPACING) - 200.0 - ((c == 1) ? OFFSET : 0.0) - real'(p % 7) * 0.13;
            v += -amp[p] * shape(t);
          end
          vi = int'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
          if (vi > 2047) vi = 2047;
          if (vi < -2048) vi = -2048;
          adc_tdata[c][k*16 +: 16] = {RAW_W'(vi), 4'($urandom)};
        end
      @(negedge clk);
    end
    adc_tvalid = '0;
    repeat (50) @(negedge clk);

    checks++;
    if (t_ev[0].size() != NPULSE || t_ev[1].size() != NPULSE) begin
      failures++;
      $display("events: ch0 %0d ch1 %0d, expected %0d", t_ev[0].size(), t_ev[1].size(), NPULSE);
    end
    checks++;
    if (n_lost != 0) begin failures++; $display("%0d peaks dropped", n_lost); end
    // coarse check that each event belongs to its pulse: the centroid lies a
    // little after the pulse peak, within the integration range
    for (int p = 0; p < NPULSE && p < t_ev[0].size() && p < t_ev[1].size(); p++)
      for (int c = 0; c < NC; c++) begin
        real exp_t, g_sh;
        exp_t = real'((p + 1) * SPACING + 200) + ((c == 1) ? OFFSET : 0.0);
        g_sh = t_ev[c][p] - exp_t;
        checks++;
        if (g_sh < -2.0 || g_sh > 40.0) begin
          failures++; $display("ch%0d pulse %0d: time %f far from %f", c, p, t_ev[c][p], exp_t);
        end
      end
    mean = 0.0; var_ = 0.0;
    for (int p = 0; p < t_ev[0].size() && p < t_ev[1].size(); p++)
      mean += t_ev[1][p] - t_ev[0][p];
    mean /= real'(NPULSE);
    for (int p = 0; p < t_ev[0].size() && p < t_ev[1].size(); p++)
      var_ += (t_ev[1][p] - t_ev[0][p] - mean) ** 2;
    sd = $sqrt(var_ / real'(NPULSE - 1));
    $display("time difference: mean %.4f samples (injected %.4f), sigma %.4f samples = %.1f ps",
             mean, OFFSET, sd, sd * TS_PS);
    checks++;
    if (mean < OFFSET - 0.02 || mean > OFFSET + 0.02) begin
      failures++; $display("mean time difference off");
    end
    checks++;
    if (sd * TS_PS > 25.0) begin failures++; $display("timing spread above 25 ps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
