// tb_wfp_channel: end-to-end test of one processing channel.
//
// Builds a sampled waveform of scintillator-like negative pulses on a noisy
// baseline, packs it 8 samples per 128-bit word (12-bit data in bits
// [15:4] of each lane, random low bits), drives it with random gaps in valid,
// and compares every event (q, g, start and peak index) and the number of
// dropped peaks with the sample-by-sample model in wfp_ref_pkg. It runs
// three settings of l, A and B with a reset in between; one pulse pair is
// closer than B so the second peak must be dropped.
module tb_wfp_channel;
  import wfp_pkg::*;
  import wfp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic [WORD_W-1:0] adc_tdata;
  logic              adc_tvalid;
  wfp_cfg_t          cfg;
  logic              ev_valid;
  wfp_event_t        ev;
  logic              ev_lost;
  logic              busy;

  int checks = 0, failures = 0;
  wfp_event_t got[$];
  int got_lost = 0;
  int mech_event = 0, mech_lost = 0, mech_gap = 0, mech_mode = 0;

  wfp_channel dut (.*);

  always #1 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && ev_valid) got.push_back(ev);
    if (rst_n && ev_lost) got_lost++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_segment(int l, int a, int b, int thr, int npulse);
    int v[$];
    int len, at;
    wfp_ref rm;
    // waveform
    len = 400 + npulse * (a + b + 400) + 600;
    len = ((len + 7) / 8) * 8;
    for (int i = 0; i < len; i++) v.push_back($urandom_range(0, 8) - 4);
    at = 300;
    for (int p = 0; p < npulse; p++) begin
      int amp, fall;
      amp  = $urandom_range(300, 1900);
      fall = $urandom_range(8, 24);
      add_pulse(v, at, amp, fall, $urandom_range(30, 90));
      // pile-up: a second pulse peaking about B/2 after the first peak
      if (p == 1) add_pulse(v, at + fall + b / 2, amp + 300, 6, 30);
      at += a + b + 400;
    end
    for (int i = 0; i < len; i++) begin
      if (v[i] > 2047) v[i] = 2047;
      if (v[i] < -2048) v[i] = -2048;
    end
    rm = new(l, a, b, thr);
    rm.run(v);
    // drive
    got.delete(); got_lost = 0;
    rst_n = 1'b0; adc_tvalid = 1'b0; adc_tdata = '0;
    cfg = '{sm_point: LPT_W'(l), pre_a: AB_W'(a), post_b: AB_W'(b), thr: THR_W'(thr)};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < len / 8; ) begin
      if ($urandom_range(0, 9) == 0) begin
        adc_tvalid = 1'b0; mech_gap++;
      end else begin
        adc_tvalid = 1'b1;
        for (int k = 0; k < 8; k++)
          adc_tdata[k*16 +: 16] = {RAW_W'(v[w*8 + k]), 4'($urandom)};
        w++;
      end
      @(negedge clk);
    end
    adc_tvalid = 1'b0;
    repeat (100) @(negedge clk);
    // compare
    checks++;
    if (rm.n_ambiguous != 0) begin failures++; $display("stimulus has ambiguous peaks"); end
    checks++;
    if (got.size() != rm.evs.size()) begin
      failures++; $display("l=%0d: %0d events, expected %0d", l, got.size(), rm.evs.size());
    end
    for (int i = 0; i < got.size() && i < rm.evs.size(); i++) begin
      checks++;
      if (got[i].q !== rm.evs[i].q || got[i].g !== rm.evs[i].g ||
          got[i].t_start !== rm.evs[i].t_start || got[i].t_peak !== rm.evs[i].t_peak) begin
        failures++;
        $display("l=%0d ev %0d: q %0d/%0d g %0d/%0d start %0d/%0d peak %0d/%0d", l, i,
                 got[i].q, rm.evs[i].q, got[i].g, rm.evs[i].g,
                 got[i].t_start, rm.evs[i].t_start, got[i].t_peak, rm.evs[i].t_peak);
      end
    end
    checks++;
    if (got_lost != rm.n_lost) begin
      failures++; $display("l=%0d: lost %0d expected %0d", l, got_lost, rm.n_lost);
    end
    mech_event += got.size();
    mech_lost += got_lost;
    mech_mode++;
  endtask

  initial begin
    run_segment(9, 16, 40, 400, 8);
    run_segment(17, 24, 80, 800, 6);
    run_segment(1, 200, 150, 150, 4);
    $display("events=%0d lost=%0d gaps=%0d settings=%0d", mech_event, mech_lost, mech_gap, mech_mode);
    if (mech_event == 0 || mech_lost == 0 || mech_gap == 0 || mech_mode < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
