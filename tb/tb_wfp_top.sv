// tb_wfp_top: end-to-end test of the two-channel waveform processor at its
// default size.
//
// The same train of scintillator-like pulses goes to both channels, as from a
// fan-out, with channel 1 shifted by a few samples and given its own noise.
// Each channel's events and dropped peaks are compared with the
// sample-by-sample model of wfp_ref_pkg. Three settings of smoothing points
// l, A and B are run with a reset in between. The mechanisms counted are:
// events, a dropped pile-up peak, gaps in the ADC stream and setting changes;
// each must happen. Between the word that delivers sample p+B-1 and the event
// the ADC must deliver between ceil((A+9)/8) (the delay line) and that plus 4
// (register stages) further words; the input is taken at one 8-sample word
// per clock with no back-pressure.
module tb_wfp_top;
  import wfp_pkg::*;
  import wfp_ref_pkg::*;

  localparam int NC = 2;

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
  wfp_event_t got[NC][$];
  int         got_cyc[NC][$];
  int got_lost[NC];
  int cyc = 0;
  int drive_cyc[$];       // clock at which word w was presented
  int mech_event = 0, mech_lost = 0, mech_gap = 0, mech_mode = 0, max_lat = 0;

  wfp_top dut (.*);

  always #1 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < NC; c++) begin
      if (rst_n && ev_valid[c]) begin got[c].push_back(ev[c]); got_cyc[c].push_back(cyc); end
      if (rst_n && ev_lost[c]) got_lost[c]++;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_segment(int l, int a, int b, int thr, int npulse);
    int v[NC][$];
    int len, at;
    wfp_ref rm[NC];
    len = 400 + npulse * (a + b + 400) + 600;
    len = ((len + 7) / 8) * 8;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < len + 8; i++) v[c].push_back($urandom_range(0, 8) - 4);
    at = 300;
    for (int p = 0; p < npulse; p++) begin
      int amp, fall, rise;
      amp  = $urandom_range(300, 1900);
      fall = $urandom_range(8, 24);
      rise = $urandom_range(30, 90);
      for (int c = 0; c < NC; c++) begin
        add_pulse(v[c], at + 3 * c, amp, fall, rise);
        if (p == 1) add_pulse(v[c], at + 3 * c + fall + b / 2, amp + 300, 6, 30);
      end
      at += a + b + 400;
    end
    for (int c = 0; c < NC; c++) begin
      while (v[c].size() > len) void'(v[c].pop_back());
      for (int i = 0; i < len; i++) begin
        if (v[c][i] > 2047) v[c][i] = 2047;
        if (v[c][i] < -2048) v[c][i] = -2048;
      end
      rm[c] = new(l, a, b, thr);
      rm[c].run(v[c]);
      got[c].delete(); got_cyc[c].delete(); got_lost[c] = 0;
    end
    drive_cyc.delete();
    rst_n = 1'b0; adc_tvalid = '0; adc_tdata = '0;
    cfg = '{sm_point: LPT_W'(l), pre_a: AB_W'(a), post_b: AB_W'(b), thr: THR_W'(thr)};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < len / 8; ) begin
      if ($urandom_range(0, 9) == 0) begin
        adc_tvalid = '0; mech_gap++;
      end else begin
        adc_tvalid = '1;
        for (int c = 0; c < NC; c++)
          for (int k = 0; k < 8; k++)
            adc_tdata[c][k*16 +: 16] = {RAW_W'(v[c][w*8 + k]), 4'($urandom)};
        drive_cyc.push_back(cyc);
        w++;
      end
      @(negedge clk);
    end
    adc_tvalid = '0;
    repeat (100) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (rm[c].n_ambiguous != 0) begin failures++; $display("stimulus has ambiguous peaks"); end
      checks++;
      if (got[c].size() != rm[c].evs.size()) begin
        failures++; $display("ch%0d l=%0d: %0d events, expected %0d", c, l, got[c].size(), rm[c].evs.size());
      end
      for (int i = 0; i < got[c].size() && i < rm[c].evs.size(); i++) begin
        int lat, lim;
        checks++;
        if (got[c][i].q !== rm[c].evs[i].q || got[c][i].g !== rm[c].evs[i].g ||
            got[c][i].t_start !== rm[c].evs[i].t_start || got[c][i].t_peak !== rm[c].evs[i].t_peak) begin
          failures++;
          $display("ch%0d l=%0d ev %0d: q %0d/%0d g %0d/%0d peak %0d/%0d", c, l, i,
                   got[c][i].q, rm[c].evs[i].q, got[c][i].g, rm[c].evs[i].g,
                   got[c][i].t_peak, rm[c].evs[i].t_peak);
        end
        // latency in ADC words that followed the word holding p+B-1
        lat = 0;
        for (int w = (rm[c].evs[i].t_peak + b - 1) / 8 + 1; w < drive_cyc.size(); w++)
          if (drive_cyc[w] < got_cyc[c][i]) lat++;
        lim = (a + 9 + 7) / 8;
        if (lat > max_lat) max_lat = lat;
        checks++;
        if (lat < lim || lat > lim + 4) begin
          failures++; $display("latency %0d words, expected %0d..%0d", lat, lim, lim + 4);
        end
      end
      checks++;
      if (got_lost[c] != rm[c].n_lost) begin
        failures++; $display("ch%0d: lost %0d expected %0d", c, got_lost[c], rm[c].n_lost);
      end
      mech_event += got[c].size();
      mech_lost += got_lost[c];
    end
    mech_mode++;
  endtask

  initial begin
    run_segment(9, 16, 40, 400, 8);
    run_segment(17, 24, 80, 800, 6);
    run_segment(1, 200, 150, 150, 4);
    $display("events=%0d lost=%0d gaps=%0d settings=%0d max_latency=%0d",
             mech_event, mech_lost, mech_gap, mech_mode, max_lat);
    if (mech_event == 0) begin failures++; $display("no event"); end
    if (mech_lost == 0)  begin failures++; $display("no dropped peak"); end
    if (mech_gap == 0)   begin failures++; $display("no stream gap"); end
    if (mech_mode < 3)   begin failures++; $display("settings not all run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
