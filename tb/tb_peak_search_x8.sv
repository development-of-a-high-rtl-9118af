// tb_peak_search_x8: self-checking test of the derivative zero-crossing peak finder.
//
// Feeds a smoothed-looking stream: a noisy baseline that stays above -thr,
// negative pulses with their minimum at random lanes (including lanes 0 and
// 7, so the word boundary is crossed), flat-bottomed minima and pulses that
// stay above the threshold. A scalar reference scans the samples in order,
// marks every m with s[m]-s[m-1] < 0, s[m+1]-s[m] >= 0 and s[m] < -thr, and
// expects, for each word, the earliest mark whose s[m+1] lies in that word,
// reported one clock later.
module tb_peak_search_x8;
  import wfp_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic                         in_valid;
  logic [IDX_W-1:0]             in_idx;
  logic [LANES-1:0][SM_W-1:0]   in_s;
  logic [THR_W-1:0]             thr;
  logic                         pk_valid;
  logic [IDX_W-1:0]             pk_idx;

  int checks = 0, failures = 0;
  int s[$];
  int n_peaks = 0, n_boundary = 0;

  peak_search_x8 dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw;
    // Build the waveform: baseline noise within +-40, threshold 200.
    for (int p = 0; p < 60; p++) begin
      int gap, depth, fall, rise, flat;
      gap   = $urandom_range(10, 60);
      depth = (p % 5 == 4) ? 150 : $urandom_range(300, 5000);
      fall  = $urandom_range(3, 20);
      rise  = $urandom_range(3, 30);
      flat  = (p % 7 == 3) ? 2 : 0;
      for (int j = 0; j < gap; j++) s.push_back($urandom_range(0, 80) - 40);
      for (int j = 1; j <= fall; j++) s.push_back(-(depth * j) / fall);
      for (int j = 0; j < flat; j++) s.push_back(-depth);
      for (int j = rise - 1; j >= 0; j--) s.push_back(-(depth * j) / rise);
    end
    while (s.size() % LANES != 0) s.push_back(0);
    nw = s.size() / LANES;

    rst_n = 1'b0; in_valid = 1'b0; in_idx = '0; in_s = '0; thr = 16'd200;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < nw; w++) begin
      int exp_m;
      exp_m = -1;
      for (int k = 0; k < LANES; k++) begin
        int m, sp, sm, sn;
        m  = w * LANES + k - 1;
        sp = (m - 1 >= 0) ? s[m - 1] : 0;
        sm = (m >= 0) ? s[m] : 0;
        sn = s[m + 1];
        if (exp_m < 0 && sm < sp && sn >= sm && sm < -200) exp_m = m;
      end
      in_valid = 1'b1;
      in_idx = IDX_W'(w * LANES);
      for (int k = 0; k < LANES; k++) in_s[k] = SM_W'(s[w * LANES + k]);
      @(negedge clk);
      checks++;
      if (pk_valid !== (exp_m >= 0)) begin
        failures++; $display("word %0d: pk_valid %0b exp %0d", w, pk_valid, exp_m);
      end else if (exp_m >= 0) begin
        checks++;
        n_peaks++;
        if (exp_m % LANES == LANES - 1) n_boundary++;
        if (pk_idx !== IDX_W'(exp_m)) begin
          failures++; $display("word %0d: pk_idx %0d exp %0d", w, pk_idx, exp_m);
        end
      end
      // an idle clock now and then
      if (w % 9 == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
        checks++;
        if (pk_valid) begin failures++; $display("pk_valid without data"); end
      end
    end
    $display("peaks=%0d across_word=%0d", n_peaks, n_boundary);
    if (n_peaks < 40 || n_boundary == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
