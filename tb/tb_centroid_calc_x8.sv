// tb_centroid_calc_x8: self-checking test of the charge / centroid integrator.
//
// Streams random smoothed samples with their indices (random valid gaps)
// and raises peaks with random A, B and peak lane. The reference computes
// q = sum v_i and g = sum (n+1-i) v_i over i = 1..n, n = A+B, directly
// from the stored samples (modulo 2**32, like the hardware), and the result
// must appear exactly one clock after the word holding sample p+B-1. A second
// peak raised during a calculation must be flagged lost and change nothing.
module tb_centroid_calc_x8;
  import wfp_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic                         pk_valid;
  logic [IDX_W-1:0]             pk_idx;
  logic [AB_W-1:0]              pre_a, post_b;
  logic                         in_valid;
  logic [IDX_W-1:0]             in_idx;
  logic [LANES-1:0][SM_W-1:0]   in_s;
  logic                         ev_valid;
  wfp_event_t                   ev;
  logic                         busy;
  logic                         lost;

  int checks = 0, failures = 0;
  int smp[$];
  int n_ev = 0, n_lost = 0, n_one_word = 0;

  centroid_calc_x8 dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;            // next word to present
    int exp_p, exp_a, exp_b;
    int stop_word;
    logic armed;
    rst_n = 1'b0; pk_valid = 1'b0; pk_idx = '0; pre_a = '0; post_b = '0;
    in_valid = 1'b0; in_idx = '0; in_s = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    w = 0; armed = 1'b0; exp_p = 0; exp_a = 0; exp_b = 0; stop_word = -1;
    for (int ev_n = 0; ev_n < 300; ) begin
      logic vv, ev_due, want_pk;
      int r;
      // choose this cycle's inputs
      vv = ($urandom_range(0, 4) != 0);
      want_pk = 1'b0;
      pk_valid = 1'b0;
      if (!armed && $urandom_range(0, 3) == 0) begin
        exp_a = (ev_n % 10 == 0) ? 0 : $urandom_range(0, 255);
        exp_b = (ev_n % 10 == 0) ? 0 : $urandom_range(0, 255);
        if (ev_n % 17 == 5) begin exp_a = 2; exp_b = 3; end
        r = $urandom_range(0, 7);
        exp_p = (w + 1) * LANES + r + exp_a;
        pk_valid = 1'b1; pk_idx = IDX_W'(exp_p);
        pre_a = AB_W'(exp_a); post_b = AB_W'(exp_b);
        stop_word = (exp_p - exp_a + ((exp_a + exp_b == 0) ? 1 : exp_a + exp_b) - 1) / LANES;
        want_pk = 1'b1;
      end else if (armed && $urandom_range(0, 7) == 0) begin
        pk_valid = 1'b1; pk_idx = IDX_W'($urandom);   // must be ignored
      end
      in_valid = vv;
      in_idx = IDX_W'(w * LANES);
      for (int k = 0; k < LANES; k++) in_s[k] = SM_W'($urandom_range(0, 60000) - 30000);
      if (vv) for (int k = 0; k < LANES; k++) smp.push_back(int'(signed'(in_s[k])));
      ev_due = armed && vv && (w == stop_word);
      @(negedge clk);
      // lost flag: a peak while armed
      checks++;
      if (lost !== (armed && pk_valid)) begin failures++; $display("lost flag wrong"); end
      if (lost) n_lost++;
      checks++;
      if (ev_valid !== ev_due) begin
        failures++; $display("ev_valid %0b exp %0b at word %0d", ev_valid, ev_due, w);
      end
      if (ev_due) begin
        int q, g, n, s0;
        n = (exp_a + exp_b == 0) ? 1 : exp_a + exp_b; s0 = exp_p - exp_a;
        q = 0; g = 0;
        for (int i = 1; i <= n; i++) begin
          q += smp[s0 + i - 1];
          g += (n + 1 - i) * smp[s0 + i - 1];
        end
        checks++;
        if (ev.q !== q || ev.g !== g || ev.t_start !== IDX_W'(s0) || ev.t_peak !== IDX_W'(exp_p)) begin
          failures++;
          $display("event %0d A=%0d B=%0d: q %0d/%0d g %0d/%0d", ev_n, exp_a, exp_b, ev.q, q, ev.g, g);
        end
        if (n < 8 && (s0 / LANES) == stop_word) n_one_word++;
        armed = 1'b0;
        n_ev++; ev_n++;
      end
      if (want_pk) armed = 1'b1;
      if (vv) w++;
    end
    $display("events=%0d lost=%0d single_word=%0d", n_ev, n_lost, n_one_word);
    if (n_lost == 0 || n_one_word == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
