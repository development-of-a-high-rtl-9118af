// wfp_ref_pkg: sample-by-sample reference model of one processing channel,
// used by the channel and top-level testbenches.
//
// It works on the plain sample sequence, without any 8-lane packing: moving
// sum of l samples, peak = first m with s[m]-s[m-1] < 0, s[m+1]-s[m] >= 0
// and s[m] < -thr (only the earliest per 8-sample word, the word being the
// one that holds s[m+1]), and for an accepted peak q = sum v_i and
// g = sum (n+1-i) v_i over the n = A+B smoothed samples m-A .. m+B-1. A peak
// is dropped (lost) if it lies within B-1 samples after the last accepted one.
// The stimulus generator must keep other peaks well apart; the model flags
// a peak that is neither clearly dropped nor clearly accepted as ambiguous.
// It also builds the test waveforms: pulses with a fast fall and a slower,
// curved rise on a noisy baseline.
package wfp_ref_pkg;
  import wfp_pkg::*;

  typedef struct {
    int q;
    int g;
    int t_start;
    int t_peak;
  } ref_ev_t;

  class wfp_ref;
    int l, a, b, thr;
    int margin;          // samples after p+B within which acceptance is unsure
    ref_ev_t evs[$];
    int n_lost;
    int n_ambiguous;

    function new(int l, int a, int b, int thr);
      this.l = (l == 0) ? 1 : l;
      this.a = a; this.b = b; this.thr = thr;
      this.margin = a + 8 * 8 + 64;
    endfunction

    // v: raw 12-bit samples, signed.
    function void run(const ref int v[$]);
      int s[$];
      int last_acc;
      int last_word;
      s.delete(); evs.delete(); n_lost = 0; n_ambiguous = 0;
      for (int i = 0; i < v.size(); i++) begin
        int acc = 0;
        for (int d = 0; d < l; d++) if (i - d >= 0) acc += v[i - d];
        s.push_back(acc);
      end
      last_acc = -1000000; last_word = -1;
      for (int m = 0; m + 1 < s.size(); m++) begin
        int sp = (m >= 1) ? s[m - 1] : 0;
        int w = (m + 1) / 8;
        if (s[m] < sp && s[m + 1] >= s[m] && s[m] < -thr && w != last_word) begin
          last_word = w;
          if (m <= last_acc + b - 1) n_lost++;
          else begin
            if (m <= last_acc + a + b + margin) n_ambiguous++;
            if (m - a >= 0 && m + b <= s.size()) begin
              ref_ev_t e;
              int n = (a + b == 0) ? 1 : a + b;
              e.q = 0; e.g = 0; e.t_start = m - a; e.t_peak = m;
              for (int i = 1; i <= n; i++) begin
                e.q += s[m - a + i - 1];
                e.g += (n + 1 - i) * s[m - a + i - 1];
              end
              evs.push_back(e);
            end
            last_acc = m;
          end
        end
      end
    endfunction
  endclass

  // Append one pulse: fall over `fall` samples to -amp, curved rise over `rise`.
  function automatic void add_pulse(ref int v[$], input int at, input int amp,
                                    input int fall, input int rise);
    for (int j = 1; j <= fall; j++) v[at + j - 1] += -(amp * j) / fall;
    for (int j = 1; j <= rise; j++)
      v[at + fall + j - 1] += -(amp * (rise - j) * (rise - j)) / (rise * rise);
  endfunction

endpackage
