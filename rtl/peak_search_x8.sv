// peak_search_x8: peak finder on the first difference of the smoothed waveform.
//
// The pulses are negative, so the peak is the minimum of the smoothed
// waveform: the sample m where the first difference changes sign from
// negative to zero or positive, s[m]-s[m-1] < 0 and s[m+1]-s[m] >= 0
// (the zero crossing of the derivative). Eight candidates m = idx-1 .. idx+6
// are tested per clock; the last two samples of the previous word are kept so
// that candidates across the word boundary are seen. A candidate counts only if
// s[m] < -thr, which keeps noise wiggles on the baseline from firing; the
// threshold, the polarity and reporting the earliest hit of a word are this
// implementation's choices.
//
// Timing: pk_valid/pk_idx are registered, one clock after the word holding
// s[m+1] is presented, so the reported peak is at least one sample older
// than that word's first sample minus one.
module peak_search_x8
  import wfp_pkg::*;
#(
  parameter int unsigned N_LANES = LANES,
  parameter int unsigned S_W     = SM_W,
  parameter int unsigned T_W     = THR_W,
  parameter int unsigned IW      = IDX_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [IW-1:0]                in_idx,
  input  logic [N_LANES-1:0][S_W-1:0]  in_s,
  input  logic [T_W-1:0]               thr,
  output logic                         pk_valid,
  output logic [IW-1:0]                pk_idx
);

  // Samples of the previous word: [1] = last lane, [0] = the one before.
  // They start at zero, the baseline, so nothing fires across the reset.
  logic signed [S_W-1:0] prev [2];

  logic signed [S_W-1:0] e [N_LANES+2];  // e[j] = sample idx-2+j
  logic [N_LANES-1:0]    hit;
  logic                  any_hit;
  logic [IW-1:0]         hit_idx;
  logic signed [S_W:0]   neg_thr;

  assign neg_thr = -$signed({1'b0, S_W'(thr)});

  always_comb begin
    e[0] = prev[0];
    e[1] = prev[1];
    for (int k = 0; k < N_LANES; k++) e[k+2] = signed'(in_s[k]);
    for (int k = 0; k < N_LANES; k++) begin
      // candidate m = idx + k - 1 -> e[k+1]; neighbours e[k], e[k+2]
      hit[k] = (e[k+1] < e[k]) && (e[k+2] >= e[k+1]) &&
               ($signed({e[k+1][S_W-1], e[k+1]}) < neg_thr);
    end
    any_hit = |hit;
    hit_idx = '0;
    for (int k = N_LANES - 1; k >= 0; k--)
      if (hit[k]) hit_idx = in_idx + IW'(k) - IW'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev[0]  <= '0;
      prev[1]  <= '0;
      pk_valid <= 1'b0;
      pk_idx   <= '0;
    end else begin
      pk_valid <= in_valid && any_hit;
      if (in_valid) begin
        prev[0] <= signed'(in_s[N_LANES-2]);
        prev[1] <= signed'(in_s[N_LANES-1]);
        if (any_hit) pk_idx <= hit_idx;
      end
    end
  end

endmodule
