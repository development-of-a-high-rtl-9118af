// smoothing_x8: moving-sum smoothing of 8 samples per clock.
//
// For every lane k of the incoming word (sample index i = idx + k) it forms
// s_i = v_i + v_{i-1} + ... + v_{i-l+1}, the sum of the last l samples, so
// that all 8 smoothed values of a word come out in the same clock. The window
// trails the sample, as in the worked l=17 example of the design, which uses
// the current word and parts of the two before it. The older samples sit in a
// history of H = ceil((MAX_L-1)/8) words; each lane adds the samples of
// a fixed-size window masked by d < l, so l can change at run time.
//
// The sum is not divided by l (a common factor cancels in the centroid);
// l = 0 acts as l = 1. History starts at zero after reset. These are
// this implementation's choices.
//
// Timing: one register stage; out_* follows in_* by one clock and advances
// only on in_valid.
module smoothing_x8
  import wfp_pkg::*;
#(
  parameter int unsigned N_LANES = LANES,
  parameter int unsigned IN_W    = RAW_W,
  parameter int unsigned L_W     = LPT_W,
  parameter int unsigned OUT_W   = IN_W + L_W,
  parameter int unsigned IW      = IDX_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [IW-1:0]                 in_idx,
  input  logic [N_LANES-1:0][IN_W-1:0]  in_s,
  input  logic [L_W-1:0]                l,
  output logic                          out_valid,
  output logic [IW-1:0]                 out_idx,
  output logic [N_LANES-1:0][OUT_W-1:0] out_s
);

  localparam int unsigned ML  = (1 << L_W) - 1;                   // longest window
  localparam int unsigned H   = (ML - 1 + N_LANES - 1) / N_LANES; // history words
  localparam int unsigned HN  = (H > 0 ? H : 1) * N_LANES;        // history samples

  // hist[j]: older samples, hist[HN-1] is the one just before lane 0.
  logic [HN-1:0][IN_W-1:0]      hist;
  logic [N_LANES-1:0][OUT_W-1:0] sum;
  logic [L_W-1:0]                l_eff;

  assign l_eff = (l == '0) ? L_W'(1) : l;

  // Sample at distance d before lane k: from this word or from the history.
  function automatic logic signed [IN_W-1:0] tap(
      input logic [HN-1:0][IN_W-1:0] h, input logic [N_LANES-1:0][IN_W-1:0] cur,
      input int k, input int d);
    int p;
    p = k - d;
    if (p >= 0) return cur[p];
    else        return h[HN + p];
  endfunction

  always_comb begin
    for (int k = 0; k < N_LANES; k++) begin
      sum[k] = '0;
      for (int d = 0; d < ML; d++)
        if (d < int'(l_eff))
          sum[k] = sum[k] + OUT_W'(signed'(tap(hist, in_s, k, d)));
    end
  end

  // History shift by one word on every valid word.
  if (HN > N_LANES) begin : g_hist_long
    always_ff @(posedge clk)
      if (!rst_n)        hist <= '0;
      else if (in_valid) hist <= {in_s, hist[HN-1:N_LANES]};
  end else begin : g_hist_short
    always_ff @(posedge clk)
      if (!rst_n)        hist <= '0;
      else if (in_valid) hist <= in_s;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_s     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx;
        out_s   <= sum;
      end
    end
  end

endmodule
