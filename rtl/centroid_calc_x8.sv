// centroid_calc_x8: charge integration and centroid numerator, 8 samples per clock.
//
// When the peak search reports a peak at sample p, the calculation range is
// set to the n = A+B samples p-A .. p+B-1: A samples before the peak and B
// from the peak on, A and B set at run time (n = A+B follows the design;
// where the peak sample falls is this implementation's reading; A+B = 0
// acts as n = 1).
// The delayed smoothed waveform then streams through, and the samples inside
// the range are folded in with the recurrence of the design,
//     q_i = q_{i-1} + v_i        (charge, the denominator)
//     g_i = g_{i-1} + q_i        (the centroid numerator)
// starting from q = g = 0 with i = 1 at sample p-A. The recurrence replaces
// the multiplications of sum(i*v_i): over the range it gives
// g_n = n*v_1 + (n-1)*v_2 + ... + v_n, so sum(i*v_i) = (n+1)*q_n - g_n and the
// centroid G = sum(i*v_i)/q_n is formed in software. Each clock applies the
// recurrence up to eight times in a chain, once per lane in range; lanes are
// picked by their sample index, so the integrator needs no exact delay, only
// one long enough that sample p-A has not yet passed when the peak arrives.
//
// Range membership is tested modulo 2**IDX_W, so the wrapping sample index is
// harmless. A peak that arrives while a calculation runs is dropped and
// reported on 'lost' (this implementation's choice). Accumulators are ACC_W
// bits and wrap.
//
// Timing: ev_valid pulses for one clock, registered, in the clock after the
// word holding the last sample, p+B-1, has been accumulated; busy is high from the clock
// after the peak until then.
module centroid_calc_x8
  import wfp_pkg::*;
#(
  parameter int unsigned N_LANES = LANES,
  parameter int unsigned S_W     = SM_W,
  parameter int unsigned A_W     = AB_W,
  parameter int unsigned IW      = IDX_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pk_valid,
  input  logic [IW-1:0]                pk_idx,
  input  logic [A_W-1:0]               pre_a,
  input  logic [A_W-1:0]               post_b,
  input  logic                         in_valid,
  input  logic [IW-1:0]                in_idx,
  input  logic [N_LANES-1:0][S_W-1:0]  in_s,
  output logic                         ev_valid,
  output wfp_event_t                   ev,
  output logic                         busy,
  output logic                         lost
);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_t;

  state_t                  state;
  logic [IW-1:0]           t_start, t_peak;
  logic [IW-1:0]           last_off;     // offset of the last sample, n-1
  logic signed [ACC_W-1:0] q_acc, g_acc;
  logic signed [ACC_W-1:0] q_nxt, g_nxt;
  logic                    done;

  // Fold the lanes of this word that lie in the range into q and g.
  always_comb begin
    logic [IW-1:0] off;
    q_nxt = q_acc;
    g_nxt = g_acc;
    done  = 1'b0;
    for (int k = 0; k < N_LANES; k++) begin
      off = in_idx + IW'(k) - t_start;
      if (off <= last_off) begin
        q_nxt = q_nxt + ACC_W'(signed'(in_s[k]));
        g_nxt = g_nxt + q_nxt;
      end
      if (off == last_off) done = 1'b1;
    end
  end

  assign busy = (state == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      t_start  <= '0;
      t_peak   <= '0;
      last_off <= '0;
      q_acc    <= '0;
      g_acc    <= '0;
      ev_valid <= 1'b0;
      ev       <= '0;
      lost     <= 1'b0;
    end else begin
      ev_valid <= 1'b0;
      lost     <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (pk_valid) begin
            t_start  <= pk_idx - IW'(pre_a);
            t_peak   <= pk_idx;
            last_off <= (pre_a == '0 && post_b == '0) ? '0
                                                       : IW'(pre_a) + IW'(post_b) - IW'(1);
            q_acc    <= '0;
            g_acc    <= '0;
            state    <= S_RUN;
          end
        end
        S_RUN: begin
          if (pk_valid) lost <= 1'b1;
          if (in_valid) begin
            q_acc <= q_nxt;
            g_acc <= g_nxt;
            if (done) begin
              ev_valid   <= 1'b1;
              ev.q       <= q_nxt;
              ev.g       <= g_nxt;
              ev.t_start <= t_start;
              ev.t_peak  <= t_peak;
              state      <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A peak must not be reported while the previous result is being written.
  property p_ev_one_cycle;
    @(posedge clk) disable iff (!rst_n) ev_valid |=> !ev_valid;
  endproperty
  a_ev_one_cycle: assert property (p_ev_one_cycle);

endmodule
