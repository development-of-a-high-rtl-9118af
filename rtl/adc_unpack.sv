// adc_unpack: input stage of one channel.
//
// Splits a 128-bit ADC stream word into LANES=8 signed 12-bit samples and
// tags the word with the running index of its first sample. Lane k occupies
// bits [16k+15:16k]; the 12-bit sample is the upper part [16k+15:16k+4] and
// the low 4 bits are unused, as in the 16-bit "data + null" lane format of
// the ADC. Lane 0 holds the oldest sample (this implementation's choice of
// ordering). The sample index counts up by 8 per valid word from 0 after
// reset and wraps at 2**IDX_W.
//
// Timing: one register stage; out_* is valid the clock after in_valid.
module adc_unpack
  import wfp_pkg::*;
#(
  parameter int unsigned N_LANES = LANES,
  parameter int unsigned IN_W    = RAW_W,
  parameter int unsigned IW      = IDX_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N_LANES*LANE_W-1:0]         in_data,
  input  logic                              in_valid,
  output logic                              out_valid,
  output logic [IW-1:0]                     out_idx,
  output logic [N_LANES-1:0][IN_W-1:0]      out_s
);

  logic [IW-1:0] idx_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_s     <= '0;
      idx_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= idx_q;
        idx_q   <= idx_q + IW'(N_LANES);
        for (int k = 0; k < N_LANES; k++)
          out_s[k] <= in_data[k*LANE_W + LANE_W - IN_W +: IN_W];
      end
    end
  end

endmodule
