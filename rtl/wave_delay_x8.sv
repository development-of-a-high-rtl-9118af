// wave_delay_x8: run-time programmable delay of the 8-lane smoothed waveform.
//
// The delayed copy of the waveform lets the integrator start A samples
// before a peak that is only recognised after it has passed. Words (with
// their sample index) are written into a circular buffer of DEPTH entries;
// the output is the word written dly valid words earlier (dly = 0 passes
// the input through the output register). The output stays invalid until
// dly words have been written since reset, so no stale entry is read.
// Circular-buffer structure and the fill rule are this implementation's
// choices.
//
// Timing: out_* is registered; a word leaves dly+1 clocks after it entered
// when in_valid is continuous. dly must not exceed DEPTH and should be
// changed only while no calculation is running.
module wave_delay_x8
  import wfp_pkg::*;
#(
  parameter int unsigned N_LANES = LANES,
  parameter int unsigned S_W     = SM_W,
  parameter int unsigned DEPTH   = DLY_DEPTH,
  parameter int unsigned D_W     = $clog2(DEPTH + 1),
  parameter int unsigned IW      = IDX_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [D_W-1:0]               dly,
  input  logic                         in_valid,
  input  logic [IW-1:0]                in_idx,
  input  logic [N_LANES-1:0][S_W-1:0]  in_s,
  output logic                         out_valid,
  output logic [IW-1:0]                out_idx,
  output logic [N_LANES-1:0][S_W-1:0]  out_s
);

  localparam int unsigned A_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic [IW-1:0]                idx;
    logic [N_LANES-1:0][S_W-1:0]  s;
  } word_t;

  word_t          mem [DEPTH];
  logic [A_W-1:0] wp;
  logic [A_W-1:0] rp;
  logic [D_W-1:0] fill;     // words written since reset, saturating at DEPTH
  word_t          rd;

  // Read pointer: dly entries behind the write pointer, modulo DEPTH.
  always_comb begin
    if (int'(wp) >= int'(dly)) rp = A_W'(int'(wp) - int'(dly));
    else                       rp = A_W'(int'(wp) + int'(DEPTH) - int'(dly));
    rd = mem[rp];
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= '{idx: in_idx, s: in_s};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp        <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_s     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        wp <= (int'(wp) == int'(DEPTH) - 1) ? '0 : wp + 1'b1;
        if (int'(fill) < int'(DEPTH)) fill <= fill + 1'b1;
        out_valid <= (fill >= dly);
        if (dly == '0) begin
          out_idx <= in_idx;
          out_s   <= in_s;
        end else begin
          out_idx <= rd.idx;
          out_s   <= rd.s;
        end
      end
    end
  end

endmodule
