// tb_smoothing_x8: self-checking test of the 8-lane moving-sum smoother.
//
// Streams random signed 12-bit samples (with random gaps in valid) through
// the smoother while the window l is changed between blocks of words, from 0
// (acts as 1) up to 63, including the l = 9 and l = 17 cases of the design.
// A scalar reference keeps every sample in order and forms each sum directly;
// each of the 8 outputs of a word is checked one clock after the word enters.
module tb_smoothing_x8;
  import wfp_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic                         in_valid;
  logic [IDX_W-1:0]             in_idx;
  logic [LANES-1:0][RAW_W-1:0]  in_s;
  logic [LPT_W-1:0]             l;
  logic                         out_valid;
  logic [IDX_W-1:0]             out_idx;
  logic [LANES-1:0][SM_W-1:0]   out_s;

  int checks = 0, failures = 0;
  int hist[$];            // every sample sent, oldest first
  int mech_l9 = 0, mech_l17 = 0, mech_l63 = 0, mech_l0 = 0;

  smoothing_x8 dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sum(int i, int ll);
    int s = 0;
    if (ll == 0) ll = 1;
    for (int d = 0; d < ll; d++)
      if (i - d >= 0) s += hist[i - d];
    return s;
  endfunction

  initial begin
    int  ls[7] = '{9, 17, 0, 1, 63, 8, 33};
    int  v;
    logic vv;
    int  nword = 0;
    rst_n = 1'b0; in_valid = 1'b0; in_idx = '0; in_s = '0; l = 6'd9;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 7; b++) begin
      l = LPT_W'(ls[b]);
      for (int n = 0; n < 120; n++) begin
        vv = ($urandom_range(0, 4) != 0);
        in_valid = vv;
        in_idx = IDX_W'(nword * 8);
        for (int k = 0; k < LANES; k++) begin
          v = $urandom_range(0, 4095) - 2048;
          in_s[k] = RAW_W'(v);
        end
        @(negedge clk);
        checks++;
        if (out_valid !== vv) begin failures++; $display("valid mismatch"); end
        if (vv) begin
          for (int k = 0; k < LANES; k++) hist.push_back(int'(signed'(in_s[k])));
          for (int k = 0; k < LANES; k++) begin
            int e;
            e = ref_sum(nword * 8 + k, ls[b]);
            checks++;
            if (int'(signed'(out_s[k])) != e) begin
              failures++;
              if (failures < 10) $display("l=%0d word %0d lane %0d: got %0d exp %0d",
                                          ls[b], nword, k, signed'(out_s[k]), e);
            end
          end
          checks++;
          if (out_idx !== IDX_W'(nword * 8)) failures++;
          case (ls[b]) 9: mech_l9++; 17: mech_l17++; 63: mech_l63++; 0: mech_l0++; default: ; endcase
          nword++;
        end
      end
    end
    $display("words l=9:%0d l=17:%0d l=63:%0d l=0:%0d", mech_l9, mech_l17, mech_l63, mech_l0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
