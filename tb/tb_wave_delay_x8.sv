// tb_wave_delay_x8: self-checking test of the programmable word delay.
//
// Writes words tagged with an increasing index (random lane data, random
// valid gaps) and, for several delay settings including 0, 1 and the full
// depth, checks that each output word equals the word written dly valid words
// before it, and that the output is held invalid until that many words have
// been written after reset.
module tb_wave_delay_x8;
  import wfp_pkg::*;

  localparam int unsigned DEPTH = DLY_DEPTH;
  localparam int unsigned D_W   = $clog2(DEPTH + 1);

  logic clk = 1'b0;
  logic rst_n;
  logic [D_W-1:0]               dly;
  logic                         in_valid;
  logic [IDX_W-1:0]             in_idx;
  logic [LANES-1:0][SM_W-1:0]   in_s;
  logic                         out_valid;
  logic [IDX_W-1:0]             out_idx;
  logic [LANES-1:0][SM_W-1:0]   out_s;

  int checks = 0, failures = 0;

  wave_delay_x8 dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ds[5] = '{0, 1, 5, DEPTH, 17};
    logic [LANES-1:0][SM_W-1:0] sent[$];
    for (int t = 0; t < 5; t++) begin
      int nw;
      nw = 0;
      sent.delete();
      rst_n = 1'b0; in_valid = 1'b0; in_idx = '0; in_s = '0; dly = D_W'(ds[t]);
      repeat (3) @(posedge clk);
      @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < 400; n++) begin
        logic vv;
        vv = ($urandom_range(0, 3) != 0);
        in_valid = vv;
        in_idx = IDX_W'(nw);
        for (int k = 0; k < LANES; k++) in_s[k] = SM_W'($urandom);
        @(negedge clk);
        if (vv) begin
          sent.push_back(in_s);
          checks++;
          if (out_valid !== (nw >= ds[t])) begin
            failures++; $display("dly %0d word %0d: valid %0b", ds[t], nw, out_valid);
          end else if (out_valid) begin
            checks++;
            if (out_idx !== IDX_W'(nw - ds[t]) || out_s !== sent[nw - ds[t]]) begin
              failures++; $display("dly %0d word %0d: got idx %0d", ds[t], nw, out_idx);
            end
          end
          nw++;
        end else begin
          checks++;
          if (out_valid) begin failures++; $display("valid without input"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
