// tb_adc_unpack: self-checking test of the ADC word unpacker.
//
// Drives random 128-bit words with random gaps in the valid signal and checks,
// one clock later, that every lane holds bits [15:4] of its 16-bit field and
// that the word index advances by 8 per valid word from 0.
module tb_adc_unpack;
  import wfp_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic [WORD_W-1:0]            in_data;
  logic                         in_valid;
  logic                         out_valid;
  logic [IDX_W-1:0]             out_idx;
  logic [LANES-1:0][RAW_W-1:0]  out_s;

  int checks = 0, failures = 0;

  adc_unpack dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORD_W-1:0] w;
    logic              v;
    int unsigned       exp_idx;
    rst_n = 1'b0; in_data = '0; in_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    exp_idx = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < 4; j++) w[j*32 +: 32] = $urandom;
      v = ($urandom_range(0, 3) != 0);
      in_data = w; in_valid = v;
      @(negedge clk);
      checks++;
      if (out_valid !== v) begin
        failures++; $display("valid mismatch at %0d", n);
      end
      if (v) begin
        for (int k = 0; k < LANES; k++) begin
          checks++;
          if (out_s[k] !== w[k*16+4 +: 12]) begin
            failures++; $display("lane %0d: got %h exp %h", k, out_s[k], w[k*16+4 +: 12]);
          end
        end
        checks++;
        if (out_idx !== exp_idx) begin
          failures++; $display("idx got %0d exp %0d", out_idx, exp_idx);
        end
        exp_idx += 8;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
