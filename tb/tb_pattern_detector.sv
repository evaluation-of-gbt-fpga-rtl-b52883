// tb_pattern_detector: random words with the pattern inserted now and then
// (including back-to-back and near-miss words, and the pattern while
// `valid` is low); checks pulse position and length and the hit counter
// against a reference model every cycle.
`timescale 1ns/1ps
module tb_pattern_detector;
  import tfc_pkg::*;
  localparam logic [DATA_W-1:0] PAT = {MSG_USER, 8'h00, 64'h0123_4567_89AB_CDEF};
  localparam int L = 4;
  logic              clk = 1'b0;
  logic              rst, valid, pulse;
  logic [DATA_W-1:0] data;
  logic [15:0]       hits;
  int checks = 0, failures = 0;
  int remaining = 0, exp_hits = 0, n_pulses = 0;
  bit exp_pulse = 0;

  pattern_detector #(.PATTERN(PAT), .PULSE_LEN(L)) dut (.clk, .rst, .valid, .data, .pulse, .hits);

  always #12.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; valid = 0; data = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    repeat (3000) begin
      int r;
      r = $urandom_range(0, 19);
      valid = ($urandom_range(0, 9) != 0);
      if (r == 0)      data = PAT;
      else if (r == 1) data = PAT ^ (80'd1 << $urandom_range(0, DATA_W - 1));
      else             data = DATA_W'({$urandom, $urandom, $urandom});
      // reference model, updated with this cycle's input
      if (valid && data == PAT) begin
        remaining = L; exp_hits++; n_pulses++;
      end
      @(posedge clk); #1;
      exp_pulse = (remaining > 0);
      if (remaining > 0) remaining--;
      checks++;
      if (pulse != exp_pulse || hits != 16'(exp_hits)) begin
        failures++;
        $display("FAIL t=%0t pulse=%0d exp=%0d hits=%0d exp=%0d", $time, pulse, exp_pulse, hits, exp_hits);
      end
    end
    checks++;
    if (n_pulses < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
