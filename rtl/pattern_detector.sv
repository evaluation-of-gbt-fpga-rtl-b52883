// pattern_detector: measurement pulse on a pre-defined data word.
//
// Used on the sender's Tx port and on the receiver's Rx port to produce
// the two pulses whose skew an oscilloscope measures as link latency.
// Whenever `valid` is high and `data` equals PATTERN, the output `pulse`
// goes high for PULSE_LEN cycles (a match during a pulse restarts it) and
// `hits` counts the match. Because both ends use the same detector, its own
// delay cancels out of the measured skew.
//
// Timing: a match in cycle t drives `pulse` high in cycles t+1 ..
// t+PULSE_LEN; `pulse` comes straight from a flip-flop.
//
// Pulses from pattern detectors on Tx and Rx follow the design
// description; the pattern, the pulse length and the hit counter are this
// design's choices.
module pattern_detector
  import tfc_pkg::*;
#(
  parameter logic [DATA_W-1:0] PATTERN   = {MSG_USER, 8'h00, 64'hC0FF_EE00_DEAD_BEEF},
  parameter int unsigned       PULSE_LEN = 8     // 200 ns at 40 MHz
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid,
  input  logic [DATA_W-1:0] data,
  output logic              pulse,
  output logic [15:0]       hits
);

  localparam int unsigned CW = $clog2(PULSE_LEN + 1);

  logic [CW-1:0] remaining;
  logic          match;

  assign match = valid && (data == PATTERN);

  always_ff @(posedge clk) begin
    if (rst) begin
      remaining <= '0;
      pulse     <= 1'b0;
      hits      <= '0;
    end else begin
      if (match) begin
        remaining <= CW'(PULSE_LEN - 1);
        pulse     <= 1'b1;
        hits      <= hits + 16'd1;
      end else if (remaining != '0) begin
        remaining <= remaining - CW'(1);
        pulse     <= 1'b1;
      end else begin
        pulse     <= 1'b0;
      end
    end
  end

endmodule
