// timing_master: periodic broadcast of the Master's timestamp.
//
// Every PERIOD cycles of the 40 MHz system clock, while `enable` is high,
// the module captures the momentary value of the Master's time counter and
// presents it as a timing message (kind MSG_TIME, 64-bit payload) for one
// cycle with `msg_valid` high. The payload is the counter value during the
// cycle in which `msg_valid` is high, i.e. the value sampled at the
// capturing edge plus one, so every fixed delay after this point can be
// compensated with a constant at the Endpoint.
//
// Interface: `time_i` from a time_counter in the same clock domain;
// `msg_valid`/`msg` towards the Tx frame multiplexer, which must accept a
// timing message in the cycle it is offered (it has top priority there).
// Timing: the first message appears PERIOD cycles after reset or after
// `enable` rises; then one every PERIOD cycles.
//
// Periodic capture and transmission follow the design description; the
// period and the message layout are this design's choices.
module timing_master
  import tfc_pkg::*;
#(
  parameter int unsigned PERIOD = 40_000   // 1 ms at 40 MHz
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic [TS_W-1:0]   time_i,
  output logic              msg_valid,
  output tfc_frame_t        msg
);

  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] phase;
  logic          fire;

  assign fire = enable && (phase == CW'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (rst || !enable) phase <= '0;
    else if (fire)      phase <= '0;
    else                phase <= phase + CW'(1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      msg_valid <= 1'b0;
      msg       <= IDLE_FRAME;
    end else begin
      msg_valid <= fire;
      if (fire) msg <= make_frame(MSG_TIME, time_i + TS_W'(1));
    end
  end

endmodule
