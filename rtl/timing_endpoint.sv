// timing_endpoint: aligns an Endpoint's local time with the Master.
//
// The module watches the received GBT data words. When a timing message
// arrives it compares the local time counter with the received timestamp
// plus `latency_comp`, a constant that accounts for the fixed, known delay
// from the Master's timing module to this point. The first timing message
// after the link becomes ready loads the local counter (initial
// synchronisation, `synced` rises). Later messages only check the counter;
// should one disagree, the counter is reloaded and `adjust` pulses. While
// `rx_ready` is low the received words are ignored and `synced` is low; the
// local counter keeps running.
//
// Timing: a timing message on `rx_data` in cycle r means the local counter
// should read payload + latency_comp in cycle r; a load writes
// payload + latency_comp + 1 at the end of cycle r, so the counter is right
// from cycle r+1. `load`/`adjust` pulse in cycle r+1.
//
// Detecting the timestamp and adjusting the local counter at link
// initialisation follow the design description; re-adjusting on a later
// mismatch, the compensation input and the status outputs are this
// design's choices.
module timing_endpoint
  import tfc_pkg::*;
(
  input  logic              clk,           // 40 MHz frame clock recovered from the link
  input  logic              rst,
  input  logic              rx_ready,      // link up and words valid
  input  tfc_frame_t        rx_data,
  input  logic [15:0]       latency_comp,  // fixed link delay, in clock cycles
  output logic [TS_W-1:0]   local_time,
  output logic              synced,
  output logic              load,          // pulse: counter was (re)loaded
  output logic              adjust,        // pulse: reload after a mismatch
  output logic [15:0]       adjust_count
);

  logic              is_time;
  logic [TS_W-1:0]   expected;
  logic              mismatch;
  logic              do_load;

  assign is_time  = rx_ready && (rx_data.kind == MSG_TIME);
  assign expected = rx_data.payload + TS_W'(latency_comp);
  assign mismatch = (local_time != expected);
  assign do_load  = is_time && (!synced || mismatch);

  time_counter #(.W(TS_W)) u_local (
    .clk        (clk),
    .rst        (rst),
    .load       (do_load),
    .load_value (expected + TS_W'(1)),
    .time_o     (local_time)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      synced       <= 1'b0;
      load         <= 1'b0;
      adjust       <= 1'b0;
      adjust_count <= '0;
    end else begin
      load   <= do_load;
      adjust <= do_load && synced;
      if (!rx_ready)    synced <= 1'b0;
      else if (is_time) synced <= 1'b1;
      if (do_load && synced) adjust_count <= adjust_count + 16'd1;
    end
  end

endmodule
