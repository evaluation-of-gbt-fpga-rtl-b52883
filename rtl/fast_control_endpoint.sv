// fast_control_endpoint: command receiver and status sender of an Endpoint.
//
// Downstream, the block decodes fast control command messages from the
// received GBT words. Every command is passed on for one cycle on
// `cmd_valid`/`cmd`; the throttling commands also set or clear the
// `throttle` level that the Endpoint's readout logic obeys. Upstream, the
// block sends the Endpoint's status to the Master as a status message: at
// once when the 32-bit board status `status_i` changes, and otherwise every
// STATUS_PERIOD cycles as a refresh. The message also carries the
// synchronisation flag and adjustment count of timing_endpoint.
//
// Timing: a command on `rx_data` in cycle r gives `cmd_valid` and the new
// `throttle` in cycle r+1. A change of `status_i` in cycle c puts a status
// message on `up_tx_data` in cycle c+1; `up_tx_data` is the idle word
// otherwise. `throttle` keeps its value while the link is down and is
// cleared by reset.
//
// That an Endpoint receives control commands such as throttling decisions
// and reports its status over a low-latency path follows the design
// description; the message formats, the send-on-change policy and the
// refresh period are this design's choices.
module fast_control_endpoint
  import tfc_pkg::*;
#(
  parameter int unsigned STATUS_PERIOD = 4_000   // 100 us at 40 MHz
) (
  input  logic              clk,
  input  logic              rst,
  // downstream
  input  logic              rx_ready,
  input  tfc_frame_t        rx_data,
  output logic              throttle,
  output logic              cmd_valid,
  output logic [15:0]       cmd,
  // upstream
  input  logic [31:0]       status_i,
  input  logic              synced,
  input  logic [15:0]       adjust_count,
  output tfc_frame_t        up_tx_data
);

  localparam int unsigned CW = (STATUS_PERIOD > 1) ? $clog2(STATUS_PERIOD) : 1;

  logic          is_cmd;
  logic [31:0]   status_q;
  logic [CW-1:0] phase;
  logic          send;

  assign is_cmd = rx_ready && (rx_data.kind == MSG_CMD);

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_valid <= 1'b0;
      cmd       <= '0;
      throttle  <= 1'b0;
    end else begin
      cmd_valid <= is_cmd;
      if (is_cmd) begin
        cmd <= rx_data.payload[15:0];
        if (rx_data.payload[15:0] == CMD_THROTTLE_ON)  throttle <= 1'b1;
        if (rx_data.payload[15:0] == CMD_THROTTLE_OFF) throttle <= 1'b0;
      end
    end
  end

  assign send = (status_i != status_q) || (phase == CW'(STATUS_PERIOD - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      status_q   <= '0;
      phase      <= '0;
      up_tx_data <= IDLE_FRAME;
    end else begin
      if (send) begin
        status_q   <= status_i;
        phase      <= '0;
        up_tx_data <= make_frame(MSG_STATUS, {status_i, adjust_count, 15'd0, synced});
      end else begin
        phase      <= phase + CW'(1);
        up_tx_data <= IDLE_FRAME;
      end
    end
  end

endmodule
