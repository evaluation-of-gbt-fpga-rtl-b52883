// fast_control_master: status collection and command issue in the Master.
//
// Upstream status messages from the Endpoint are captured: the last status
// payload and a count of received messages are kept for the host. When
// automatic throttling is enabled, the busy bit of each status message is
// compared with the throttle state last requested; a difference queues a
// throttle-on or throttle-off command at once, without the host, which is
// the low-latency control path. The host can queue any command code as
// well; a host command with a throttle code also updates the throttle
// state. Queued commands are offered to the Tx multiplexer as command
// messages (valid/ready); an automatic decision goes before a host command,
// and a newer automatic decision replaces one not yet sent.
//
// Timing: a status message on `up_rx_data` in cycle s that calls for a
// change offers the command in cycle s+1; the multiplexer adds one cycle
// unless a timing message goes first. With link latency L each way, busy
// at the Endpoint becomes throttle at the Endpoint 2L + 4 cycles later.
//
// Collecting status and issuing throttling commands in the Master follow
// the design description; the decision rule, the queueing and the
// priorities are this design's choices.
module fast_control_master
  import tfc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // upstream from the Endpoint (already in this clock domain)
  input  logic              up_rx_ready,
  input  tfc_frame_t        up_rx_data,
  // host side
  input  logic              auto_throttle,
  input  logic              host_cmd_valid,
  input  logic [15:0]       host_cmd,
  output logic              host_cmd_pending,
  output logic [63:0]       last_status,
  output logic [15:0]       status_count,
  output logic              throttle_state,
  // to the Tx multiplexer
  output logic              cmd_valid,
  output tfc_frame_t        cmd_msg,
  input  logic              cmd_ready
);

  logic        is_status, busy, decide;
  logic        auto_pending;
  logic [15:0] auto_code, host_code;

  assign is_status = up_rx_ready && (up_rx_data.kind == MSG_STATUS);
  assign busy      = up_rx_data.payload[32 + STATUS_BUSY_BIT];
  assign decide    = is_status && auto_throttle && (busy != throttle_state);

  assign cmd_valid = auto_pending || host_cmd_pending;
  assign cmd_msg   = make_frame(MSG_CMD, {48'd0, auto_pending ? auto_code : host_code});

  always_ff @(posedge clk) begin
    if (rst) begin
      last_status      <= '0;
      status_count     <= '0;
      throttle_state   <= 1'b0;
      auto_pending     <= 1'b0;
      auto_code        <= CMD_NOP;
      host_cmd_pending <= 1'b0;
      host_code        <= CMD_NOP;
    end else begin
      if (is_status) begin
        last_status  <= up_rx_data.payload;
        status_count <= status_count + 16'd1;
      end
      // Offered command taken by the multiplexer.
      if (cmd_valid && cmd_ready) begin
        if (auto_pending) auto_pending     <= 1'b0;
        else              host_cmd_pending <= 1'b0;
      end
      if (host_cmd_valid) begin
        host_cmd_pending <= 1'b1;
        host_code        <= host_cmd;
        if (host_cmd == CMD_THROTTLE_ON)  throttle_state <= 1'b1;
        if (host_cmd == CMD_THROTTLE_OFF) throttle_state <= 1'b0;
      end
      if (decide) begin
        auto_pending   <= 1'b1;
        auto_code      <= busy ? CMD_THROTTLE_ON : CMD_THROTTLE_OFF;
        throttle_state <= busy;
      end
    end
  end

endmodule
