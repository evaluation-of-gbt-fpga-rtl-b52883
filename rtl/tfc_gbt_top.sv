// tfc_gbt_top: TFC Master (sender) and Endpoint (receiver) gateware around
// a GBT link.
//
// The Master side keeps the 64-bit common time, broadcasts it periodically
// (timing_master), issues fast control commands (fast_control_master) and,
// on request from a Wishbone host (wb_master_regs), sends a test word;
// tx_frame_mux merges these into the 80-bit word handed to the GBT link core
// every 40 MHz frame. The Endpoint side runs on the clock recovered from the
// link, takes the received 80-bit words, aligns its own time counter with
// the received timestamps (timing_endpoint) and obeys throttling commands
// (fast_control_endpoint), which also sends its status back upstream. The
// Master's automatic throttling closes the loop: an Endpoint that reports
// busy is throttled without the host taking part. A pattern_detector on
// each side pulses when the pre-defined test word passes its Tx or Rx port,
// so an oscilloscope can measure the link latency as the skew between the
// two pulses.
//
// The GBT link cores, transceivers, optics and clock circuits sit between
// `gbt_tx_data` and `gbt_rx_data` (downstream) and between `gbt_up_tx_data`
// and `gbt_up_rx_data` (upstream); they are not part of this module. The
// link core delivers received words in the receiving node's frame clock.
// The two sides have separate clocks and resets and share no signal: in a
// real system they are on different boards.
//
// Timing: a word registered by tx_frame_mux is on `gbt_tx_data` the cycle
// after its source offered it. With a link delay of L frame clocks, setting
// `latency_comp` = L + 1 makes `endpoint_time` equal `master_time` (given
// equal clocks); any other constant leaves a fixed offset, which is
// acceptable as long as it does not change.
module tfc_gbt_top
  import tfc_pkg::*;
#(
  parameter int unsigned       TIME_PERIOD = 40_000,
  parameter logic [DATA_W-1:0] PATTERN     = {MSG_USER, 8'h00, 64'hC0FF_EE00_DEAD_BEEF},
  parameter int unsigned       PULSE_LEN   = 8,
  parameter int unsigned       STATUS_PERIOD = 4_000
) (
  // ---- Master (sender) node
  input  logic              clk_m,
  input  logic              rst_m,
  input  logic              wb_cyc,
  input  logic              wb_stb,
  input  logic              wb_we,
  input  logic [4:0]        wb_adr,
  input  logic [31:0]       wb_dat_w,
  input  logic [3:0]        wb_sel,
  output logic [31:0]       wb_dat_r,
  output logic              wb_ack,
  output logic [DATA_W-1:0] gbt_tx_data,
  output logic [TS_W-1:0]   master_time,
  output logic              tx_pulse,
  output logic [15:0]       tx_hits,
  input  logic              gbt_up_rx_ready,
  input  logic [DATA_W-1:0] gbt_up_rx_data,
  output logic              master_throttle_state,
  // ---- Endpoint (receiver) node
  input  logic              clk_e,
  input  logic              rst_e,
  input  logic              gbt_rx_ready,
  input  logic [DATA_W-1:0] gbt_rx_data,
  input  logic [15:0]       latency_comp,
  output logic [TS_W-1:0]   endpoint_time,
  output logic              endpoint_synced,
  output logic              endpoint_adjust,
  output logic [15:0]       endpoint_adjust_count,
  output logic              endpoint_load,
  input  logic [31:0]       endpoint_status,
  output logic              endpoint_throttle,
  output logic              endpoint_cmd_valid,
  output logic [15:0]       endpoint_cmd,
  output logic [DATA_W-1:0] gbt_up_tx_data,
  output logic              rx_pulse,
  output logic [15:0]       rx_hits
);

  // ---------------- Master
  logic       timing_enable;
  logic       time_valid;
  tfc_frame_t time_msg;
  logic       user_valid, user_ready;
  tfc_frame_t user_msg;
  tfc_frame_t tx_word;
  logic       auto_throttle, host_cmd_valid, host_cmd_pending;
  logic [15:0] host_cmd, ep_status_count;
  logic [63:0] ep_status;
  logic       cmd_valid, cmd_ready;
  tfc_frame_t cmd_msg;

  time_counter #(.W(TS_W)) u_master_time (
    .clk(clk_m), .rst(rst_m), .load(1'b0), .load_value('0), .time_o(master_time)
  );

  timing_master #(.PERIOD(TIME_PERIOD)) u_timing_master (
    .clk(clk_m), .rst(rst_m), .enable(timing_enable), .time_i(master_time),
    .msg_valid(time_valid), .msg(time_msg)
  );

  wb_master_regs u_regs (
    .clk(clk_m), .rst(rst_m),
    .cyc_i(wb_cyc), .stb_i(wb_stb), .we_i(wb_we), .adr_i(wb_adr),
    .dat_i(wb_dat_w), .sel_i(wb_sel), .dat_o(wb_dat_r), .ack_o(wb_ack),
    .timing_enable(timing_enable),
    .user_valid(user_valid), .user_msg(user_msg), .user_ready(user_ready),
    .auto_throttle(auto_throttle), .host_cmd_valid(host_cmd_valid), .host_cmd(host_cmd),
    .host_cmd_pending(host_cmd_pending), .throttle_state(master_throttle_state),
    .ep_status(ep_status), .ep_status_count(ep_status_count)
  );

  fast_control_master u_fc_master (
    .clk(clk_m), .rst(rst_m),
    .up_rx_ready(gbt_up_rx_ready), .up_rx_data(tfc_frame_t'(gbt_up_rx_data)),
    .auto_throttle(auto_throttle), .host_cmd_valid(host_cmd_valid), .host_cmd(host_cmd),
    .host_cmd_pending(host_cmd_pending), .last_status(ep_status), .status_count(ep_status_count),
    .throttle_state(master_throttle_state),
    .cmd_valid(cmd_valid), .cmd_msg(cmd_msg), .cmd_ready(cmd_ready)
  );

  tx_frame_mux u_tx_mux (
    .clk(clk_m), .rst(rst_m),
    .time_valid(time_valid), .time_msg(time_msg),
    .cmd_valid(cmd_valid), .cmd_msg(cmd_msg), .cmd_ready(cmd_ready),
    .user_valid(user_valid), .user_msg(user_msg), .user_ready(user_ready),
    .tx_data(tx_word)
  );

  assign gbt_tx_data = tx_word;

  pattern_detector #(.PATTERN(PATTERN), .PULSE_LEN(PULSE_LEN)) u_tx_detect (
    .clk(clk_m), .rst(rst_m), .valid(1'b1), .data(tx_word),
    .pulse(tx_pulse), .hits(tx_hits)
  );

  // ---------------- Endpoint
  timing_endpoint u_timing_endpoint (
    .clk(clk_e), .rst(rst_e), .rx_ready(gbt_rx_ready), .rx_data(tfc_frame_t'(gbt_rx_data)),
    .latency_comp(latency_comp),
    .local_time(endpoint_time), .synced(endpoint_synced),
    .load(endpoint_load), .adjust(endpoint_adjust), .adjust_count(endpoint_adjust_count)
  );

  tfc_frame_t up_word;

  fast_control_endpoint #(.STATUS_PERIOD(STATUS_PERIOD)) u_fc_endpoint (
    .clk(clk_e), .rst(rst_e), .rx_ready(gbt_rx_ready), .rx_data(tfc_frame_t'(gbt_rx_data)),
    .throttle(endpoint_throttle), .cmd_valid(endpoint_cmd_valid), .cmd(endpoint_cmd),
    .status_i(endpoint_status), .synced(endpoint_synced), .adjust_count(endpoint_adjust_count),
    .up_tx_data(up_word)
  );

  assign gbt_up_tx_data = up_word;

  pattern_detector #(.PATTERN(PATTERN), .PULSE_LEN(PULSE_LEN)) u_rx_detect (
    .clk(clk_e), .rst(rst_e), .valid(gbt_rx_ready), .data(gbt_rx_data),
    .pulse(rx_pulse), .hits(rx_hits)
  );

endmodule
