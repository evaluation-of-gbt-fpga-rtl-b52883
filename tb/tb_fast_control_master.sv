// tb_fast_control_master: status capture, the automatic throttle decision
// (on a busy change only, one cycle after the status message), command
// hand-over with a stalled multiplexer, a newer decision replacing an
// unsent one, host commands and their order behind automatic ones, and
// automatic throttling switched off.
`timescale 1ns/1ps
module tb_fast_control_master;
  import tfc_pkg::*;
  logic        clk = 1'b0;
  logic        rst, up_rx_ready, auto_throttle, host_cmd_valid, host_cmd_pending;
  logic        throttle_state, cmd_valid, cmd_ready;
  tfc_frame_t  up_rx_data, cmd_msg;
  logic [15:0] host_cmd, status_count;
  logic [63:0] last_status;
  int checks = 0, failures = 0;

  fast_control_master dut (
    .clk, .rst, .up_rx_ready, .up_rx_data, .auto_throttle, .host_cmd_valid, .host_cmd,
    .host_cmd_pending, .last_status, .status_count, .throttle_state,
    .cmd_valid, .cmd_msg, .cmd_ready);

  always #12.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  function automatic logic [63:0] status(bit busy, logic [30:0] other = 0);
    return {other, busy, 32'h0000_1234};
  endfunction

  task automatic up(logic [63:0] payload, msg_kind_e k = MSG_STATUS);
    up_rx_data = make_frame(k, payload);
    @(posedge clk); #1;
    up_rx_data = IDLE_FRAME;
  endtask

  task automatic expect_cmd(cmd_code_e code, string what);
    check(cmd_valid && cmd_msg.kind == MSG_CMD && cmd_msg.payload == 64'(code), what);
  endtask

  task automatic take();        // multiplexer accepts the offered command
    cmd_ready = 1;
    @(posedge clk); #1;
    cmd_ready = 0;
  endtask

  initial begin
    rst = 1; up_rx_ready = 0; auto_throttle = 1; host_cmd_valid = 0; host_cmd = 0;
    cmd_ready = 0; up_rx_data = IDLE_FRAME;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    // Link down: ignored.
    up(status(1));
    check(status_count == 0 && !cmd_valid, "ignored while link down");
    up_rx_ready = 1;
    // Not busy, state off: captured, no command.
    up(status(0, 31'h55));
    check(status_count == 1 && last_status == status(0, 31'h55) && !cmd_valid, "status captured");
    up(status(0, 31'h1), MSG_USER);
    check(status_count == 1, "other kinds not captured");
    // Busy: throttle on one cycle later, held while the mux is stalled.
    up(status(1));
    expect_cmd(CMD_THROTTLE_ON, "throttle on offered");
    check(throttle_state, "state on");
    repeat (3) @(posedge clk); #1;
    expect_cmd(CMD_THROTTLE_ON, "held while not accepted");
    take();
    check(!cmd_valid, "accepted");
    // Busy again: no new command.
    up(status(1));
    check(!cmd_valid, "no repeat while state matches");
    // Busy clears then returns before the first command is taken: latest wins.
    up(status(0));
    expect_cmd(CMD_THROTTLE_OFF, "throttle off offered");
    up(status(1));
    expect_cmd(CMD_THROTTLE_ON, "newer decision replaces unsent one");
    take();
    check(!cmd_valid && throttle_state, "state on after replacement");
    // Host command alone.
    host_cmd = 16'h0777; host_cmd_valid = 1;
    @(posedge clk); #1 host_cmd_valid = 0;
    check(host_cmd_pending && cmd_valid && cmd_msg.payload == 64'h777, "host command offered");
    take();
    check(!host_cmd_pending && !cmd_valid, "host command taken");
    // Host and automatic together: automatic first.
    host_cmd = 16'h0123; host_cmd_valid = 1;
    up_rx_data = make_frame(MSG_STATUS, status(0));
    @(posedge clk); #1;
    host_cmd_valid = 0; up_rx_data = IDLE_FRAME;
    expect_cmd(CMD_THROTTLE_OFF, "automatic goes first");
    take();
    check(cmd_valid && cmd_msg.payload == 64'h123 && host_cmd_pending, "then the host command");
    take();
    check(!cmd_valid, "both taken");
    // Host throttle command updates the state.
    host_cmd = CMD_THROTTLE_ON; host_cmd_valid = 1;
    @(posedge clk); #1 host_cmd_valid = 0;
    check(throttle_state, "host throttle on sets the state");
    take();
    // Automatic throttling off: no decisions.
    auto_throttle = 0;
    up(status(0));
    check(!cmd_valid && throttle_state, "no decision with auto off");
    check(status_count == 7, "status count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
