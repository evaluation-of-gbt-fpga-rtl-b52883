// tb_fast_control_endpoint: command decoding (throttle on/off, other codes,
// words ignored while the link is down) with directed checks, and the
// upstream status stream (send on change, periodic refresh, message
// contents) against a cycle-by-cycle reference model under random status
// changes.
`timescale 1ns/1ps
module tb_fast_control_endpoint;
  import tfc_pkg::*;
  localparam int unsigned P = 20;
  logic        clk = 1'b0;
  logic        rst, rx_ready, throttle, cmd_valid, synced;
  tfc_frame_t  rx_data, up_tx_data, expected;
  logic [15:0] cmd, adjust_count;
  logic [31:0] status_i, mq;
  int          mphase;
  int checks = 0, failures = 0, n_status = 0, n_change = 0, n_refresh = 0;

  fast_control_endpoint #(.STATUS_PERIOD(P)) dut (
    .clk, .rst, .rx_ready, .rx_data, .throttle, .cmd_valid, .cmd,
    .status_i, .synced, .adjust_count, .up_tx_data);

  always #12.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // Reference model of the upstream stream, on the values before each edge.
  always @(posedge clk) begin
    if (rst) begin
      mq = '0; mphase = 0; expected = IDLE_FRAME;
    end else if (status_i != mq || mphase == P - 1) begin
      if (status_i != mq) n_change++; else n_refresh++;
      expected = make_frame(MSG_STATUS, {status_i, adjust_count, 15'd0, synced});
      mq = status_i; mphase = 0;
    end else begin
      expected = IDLE_FRAME; mphase++;
    end
  end

  always @(negedge clk) if (!rst) begin
    check(up_tx_data == expected, "upstream word");
    if (up_tx_data.kind == MSG_STATUS) n_status++;
  end

  task automatic send(msg_kind_e k, logic [63:0] payload);
    rx_data = make_frame(k, payload);
    @(posedge clk); #1;
    rx_data = IDLE_FRAME;
  endtask

  initial begin
    rst = 1; rx_ready = 0; rx_data = IDLE_FRAME; status_i = 0; synced = 0; adjust_count = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    check(!throttle && !cmd_valid, "reset state");
    // Link down: command ignored.
    send(MSG_CMD, 64'(CMD_THROTTLE_ON));
    check(!cmd_valid && !throttle, "ignored while link down");
    rx_ready = 1;
    send(MSG_CMD, 64'(CMD_THROTTLE_ON));
    check(cmd_valid && cmd == CMD_THROTTLE_ON && throttle, "throttle on");
    @(posedge clk); #1;
    check(!cmd_valid && throttle, "strobe one cycle, level held");
    send(MSG_CMD, 64'h0000_0000_0000_4242);
    check(cmd_valid && cmd == 16'h4242 && throttle, "other command passes, throttle kept");
    send(MSG_USER, 64'(CMD_THROTTLE_OFF));
    check(!cmd_valid && throttle, "non-command word ignored");
    send(MSG_CMD, 64'(CMD_THROTTLE_OFF));
    check(cmd_valid && cmd == CMD_THROTTLE_OFF && !throttle, "throttle off");
    // Upstream: random status changes, some quiet stretches for refreshes.
    repeat (1500) begin
      if ($urandom_range(0, 29) == 0) status_i = $urandom;
      if ($urandom_range(0, 99) == 0) begin synced = ~synced; adjust_count = 16'($urandom); end
      @(posedge clk); #1;
    end
    check(n_change > 20 && n_refresh > 20 && n_status == n_change + n_refresh, "changes and refreshes sent");
    $display("status messages %0d (on change %0d, refresh %0d)", n_status, n_change, n_refresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
