// tb_tx_frame_mux: random traffic on all three inputs; checks the fixed
// priority (timing, then commands, then test words), the accept strobes,
// the idle word and the one-cycle register delay against a reference model.
`timescale 1ns/1ps
module tb_tx_frame_mux;
  import tfc_pkg::*;
  logic       clk = 1'b0;
  logic       rst, time_valid, cmd_valid, cmd_ready, user_valid, user_ready;
  tfc_frame_t time_msg, cmd_msg, user_msg, tx_data, expected;
  int checks = 0, failures = 0;
  int n_time = 0, n_cmd = 0, n_user = 0, n_blocked = 0, n_cmd_blocked = 0, n_idle = 0;

  tx_frame_mux dut (.clk, .rst, .time_valid, .time_msg, .cmd_valid, .cmd_msg, .cmd_ready,
                    .user_valid, .user_msg, .user_ready, .tx_data);

  always #12.5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; time_valid = 0; cmd_valid = 0; user_valid = 0;
    time_msg = IDLE_FRAME; cmd_msg = IDLE_FRAME; user_msg = IDLE_FRAME;
    repeat (2) @(posedge clk);
    #1 check(tx_data == IDLE_FRAME, "idle after reset");
    rst = 1'b0;
    repeat (2000) begin
      time_valid = ($urandom_range(0, 3) == 0);
      cmd_valid  = ($urandom_range(0, 2) == 0);
      user_valid = ($urandom_range(0, 1) == 0);
      time_msg   = make_frame(MSG_TIME, {$urandom, $urandom});
      cmd_msg    = make_frame(MSG_CMD, {48'd0, 16'($urandom)});
      user_msg   = make_frame(MSG_USER, {$urandom, $urandom});
      #5;
      check(cmd_ready == (cmd_valid && !time_valid), "cmd_ready");
      check(user_ready == (user_valid && !time_valid && !cmd_valid), "user_ready");
      if (time_valid) begin
        expected = time_msg; n_time++;
        if (user_valid) n_blocked++;
        if (cmd_valid) n_cmd_blocked++;
      end
      else if (cmd_valid) begin expected = cmd_msg; n_cmd++; if (user_valid) n_blocked++; end
      else if (user_valid) begin expected = user_msg; n_user++; end
      else begin expected = IDLE_FRAME; n_idle++; end
      @(posedge clk); #1;
      check(tx_data == expected, "tx word one cycle later");
    end
    check(n_time > 0 && n_cmd > 0 && n_user > 0 && n_blocked > 0 && n_cmd_blocked > 0 && n_idle > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
