// tb_timing_master: checks the period, the first-message delay and the
// payload of the periodic timestamp broadcast, and that `enable` low stops
// messages and restarts the period when raised again.
`timescale 1ns/1ps
module tb_timing_master;
  import tfc_pkg::*;
  localparam int unsigned P = 10;
  logic        clk = 1'b0;
  logic        rst, enable;
  logic [63:0] time_i;
  logic        msg_valid;
  tfc_frame_t  msg;
  int checks = 0, failures = 0;
  int cyc, last_msg, n_msgs, enable_cycle;

  timing_master #(.PERIOD(P)) dut (.clk, .rst, .enable, .time_i, .msg_valid, .msg);

  always #12.5 clk = ~clk;

  // Time counter of the Master, as seen by the module.
  always_ff @(posedge clk) time_i <= rst ? 64'h0000_00F0_0000_0000 : time_i + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  // Sample in the middle of each cycle.
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (msg_valid) begin
      check(msg.kind == MSG_TIME, "message kind");
      check(msg.payload == time_i, "payload equals counter in the valid cycle");
      check(enable, "no message while disabled");
      if (last_msg >= 0) check(cyc - last_msg == P, "period");
      else               check(cyc - enable_cycle == P, "first message delay");
      last_msg = cyc;
      n_msgs++;
    end
  end

  initial begin
    // cyc numbers the cycles after reset from 1; a message is due P cycles
    // after the first enabled cycle.
    rst = 1'b1; enable = 1'b1; cyc = 0; last_msg = -1; n_msgs = 0; enable_cycle = 1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10 * P) @(posedge clk);
    @(negedge clk); #1;
    check(n_msgs == 10, "ten messages in ten periods");
    enable = 1'b0;
    repeat (3 * P) @(posedge clk);
    @(negedge clk); #1;
    check(n_msgs == 10, "none while disabled");
    enable = 1'b1;                    // this cycle is the first enabled one
    last_msg = -1;
    enable_cycle = cyc;
    repeat (5 * P + 2) @(posedge clk);
    @(negedge clk); #1;
    check(n_msgs == 15, "five messages after re-enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
