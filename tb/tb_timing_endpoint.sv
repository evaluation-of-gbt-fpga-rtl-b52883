// tb_timing_endpoint: drives received words built from a reference time
// and checks initial synchronisation on the first timestamp after link-up,
// that the local time then tracks the reference every cycle, that a wrong
// timestamp forces a reload (adjust), that other message kinds and words
// received while the link is down are ignored, and that link loss clears
// `synced` and the next timestamp resynchronises.
`timescale 1ns/1ps
module tb_timing_endpoint;
  import tfc_pkg::*;
  localparam logic [15:0] COMP = 16'd21;
  logic        clk = 1'b0;
  logic        rst, rx_ready;
  tfc_frame_t  rx_data;
  logic [63:0] local_time, ref_time;
  logic        synced, load, adjust;
  logic [15:0] adjust_count;
  int checks = 0, failures = 0;
  bit track;                           // local time must equal ref_time + offset
  logic [63:0] offset;

  timing_endpoint dut (.clk, .rst, .rx_ready, .rx_data, .latency_comp(COMP),
                       .local_time, .synced, .load, .adjust, .adjust_count);

  always #12.5 clk = ~clk;
  always @(posedge clk) ref_time <= ref_time + 1;

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

  always @(negedge clk) if (track) check(local_time == ref_time + offset, "local time tracks reference");

  // Put one word on the receiver port for one cycle (sent just after a
  // rising edge, so it is sampled at the next one).
  task automatic send(msg_kind_e k, logic [63:0] payload);
    rx_data = make_frame(k, payload);
    @(posedge clk); #1;
    rx_data = IDLE_FRAME;
  endtask

  // A correct timestamp: the reference time this cycle, less the link delay.
  task automatic send_time(logic [63:0] err = 0);
    send(MSG_TIME, ref_time - 64'(COMP) + err);
  endtask

  initial begin
    ref_time = 64'h0123_4567_89AB_0000;
    rst = 1'b1; rx_ready = 1'b0; rx_data = IDLE_FRAME; track = 0; offset = 0;
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    // Link down: timestamps are ignored.
    send_time();
    repeat (5) @(posedge clk); #1;
    check(!synced && !load, "ignored while link down");
    // Link up, user and idle words first: no synchronisation.
    rx_ready = 1'b1;
    send(MSG_USER, ref_time);
    repeat (3) @(posedge clk); #1;
    check(!synced, "user word does not synchronise");
    // First timestamp: load.
    send_time();
    check(synced && load && !adjust, "initial load");
    check(local_time == ref_time, "local time right in the next cycle");
    track = 1;
    repeat (50) @(posedge clk); #1;
    // Consistent timestamps: no reload.
    repeat (5) begin
      send_time();
      check(!load && !adjust, "consistent timestamp: no reload");
      repeat (20) @(posedge clk); #1;
    end
    check(adjust_count == 0, "no adjusts yet");
    // A timestamp that is off by 7: reload and adjust.
    track = 0;
    send_time(64'd7);
    check(load && adjust && adjust_count == 1, "adjust on mismatch");
    offset = 7; track = 1;
    repeat (30) @(posedge clk); #1;
    // A correct one again pulls the counter back.
    track = 0;
    send_time();
    check(adjust && adjust_count == 2, "adjust back");
    offset = 0; track = 1;
    repeat (30) @(posedge clk); #1;
    // Link loss: synced drops, counter runs on.
    rx_ready = 1'b0;
    @(posedge clk); #1;
    check(!synced, "synced cleared on link loss");
    repeat (10) @(posedge clk); #1;
    rx_ready = 1'b1;
    track = 0;
    send_time(64'd100);
    check(synced && load && !adjust && adjust_count == 2, "resync after link loss is a load, not an adjust");
    offset = 100; track = 1;
    repeat (20) @(posedge clk); #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
