// tb_tfc_gbt_top: end-to-end test of the Master and Endpoint gateware at
// their default parameters, joined by a fixed-latency link model.
//
// The test programs the test word over Wishbone, lets the Master broadcast
// its time, and checks that:
//  - timing messages leave every TIME_PERIOD cycles and carry the Master time;
//  - the Endpoint synchronises on the first timestamp after link-up and then
//    reads the same time as the Master in every cycle (latency_comp = L + 1);
//  - a corrupted timestamp makes the Endpoint adjust, and the next good one
//    adjusts it back;
//  - after a receiver restart (reset and link loss) it resynchronises to the
//    same time;
//  - every test word produces one Tx and one Rx pulse, L cycles apart, before
//    and after the restart, including a word held back one cycle by a timing
//    message;
//  - a word other than the pattern produces no pulse;
//  - with the broadcast disabled no timing message is sent;
//  - the Endpoint's status reaches the Master (on change and as a refresh);
//  - an Endpoint reporting busy is throttled by the Master's automatic
//    decision 2L + 4 cycles later (one more if a timing message goes first),
//    and released when it reports not busy;
//  - host commands, including throttle commands with the automatic decision
//    switched off, reach the Endpoint.
// Each of these events is counted, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_tfc_gbt_top;
  import tfc_pkg::*;
  localparam int unsigned P   = 40_000;   // TIME_PERIOD default of the top
  localparam int unsigned LAT = 13;       // link latency of the model

  logic              clk = 1'b0;
  logic              rst_m, rst_e;
  logic              wb_cyc, wb_stb, wb_we, wb_ack;
  logic [4:0]        wb_adr;
  logic [3:0]        wb_sel;
  logic [31:0]       wb_dat_w, wb_dat_r;
  logic [DATA_W-1:0] gbt_tx_data, gbt_rx_data;
  logic [63:0]       master_time, endpoint_time;
  logic              tx_pulse, rx_pulse, gbt_rx_ready;
  logic [15:0]       tx_hits, rx_hits, endpoint_adjust_count;
  logic              endpoint_synced, endpoint_adjust, endpoint_load;
  logic [DATA_W-1:0] gbt_up_tx_data, gbt_up_rx_data;
  logic              gbt_up_rx_ready, master_throttle_state;
  logic              endpoint_throttle, endpoint_cmd_valid;
  logic [15:0]       endpoint_cmd;
  logic [31:0]       endpoint_status;
  logic              link_up, corrupt_time;

  int checks = 0, failures = 0;
  longint cyc = 0;

  tfc_gbt_top dut (
    .clk_m(clk), .rst_m, .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_dat_w, .wb_sel,
    .wb_dat_r, .wb_ack, .gbt_tx_data, .master_time, .tx_pulse, .tx_hits,
    .gbt_up_rx_ready, .gbt_up_rx_data, .master_throttle_state,
    .clk_e(clk), .rst_e, .gbt_rx_ready, .gbt_rx_data, .latency_comp(16'(LAT + 1)),
    .endpoint_time, .endpoint_synced, .endpoint_adjust, .endpoint_adjust_count,
    .endpoint_load, .endpoint_status, .endpoint_throttle, .endpoint_cmd_valid, .endpoint_cmd,
    .gbt_up_tx_data, .rx_pulse, .rx_hits
  );

  gbt_link_model #(.LATENCY(LAT)) u_link (
    .clk, .link_up, .corrupt_time, .tx_data(gbt_tx_data),
    .rx_data(gbt_rx_data), .rx_ready(gbt_rx_ready)
  );

  gbt_link_model #(.LATENCY(LAT)) u_uplink (
    .clk, .link_up, .corrupt_time(1'b0), .tx_data(gbt_up_tx_data),
    .rx_data(gbt_up_rx_data), .rx_ready(gbt_up_rx_ready)
  );

  always #12.5 clk = ~clk;

  initial begin
    repeat (40 * P) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  // ---------------- monitors (sample in mid-cycle)
  int     n_time_msgs = 0, n_initial_sync = 0, n_adjust = 0, n_resync = 0;
  int     n_held_back = 0, n_skews = 0, n_time_equal = 0, n_disabled_cycles = 0;
  longint last_time_msg = -1, tx_rise = -1;
  bit     prev_tx_pulse = 0, prev_rx_pulse = 0, timing_on = 1, seen_sync = 0, auto_on = 1;
  int     n_up_status = 0, n_ep_cmds = 0, n_throttle_on = 0, n_throttle_off = 0, n_auto_exact = 0;
  longint busy_change = -1;
  bit     prev_throttle = 0;
  logic [15:0] last_ep_cmd;
  tfc_frame_t txw;
  msg_kind_e  prev_kind = MSG_IDLE;
  longint     send_mark = -1;

  always @(negedge clk) if (!rst_m) begin
    cyc++;
    txw = tfc_frame_t'(gbt_tx_data);
    if (txw.kind == MSG_TIME) begin
      n_time_msgs++;
      check(txw.payload == master_time - 64'd1, "timestamp is the Master time of the cycle before");
      check(timing_on, "no timing message while disabled");
      if (last_time_msg >= 0) check(cyc - last_time_msg == longint'(P), "broadcast period");
      last_time_msg = cyc;
    end
    if (!timing_on) n_disabled_cycles++;
    // A test word reaches the Tx port in the cycle the SEND write ends, or
    // one cycle later if a timing message took that cycle.
    if (txw.kind == MSG_USER) begin
      check(send_mark >= 0 && (cyc == send_mark || (cyc == send_mark + 1 && prev_kind == MSG_TIME)),
            "test word sent at once unless a timing message goes first");
      if (cyc == send_mark + 1) n_held_back++;
      send_mark = -1;
    end
    prev_kind = txw.kind;
    if (tx_pulse && !prev_tx_pulse) tx_rise = cyc;
    if (rx_pulse && !prev_rx_pulse) begin
      check(tx_rise >= 0 && cyc - tx_rise == longint'(LAT), "Tx-to-Rx pulse skew equals the link latency");
      n_skews++;
    end
    prev_tx_pulse = tx_pulse; prev_rx_pulse = rx_pulse;
    if (gbt_up_tx_data[DATA_W-1 -: 8] == MSG_STATUS) n_up_status++;
    if (endpoint_cmd_valid) begin n_ep_cmds++; last_ep_cmd = endpoint_cmd; end
    if (endpoint_throttle != prev_throttle) begin
      if (endpoint_throttle) n_throttle_on++; else n_throttle_off++;
      if (busy_change >= 0) begin
        check(cyc - busy_change == 2 * LAT + 4 || cyc - busy_change == 2 * LAT + 5,
              $sformatf("busy-to-throttle latency %0d", cyc - busy_change));
        if (cyc - busy_change == 2 * LAT + 4) n_auto_exact++;
        busy_change = -1;
      end
    end
    prev_throttle = endpoint_throttle;
    if (!rst_e) begin
      if (endpoint_load && !endpoint_adjust) begin
        if (seen_sync) n_resync++; else n_initial_sync++;
        seen_sync = 1;
      end
      if (endpoint_adjust) n_adjust++;
      if (endpoint_synced && endpoint_adjust_count[0] == 1'b0) begin
        checks++;
        n_time_equal++;
        if (endpoint_time != master_time) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: Endpoint time %0d, Master time %0d", cyc, endpoint_time, master_time);
        end
      end
    end
  end

  // ---------------- Wishbone master
  task automatic wb(bit we, logic [4:0] adr, logic [31:0] wdat, output logic [31:0] rdat);
    int edges = 0;
    wb_cyc = 1; wb_stb = 1; wb_we = we; wb_adr = adr; wb_dat_w = wdat; wb_sel = 4'hF;
    do begin @(posedge clk); edges++; end while (!wb_ack && edges < 10);
    check(wb_ack, "Wishbone acknowledge");
    rdat = wb_dat_r;
    #1;
    wb_cyc = 0; wb_stb = 0; wb_we = 0;
  endtask

  task automatic wr(logic [4:0] adr, logic [31:0] d);
    logic [31:0] unused;
    wb(1, adr, d, unused);
  endtask

  task automatic wait_time_msg();
    do @(negedge clk); while (gbt_tx_data[DATA_W-1 -: 8] != MSG_TIME);
  endtask

  // Send the test word and wait until its pulses have been seen.
  task automatic send_word();
    wr(5'h0, {29'd0, auto_on, 1'b1, timing_on});
    send_mark = cyc + 1;              // number of the current cycle
    repeat (LAT + 20) @(posedge clk);
    #1;
  endtask

  int k;
  int hits_before;
  logic [31:0] r;

  initial begin
    rst_m = 1; rst_e = 1; link_up = 0; corrupt_time = 0;
    wb_cyc = 0; wb_stb = 0; wb_we = 0; wb_adr = 0; wb_dat_w = 0; wb_sel = 0; endpoint_status = 0;
    repeat (4) @(posedge clk); #1;
    rst_m = 0; rst_e = 0;
    repeat (10) @(posedge clk); #1;
    link_up = 1;
    wr(5'h4, 32'hDEAD_BEEF);
    wr(5'h8, 32'hC0FF_EE00);
    check(!endpoint_synced, "not synchronised before the first broadcast");

    // Initial synchronisation at the first broadcast.
    wait_time_msg();
    repeat (LAT + 3) @(posedge clk); #1;
    check(endpoint_synced && endpoint_time == master_time, "synchronised after the first broadcast");

    // Test words at several offsets to the next broadcast, so that one of
    // them meets a timing message at the multiplexer.
    for (k = 0; k < 6; k++) begin
      wait_time_msg();
      repeat (P - 4 + k) @(posedge clk); #1;
      send_word();
    end
    check(tx_hits == 6 && rx_hits == 6, "six words, six pulses at each end");

    // A word that is not the pattern: no pulse.
    wr(5'h4, 32'h0000_0001);
    hits_before = int'(tx_hits);
    send_word();
    check(int'(tx_hits) == hits_before && int'(rx_hits) == hits_before, "other words do not trigger");
    wr(5'h4, 32'hDEAD_BEEF);
    wb(0, 5'hC, '0, r);
    check(r == 32'd7, "sent counter");

    // Corrupted timestamp: adjust away and back.
    @(posedge clk); #1 corrupt_time = 1;
    @(posedge clk); #1 corrupt_time = 0;
    wait_time_msg();
    repeat (LAT + 3) @(posedge clk); #1;
    check(endpoint_adjust_count == 1 && endpoint_time != master_time, "corrupted timestamp adjusted to");
    wait_time_msg();
    repeat (LAT + 3) @(posedge clk); #1;
    check(endpoint_adjust_count == 2 && endpoint_time == master_time, "good timestamp adjusts back");

    // Broadcast disabled for two periods.
    timing_on = 0;
    auto_on = 0;
    wr(5'h0, 32'h0);
    repeat (2 * P) @(posedge clk); #1;
    timing_on = 1; auto_on = 1;
    wr(5'h0, 32'h5);
    last_time_msg = -1;

    // Receiver restart: link loss and reset, then resynchronisation.
    link_up = 0;
    rst_e = 1;
    repeat (5) @(posedge clk); #1;
    rst_e = 0;
    check(!endpoint_synced && endpoint_time != master_time, "receiver restarted");
    repeat (100) @(posedge clk); #1;
    link_up = 1;
    wait_time_msg();
    repeat (LAT + 3) @(posedge clk); #1;
    check(endpoint_synced && endpoint_time == master_time, "resynchronised after restart");
    send_word();
    send_word();
    check(tx_hits == 8 && rx_hits == 2, "pulses after restart, Rx counter restarted");

    // Fast control: busy -> automatic throttle, and release.
    for (k = 0; k < 3; k++) begin
      endpoint_status = 32'h0000_0A01;       // busy
      busy_change = cyc + 1;                 // number of the current cycle
      repeat (2 * LAT + 10) @(posedge clk); #1;
      check(endpoint_throttle && master_throttle_state, "throttled while busy");
      endpoint_status = 32'h0000_0A00;       // not busy
      busy_change = cyc + 1;
      repeat (2 * LAT + 10) @(posedge clk); #1;
      check(!endpoint_throttle && !master_throttle_state, "released when not busy");
      repeat (k * 7) @(posedge clk); #1;
    end
    wb(0, 5'h14, '0, r);
    check(r == {endpoint_adjust_count, 15'd0, 1'b1}, "Endpoint status word at the Master, low half");
    wb(0, 5'h18, '0, r);
    check(r == 32'h0000_0A00, "Endpoint status word at the Master, high half");
    // Status refresh: quiet for two refresh periods, the count still grows.
    wb(0, 5'h1C, '0, r);
    hits_before = int'(r[15:0]);
    repeat (2 * 4_000 + 10) @(posedge clk); #1;
    wb(0, 5'h1C, '0, r);
    check(int'(r[15:0]) >= hits_before + 2, "status refreshes received");
    // Host commands with the automatic decision off.
    auto_on = 0;
    wr(5'h0, 32'h1);
    endpoint_status = 32'h1;                 // busy, but no automatic throttle
    repeat (2 * LAT + 10) @(posedge clk); #1;
    check(!endpoint_throttle, "no automatic throttle when disabled");
    wr(5'h10, 32'h0000_0042);
    repeat (LAT + 5) @(posedge clk); #1;
    check(last_ep_cmd == 16'h0042, "host command delivered");
    wr(5'h10, 32'(CMD_THROTTLE_ON));
    repeat (LAT + 5) @(posedge clk); #1;
    check(endpoint_throttle && master_throttle_state, "host throttle on");
    wr(5'h10, 32'(CMD_THROTTLE_OFF));
    repeat (LAT + 5) @(posedge clk); #1;
    check(!endpoint_throttle, "host throttle off");
    endpoint_status = 32'h0;

    // Every mechanism must have happened.
    check(n_time_msgs >= 10, "timing broadcasts");
    check(n_initial_sync == 1, "initial synchronisation");
    check(n_adjust == 2, "adjusts");
    check(n_resync == 1, "resynchronisation");
    check(n_held_back >= 1, "test word held back by a timing message");
    check(n_skews == 8, "latency measurements");
    check(n_disabled_cycles > 0, "broadcast disabled");
    check(n_time_equal > 5 * P, "cycles with equal time");
    check(n_up_status > 10, "status messages upstream");
    check(n_throttle_on == 4 && n_throttle_off == 4, "throttle on and off");
    check(n_auto_exact >= 1, "automatic throttle at the minimum latency");
    check(n_ep_cmds == 9, "commands at the Endpoint");
    $display("time messages %0d, initial syncs %0d, adjusts %0d, resyncs %0d, held back %0d, skews %0d, disabled cycles %0d, equal-time cycles %0d",
             n_time_msgs, n_initial_sync, n_adjust, n_resync, n_held_back, n_skews, n_disabled_cycles, n_time_equal);
    $display("status messages %0d, Endpoint commands %0d, throttle on %0d off %0d, automatic at minimum latency %0d",
             n_up_status, n_ep_cmds, n_throttle_on, n_throttle_off, n_auto_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
