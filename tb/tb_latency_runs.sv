// tb_latency_runs: the link latency measurement procedure, simulated.
//
// Ten runs of 1000 samples each. Before every run both nodes are reset and
// the link is taken down and brought back after a random delay, as a power
// cycle with reprogramming would do. In each run the test waits for the
// Endpoint to synchronise, then takes 1000 samples: the test word is sent
// through the Wishbone register at a random moment and the skew between
// the rising edges of the Tx and Rx detector pulses is measured in clock
// cycles. Because the link model has a fixed latency, the gateware's own
// contribution must leave every sample, in every run, equal to the link
// latency: zero cycle-level variation in a run and from reset to reset.
// The Endpoint time must equal the Master time throughout each run.
`timescale 1ns/1ps
module tb_latency_runs;
  import tfc_pkg::*;
  localparam int unsigned RUNS    = 10;
  localparam int unsigned SAMPLES = 1000;
  localparam int unsigned LAT     = 13;

  logic              clk = 1'b0;
  logic              rst;
  logic              wb_cyc, wb_stb, wb_we, wb_ack;
  logic [4:0]        wb_adr;
  logic [3:0]        wb_sel;
  logic [31:0]       wb_dat_w, wb_dat_r;
  logic [DATA_W-1:0] gbt_tx_data, gbt_rx_data;
  logic [63:0]       master_time, endpoint_time;
  logic              tx_pulse, rx_pulse, gbt_rx_ready, link_up;
  logic [15:0]       tx_hits, rx_hits, endpoint_adjust_count;
  logic              endpoint_synced, endpoint_adjust, endpoint_load;
  logic [DATA_W-1:0] gbt_up_tx_data, gbt_up_rx_data;
  logic              gbt_up_rx_ready, master_throttle_state;
  logic              endpoint_throttle, endpoint_cmd_valid;
  logic [15:0]       endpoint_cmd;
  logic [31:0]       endpoint_status;

  int checks = 0, failures = 0;
  longint cyc = 0, tx_rise = -1;
  int n_samples = 0, run_min, run_max, n_time_checks = 0;
  bit prev_tx = 0, prev_rx = 0;

  tfc_gbt_top dut (
    .clk_m(clk), .rst_m(rst), .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_dat_w, .wb_sel,
    .wb_dat_r, .wb_ack, .gbt_tx_data, .master_time, .tx_pulse, .tx_hits,
    .gbt_up_rx_ready, .gbt_up_rx_data, .master_throttle_state,
    .clk_e(clk), .rst_e(rst), .gbt_rx_ready, .gbt_rx_data, .latency_comp(16'(LAT + 1)),
    .endpoint_time, .endpoint_synced, .endpoint_adjust, .endpoint_adjust_count,
    .endpoint_load, .endpoint_status, .endpoint_throttle, .endpoint_cmd_valid, .endpoint_cmd,
    .gbt_up_tx_data, .rx_pulse, .rx_hits
  );

  gbt_link_model #(.LATENCY(LAT)) u_link (
    .clk, .link_up, .corrupt_time(1'b0), .tx_data(gbt_tx_data),
    .rx_data(gbt_rx_data), .rx_ready(gbt_rx_ready)
  );

  gbt_link_model #(.LATENCY(LAT)) u_uplink (
    .clk, .link_up, .corrupt_time(1'b0), .tx_data(gbt_up_tx_data),
    .rx_data(gbt_up_rx_data), .rx_ready(gbt_up_rx_ready)
  );

  always #12.5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  always @(negedge clk) if (!rst) begin
    cyc++;
    if (tx_pulse && !prev_tx) tx_rise = cyc;
    if (rx_pulse && !prev_rx) begin
      int skew;
      skew = int'(cyc - tx_rise);
      if (skew < run_min) run_min = skew;
      if (skew > run_max) run_max = skew;
      check(skew == LAT, "skew equals link latency");
      n_samples++;
    end
    prev_tx = tx_pulse; prev_rx = rx_pulse;
    if (endpoint_synced) begin
      n_time_checks++;
      if (endpoint_time != master_time) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: time differs", cyc);
      end
    end
  end

  task automatic wr(logic [4:0] adr, logic [31:0] d);
    int edges = 0;
    wb_cyc = 1; wb_stb = 1; wb_we = 1; wb_adr = adr; wb_dat_w = d; wb_sel = 4'hF;
    do begin @(posedge clk); edges++; end while (!wb_ack && edges < 10);
    #1;
    wb_cyc = 0; wb_stb = 0; wb_we = 0;
  endtask

  initial begin
    wb_cyc = 0; wb_stb = 0; wb_we = 0; wb_adr = 0; wb_dat_w = 0; wb_sel = 0; endpoint_status = 0;
    for (int run = 0; run < RUNS; run++) begin
      int first;
      rst = 1; link_up = 0;
      repeat ($urandom_range(3, 200)) @(posedge clk); #1;
      rst = 0;
      repeat ($urandom_range(1, 500)) @(posedge clk); #1;
      link_up = 1;
      wr(5'h4, 32'hDEAD_BEEF);
      wr(5'h8, 32'hC0FF_EE00);
      while (!endpoint_synced) @(posedge clk);
      #1;
      run_min = 1 << 30; run_max = -1;
      first = n_samples;
      for (int s = 0; s < SAMPLES; s++) begin
        wr(5'h0, 32'h7);
        repeat (LAT + 12 + $urandom_range(0, 20)) @(posedge clk); #1;
      end
      check(n_samples - first == SAMPLES, "one measurement per sample");
      check(run_min == run_max, "no latency variation within the run");
      $display("run %0d: %0d samples, skew min %0d max %0d cycles", run, n_samples - first, run_min, run_max);
    end
    check(n_time_checks > 0, "time compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
