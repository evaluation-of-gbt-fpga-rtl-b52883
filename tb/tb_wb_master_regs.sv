// tb_wb_master_regs: Wishbone reads and writes of every register, byte
// selects, the one-wait-state acknowledge, the SEND handshake (the test
// word is offered until accepted, then the sent counter advances), the
// one-cycle command strobe and the read-back of the fast control status.
`timescale 1ns/1ps
module tb_wb_master_regs;
  import tfc_pkg::*;
  logic        clk = 1'b0;
  logic        rst, cyc_i, stb_i, we_i, ack_o;
  logic [4:0]  adr_i;
  logic [3:0]  sel_i;
  logic        auto_throttle, host_cmd_valid, host_cmd_pending, throttle_state;
  logic [15:0] host_cmd, ep_status_count;
  logic [63:0] ep_status;
  int          n_cmd_strobes = 0;
  logic [31:0] dat_i, dat_o;
  logic        timing_enable, user_valid, user_ready;
  tfc_frame_t  user_msg;
  int checks = 0, failures = 0;

  wb_master_regs dut (.clk, .rst, .cyc_i, .stb_i, .we_i, .adr_i, .dat_i, .sel_i,
                      .dat_o, .ack_o, .timing_enable, .user_valid, .user_msg, .user_ready,
                      .auto_throttle, .host_cmd_valid, .host_cmd, .host_cmd_pending,
                      .throttle_state, .ep_status, .ep_status_count);

  always @(negedge clk) if (host_cmd_valid) n_cmd_strobes++;

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

  // One classic Wishbone cycle, sampled at rising edges as a bus master
  // does: the strobe is held through the edge that sees the acknowledge.
  // Checks that the acknowledge comes after exactly one wait state.
  task automatic wb(bit we, logic [4:0] adr, logic [31:0] wdat, logic [3:0] sel,
                    output logic [31:0] rdat);
    int edges = 0;
    cyc_i = 1; stb_i = 1; we_i = we; adr_i = adr; dat_i = wdat; sel_i = sel;
    do begin @(posedge clk); edges++; end while (!ack_o && edges < 10);
    check(edges == 2, "ack seen at the second edge");
    rdat = dat_o;
    #1;
    cyc_i = 0; stb_i = 0; we_i = 0;
    check(!ack_o, "ack lasts one cycle");
  endtask

  task automatic wr(logic [4:0] adr, logic [31:0] d, logic [3:0] sel = 4'hF);
    logic [31:0] unused;
    wb(1, adr, d, sel, unused);
  endtask

  task automatic rd_check(logic [4:0] adr, logic [31:0] exp, string what);
    logic [31:0] r;
    wb(0, adr, '0, 4'hF, r);
    check(r == exp, what);
    if (r != exp) $display("  read %08h expected %08h", r, exp);
  endtask

  initial begin
    rst = 1; host_cmd_pending = 0; throttle_state = 0; ep_status = '0; ep_status_count = '0; cyc_i = 0; stb_i = 0; we_i = 0; adr_i = 0; dat_i = 0; sel_i = 0; user_ready = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    check(timing_enable && auto_throttle && !user_valid && !host_cmd_valid, "reset state");
    rd_check(5'h0, 32'h5, "CTRL reset");
    rd_check(5'hC, 32'h0, "STATUS reset");
    wr(5'h4, 32'hDEAD_BEEF);
    wr(5'h8, 32'hC0FF_EE00);
    rd_check(5'h4, 32'hDEAD_BEEF, "DATA_LO");
    rd_check(5'h8, 32'hC0FF_EE00, "DATA_HI");
    wr(5'h4, 32'h1122_3344, 4'b0101);   // bytes 0 and 2 only
    rd_check(5'h4, 32'hDE22_BE44, "byte select");
    wr(5'h4, 32'hDEAD_BEEF);
    check(user_msg.kind == MSG_USER && user_msg.payload == 64'hC0FF_EE00_DEAD_BEEF, "user word");
    // SEND with the multiplexer busy: the word waits.
    wr(5'h0, 32'h7);
    check(user_valid, "send queued");
    rd_check(5'h0, 32'h7, "CTRL shows pending send");
    repeat (5) @(posedge clk); #1;
    check(user_valid, "still offered while not accepted");
    user_ready = 1;
    @(posedge clk); #1;
    user_ready = 0;
    check(!user_valid, "offer withdrawn after accept");
    rd_check(5'hC, 32'h1, "sent counter");
    // Disable timing broadcast.
    wr(5'h0, 32'h0);
    check(!timing_enable && !auto_throttle && !user_valid, "timing and auto throttle disabled");
    rd_check(5'h0, 32'h0, "CTRL readback");
    // Unmapped write ignored, send a second word.
    wr(5'hC, 32'hFFFF_FFFF);
    rd_check(5'hC, 32'h1, "STATUS read only");
    wr(5'h0, 32'h3);
    user_ready = 1;
    @(posedge clk); #1;
    user_ready = 0;
    rd_check(5'hC, 32'h2, "second send counted");
    // Commands: one strobe per CMD write, with the code written.
    check(n_cmd_strobes == 0, "no command yet");
    wr(5'h10, 32'h0000_ABCD);
    check(host_cmd == 16'hABCD && n_cmd_strobes == 1, "command strobe and code");
    wr(5'h10, 32'h0000_1201, 4'b0001);   // low byte only
    check(host_cmd == 16'hAB01 && n_cmd_strobes == 2, "command byte select");
    wr(5'h10, 32'h0000_0077, 4'b0010);   // lane 0 not selected: ignored
    check(n_cmd_strobes == 2, "command needs lane 0");
    host_cmd_pending = 1; throttle_state = 1;
    rd_check(5'h10, 32'h0003_AB01, "CMD read-back");
    // Endpoint status read-back.
    ep_status = 64'h8765_4321_0FED_CBA9; ep_status_count = 16'd321;
    rd_check(5'h14, 32'h0FED_CBA9, "EP_STAT_LO");
    rd_check(5'h18, 32'h8765_4321, "EP_STAT_HI");
    rd_check(5'h1C, 32'd321, "EP_COUNT");
    wr(5'h1C, 32'h0);
    rd_check(5'h1C, 32'd321, "EP_COUNT read only");
    check(n_cmd_strobes == 2, "command strobes only on CMD writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
