// wb_master_regs: Wishbone register file of the Master (sender) node.
//
// A host programs the 64-bit test word the sender transmits, starts its
// transmission, issues fast control commands and reads the Endpoint status
// through a 32-bit Wishbone (B4, classic cycle) slave. The register map, in
// byte addresses:
//   0x00 CTRL       bit0 timing_enable (rw, reset 1)
//                   bit1 SEND: write 1 to queue the test word; reads 1
//                   while the word waits for the link
//                   bit2 auto_throttle (rw, reset 1)
//   0x04 DATA_LO    test word bits 31:0  (rw)
//   0x08 DATA_HI    test word bits 63:32 (rw)
//   0x0C SENT       bits 15:0 number of test words sent (ro)
//   0x10 CMD        write: queue command code dat_i[15:0];
//                   read: bits 15:0 last code written, bit16 command
//                   pending, bit17 throttle state
//   0x14 EP_STAT_LO last Endpoint status message, payload bits 31:0 (ro)
//   0x18 EP_STAT_HI payload bits 63:32 (ro)
//   0x1C EP_COUNT   bits 15:0 status messages received (ro)
// Writes to read-only registers are ignored. CTRL and CMD act on a write
// only if byte lane 0 is selected.
//
// A queued test word is offered as a user message (`user_valid`,
// `user_msg`) until the Tx multiplexer accepts it with `user_ready`.
// Writing DATA_LO or DATA_HI while a word waits changes the word sent.
// Timing: `ack_o` is registered, one wait state per access; a SEND or CMD
// write acts from the next cycle on.
//
// Programming the transmitted data through a Wishbone register follows the
// design description; the register map and the command and status
// registers are this design's own.
module wb_master_regs
  import tfc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // Wishbone slave
  input  logic              cyc_i,
  input  logic              stb_i,
  input  logic              we_i,
  input  logic [4:0]        adr_i,     // byte address bits 4:0
  input  logic [31:0]       dat_i,
  input  logic [3:0]        sel_i,
  output logic [31:0]       dat_o,
  output logic              ack_o,
  // test word to the Tx path
  output logic              timing_enable,
  output logic              user_valid,
  output tfc_frame_t        user_msg,
  input  logic              user_ready,
  // fast control
  output logic              auto_throttle,
  output logic              host_cmd_valid,
  output logic [15:0]       host_cmd,
  input  logic              host_cmd_pending,
  input  logic              throttle_state,
  input  logic [63:0]       ep_status,
  input  logic [15:0]       ep_status_count
);

  logic [63:0] data_q;
  logic [15:0] sent_count;
  logic        access;
  logic        wr;
  logic [2:0]  reg_idx;

  assign access  = cyc_i && stb_i && !ack_o;
  assign wr      = access && we_i;
  assign reg_idx = adr_i[4:2];

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] nw, logic [3:0] sel);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = sel[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_o          <= 1'b0;
      dat_o          <= '0;
      data_q         <= '0;
      timing_enable  <= 1'b1;
      auto_throttle  <= 1'b1;
      user_valid     <= 1'b0;
      sent_count     <= '0;
      host_cmd_valid <= 1'b0;
      host_cmd       <= '0;
    end else begin
      ack_o          <= access;
      host_cmd_valid <= 1'b0;
      if (user_valid && user_ready) begin
        user_valid <= 1'b0;
        sent_count <= sent_count + 16'd1;
      end
      if (wr) begin
        unique case (reg_idx)
          3'd0: if (sel_i[0]) begin
            timing_enable <= dat_i[0];
            auto_throttle <= dat_i[2];
            if (dat_i[1]) user_valid <= 1'b1;
          end
          3'd1: data_q[31:0]  <= merge(data_q[31:0],  dat_i, sel_i);
          3'd2: data_q[63:32] <= merge(data_q[63:32], dat_i, sel_i);
          3'd4: if (sel_i[0]) begin
            host_cmd_valid <= 1'b1;
            host_cmd       <= {sel_i[1] ? dat_i[15:8] : host_cmd[15:8], dat_i[7:0]};
          end
          default: ;
        endcase
      end
      if (access && !we_i) begin
        unique case (reg_idx)
          3'd0: dat_o <= {29'd0, auto_throttle, user_valid, timing_enable};
          3'd1: dat_o <= data_q[31:0];
          3'd2: dat_o <= data_q[63:32];
          3'd3: dat_o <= {16'd0, sent_count};
          3'd4: dat_o <= {14'd0, throttle_state, host_cmd_pending, host_cmd};
          3'd5: dat_o <= ep_status[31:0];
          3'd6: dat_o <= ep_status[63:32];
          3'd7: dat_o <= {16'd0, ep_status_count};
        endcase
      end
    end
  end

  assign user_msg = make_frame(MSG_USER, data_q);

  // Wishbone rule: an acknowledge only answers a strobe that is still held.
  property p_ack_answers_strobe;
    @(posedge clk) disable iff (rst) ack_o |-> (cyc_i && stb_i);
  endproperty
  a_ack_answers_strobe: assert property (p_ack_answers_strobe);

endmodule
