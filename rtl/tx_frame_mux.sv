// tx_frame_mux: builds the data word sent on the GBT Tx port each frame.
//
// Three sources share the one downstream link: timing messages from the
// timing master, fast control commands and user test words programmed over
// Wishbone. A timing message always wins, so its delay through this block
// is the same in every cycle (one register stage) and the downstream
// latency stays deterministic. Commands come next, so a throttling decision
// waits at most one cycle; a test word is taken only when neither of the
// others is offered. `cmd_ready` and `user_ready` are the combinational
// accept strobes of a valid/ready handshake. With nothing to send the block
// transmits the idle word.
//
// Timing: the word accepted in cycle t is on `tx_data` during cycle t+1.
// Sharing the link between timing, control and test data follows the design
// description; the fixed priorities and the idle word are this design's
// own.
module tx_frame_mux
  import tfc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        time_valid,
  input  tfc_frame_t  time_msg,
  input  logic        cmd_valid,
  input  tfc_frame_t  cmd_msg,
  output logic        cmd_ready,
  input  logic        user_valid,
  input  tfc_frame_t  user_msg,
  output logic        user_ready,
  output tfc_frame_t  tx_data
);

  assign cmd_ready  = cmd_valid && !time_valid;
  assign user_ready = user_valid && !time_valid && !cmd_valid;

  always_ff @(posedge clk) begin
    if (rst)             tx_data <= IDLE_FRAME;
    else if (time_valid) tx_data <= time_msg;
    else if (cmd_valid)  tx_data <= cmd_msg;
    else if (user_valid) tx_data <= user_msg;
    else                 tx_data <= IDLE_FRAME;
  end

endmodule
