// gbt_link_model: behavioural model of a GBT link, for testbenches only.
//
// Stands for the GBT link core on both boards, the transceivers and the
// fibre: an 80-bit word written on the Tx side each frame clock appears on
// the Rx side LATENCY frame clocks later, unchanged. Both ends run on the
// same clock here, as after the receiver has recovered the sender's clock.
// `link_up` low models a lost or not yet aligned link: `rx_ready` drops at
// once and rises again LATENCY cycles after `link_up` returns, when the
// pipeline holds only words sent while the link was up. A pulse on
// `corrupt_time` flips payload bit 3 of the next timing message entering
// the link, to model a transmission error. It is not synthesizable logic
// of the design.
module gbt_link_model
  import tfc_pkg::*;
#(
  parameter int unsigned LATENCY = 13
) (
  input  logic              clk,
  input  logic              link_up,
  input  logic              corrupt_time,
  input  logic [DATA_W-1:0] tx_data,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_ready
);
  logic [DATA_W-1:0] pipe [LATENCY];
  int unsigned       up_cycles = 0;
  bit                corrupt_pending = 0;
  tfc_frame_t        w;

  always @(posedge clk) begin
    w = tfc_frame_t'(tx_data);
    if (corrupt_time) corrupt_pending = 1;
    if (corrupt_pending && w.kind == MSG_TIME) begin
      w.payload[3] = ~w.payload[3];
      corrupt_pending = 0;
    end
    pipe[0] <= w;
    for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    if (!link_up) up_cycles <= 0;
    else if (up_cycles < LATENCY) up_cycles <= up_cycles + 1;
  end

  assign rx_data  = pipe[LATENCY-1];
  assign rx_ready = link_up && (up_cycles >= LATENCY);
endmodule
