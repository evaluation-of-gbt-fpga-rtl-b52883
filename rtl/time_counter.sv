// time_counter: free-running local time of a TFC node.
//
// The counter advances by one on every 40 MHz system clock edge, so its
// value is the node's time in 25 ns units. A Master's counter is the
// common time of the experiment; an Endpoint's counter is loaded from the
// received timestamp. A load takes priority over counting: when `load` is
// high, the next value is `load_value`, and counting resumes from there on
// the following edge. Reset clears it to zero.
//
// The 64-bit width and 40 MHz rate follow the design description; the
// synchronous load interface and the reset to zero are this design's
// choice.
module time_counter #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,         // synchronous, active high
  input  logic         load,
  input  logic [W-1:0] load_value,
  output logic [W-1:0] time_o
);

  always_ff @(posedge clk) begin
    if (rst)       time_o <= '0;
    else if (load) time_o <= load_value;
    else           time_o <= time_o + W'(1);
  end

endmodule
