// tb_time_counter: self-checking test of the loadable 64-bit time counter.
// Compares the counter with a reference model every cycle through reset,
// free counting, loads at random moments (including a load of all ones to
// check the wrap to zero) and a load held for several cycles.
`timescale 1ns/1ps
module tb_time_counter;
  logic        clk = 1'b0;
  logic        rst, load;
  logic [63:0] load_value, time_o, model;
  int checks = 0, failures = 0;

  time_counter #(.W(64)) dut (.clk, .rst, .load, .load_value, .time_o);

  always #12.5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic l, logic [63:0] v);
    load = l; load_value = v;
    @(posedge clk);
    if (rst) model = '0; else if (l) model = v; else model = model + 1;
    #1;
    checks++;
    if (time_o !== model) begin
      failures++;
      $display("mismatch: time=%0h expected=%0h", time_o, model);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; load_value = '0; model = '0;
    step(0, 0); step(0, 0);
    rst = 1'b0;
    repeat (100) step(0, 0);
    repeat (200) begin
      if ($urandom_range(0, 9) == 0) step(1, {$urandom, $urandom});
      else step(0, 0);
    end
    step(1, 64'hFFFF_FFFF_FFFF_FFFE);
    repeat (4) step(0, 0);           // crosses 2^64 - 1 -> 0
    repeat (3) step(1, 64'h1234);    // load held: value stays
    repeat (10) step(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
