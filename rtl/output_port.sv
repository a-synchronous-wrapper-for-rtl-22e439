`timescale 1ns/1ps
// output_port - the wrapper's asynchronous-to-synchronous port.
//
// The last pipeline stage's request Ri goes through a 2x1 mux whose output is
// fed back to its own "1" input: while the controller's L is high the mux
// holds its value, while L is low it passes Ri. Two flip-flops then bring the
// held request into the clock domain as Riclk for the output_port_controller.
// Holding the request while L is high keeps a new pipeline token from reaching
// the controller before the receiver has acknowledged the previous word, so
// the output register is never overwritten early.
//
// The mux with its output fed back is a level-sensitive latch (transparent
// while L is low); that latch is part of the original port and stays here on
// purpose, written as an always_latch with reset. The mux, its feedback and
// the two flip-flops are the original port's; driving the mux select from L
// is this design's reading of how the port is wired, chosen because it makes
// the mux pass Ri exactly in the controller states that wait for Riclk.
//
// Ports: clk, rst_n, ri (asynchronous), ao (from the receiver); l, ro, load.
// ro goes to the receiver and back to the pipeline as its acknowledge; load is
// the output register's enable for the current rising clock edge.
module output_port (
  input  logic clk,
  input  logic rst_n,
  input  logic ri,
  input  logic ao,
  output logic l,
  output logic ro,
  output logic load
);

  logic ri_held;
  logic riclk;

  always_latch begin
    if (!rst_n)  ri_held = 1'b0;
    else if (!l) ri_held = ri;
  end

  sync2 u_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (ri_held),
    .q    (riclk)
  );

  output_port_controller u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .ri   (ri),
    .riclk(riclk),
    .ao   (ao),
    .l    (l),
    .ro   (ro),
    .load (load)
  );

endmodule
