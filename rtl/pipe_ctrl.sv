`timescale 1ns/1ps
// pipe_ctrl - two-phase stage controller of the linear bundled-data
// asynchronous pipeline.
//
// Every transition of Ri is a new request (two-phase signalling), every
// transition of Ao is the next stage's acknowledge. The controller follows
// this signal transition graph:
//   Ri+ -> L+ -> Ro+ -> L- -> {Ri-, Ao+} -> L+ -> Ro- -> L- -> {Ri+, Ao-} -> ...
// so L (the load pulse, used as the clock of the stage's data register) rises
// when a new request is waiting (Ri != Ro) and the next stage has taken the
// previous token (Ao == Ro); Ro then copies Ri, which ends the pulse. Ro is
// also this stage's acknowledge to the previous stage.
//
// The original controller is a small gate network with Ro fed back into its
// own gates. Here Ro is held by a flip-flop clocked by L, which produces the
// same event order L+ -> Ro -> L- without a combinational loop. The width of
// the L pulse is the clock-to-Q delay of that flip-flop.
//
// Ports: rst_n (asynchronous, active low, Ro = 0), ri, ao (inputs),
// l, ro (outputs). No clock.
module pipe_ctrl (
  input  logic rst_n,
  input  logic ri,
  input  logic ao,
  output logic l,
  output logic ro
);

  assign l = (ri ^ ro) & ~(ao ^ ro);

  always_ff @(posedge l or negedge rst_n) begin
    if (!rst_n) ro <= 1'b0;
    else        ro <= ri;
  end

endmodule
