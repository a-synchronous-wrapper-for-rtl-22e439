`timescale 1ns/1ps
// input_port_controller - synchronous-to-asynchronous controller of the
// wrapper's input port.
//
// The synchronous sender holds a word on its data lines with Valid high. On a
// rising clock edge at which the controller is idle and Valid is 1, the word is
// loaded into the input register (load = 1 for that edge) and Ro toggles: a
// two-phase request to the first pipeline stage. L rises with Ro and falls when
// the pipeline's acknowledge Ao toggles to the same level (L = Ro xor Ao). The
// controller becomes idle again once the synchronized acknowledge Aclk has
// caught up with Ro; on a rising edge with Valid = 0 nothing happens.
//
// This is the extended-burst-mode specification of the original controller,
// states 0..7, written as clocked logic:
//   0/4 idle (Aclk == Ro)     -- CLK+ with Valid=1 --> L+, Ro toggles (2/6)
//   2/6 L high (Ro != Ao)     -- Ao toggles        --> L-            (3/7)
//   3/7 waiting for Aclk      -- Aclk == Ro, CLK-  --> idle          (4/0)
//   1/5 CLK+ with Valid=0, back to idle on CLK-: no state change here.
// Ro is a flip-flop on the rising clock edge, which gives "L+ Ro at CLK+";
// the falling-edge conditions of the specification are met by Aclk changing
// only just after a rising edge. An accepted word therefore occupies the
// controller for at least three clock cycles (one edge to accept, two for the
// acknowledge to cross the synchronizer).
//
// Ports: clk, rst_n (asynchronous, active low), valid, ao (asynchronous, from
// the pipeline), aclk (ao after the two-flip-flop synchronizer); l, ro,
// load (register enable for this rising edge).
module input_port_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic ao,
  input  logic aclk,
  output logic l,
  output logic ro,
  output logic load
);

  logic idle;

  assign idle = (aclk == ro);
  assign load = idle & valid;
  assign l    = ro ^ ao;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ro <= 1'b0;
    else if (load) ro <= ~ro;
  end

  // When the synchronized acknowledge says the pipeline is done, the raw
  // acknowledge must agree: the pipeline never acknowledges unrequested.
  ack_matches_request: assert property (@(posedge clk) disable iff (!rst_n)
    idle |-> (ao == ro));

endmodule
