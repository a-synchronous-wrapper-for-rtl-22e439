`timescale 1ns/1ps
// input_port - the wrapper's synchronous-to-asynchronous port.
//
// An input_port_controller plus a two-flip-flop synchronizer that brings the
// pipeline's acknowledge Ao into the clock domain as Aclk. Ai, the handshake
// seen by the synchronous sender, is the controller's Ro: it toggles on the
// clock edge that takes a word, so the sender may show its next word from the
// following edge on. load is the enable of the input data register for the
// current rising clock edge; ro is the request into the pipeline.
// The controller, the two synchronizer flip-flops and Ai taken from Ro are
// as in the original port; the rising-edge synchronizer is this design's
// choice.
//
// Ports: clk, rst_n, valid, ao (inputs); ai, ro, l, load (outputs).
module input_port (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic ao,
  output logic ai,
  output logic ro,
  output logic l,
  output logic load
);

  logic aclk;

  sync2 u_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (ao),
    .q    (aclk)
  );

  input_port_controller u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .valid(valid),
    .ao   (ao),
    .aclk (aclk),
    .l    (l),
    .ro   (ro),
    .load (load)
  );

  assign ai = ro;

endmodule
