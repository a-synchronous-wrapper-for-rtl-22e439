`timescale 1ns/1ps
// sync2 - two-flip-flop synchronizer.
//
// Brings a signal from the asynchronous pipeline into a clock domain. d is
// sampled on each rising clock edge; q follows d two clock edges later.
// Both flip-flops clear on the asynchronous active-low reset. Each port of the
// original wrapper has such a pair; the rising clock edge and the reset are
// this design's choice.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
