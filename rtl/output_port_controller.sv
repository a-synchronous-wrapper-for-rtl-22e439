`timescale 1ns/1ps
// output_port_controller - asynchronous-to-synchronous controller of the
// wrapper's output port.
//
// Ri is the last pipeline stage's two-phase request, Riclk the same request
// after the port's hold mux and synchronizer, Ao the synchronous receiver's
// two-phase acknowledge. Ro toggles towards the receiver, and is also the
// acknowledge returned to the last pipeline stage.
//
//   L = not (Ri != Ro and Ao == Ro)
// L is high at rest. It falls when a new token has arrived (Ri != Ro) and the
// receiver has taken the previous word (Ao == Ro). While L is low the port's
// mux lets Ri through to the synchronizer; once Riclk differs from Ro, the
// next rising clock edge loads the output register (load = 1) and toggles Ro,
// which raises L again and closes the mux.
// This is the extended-burst-mode specification of the original controller
// written as clocked logic:
//   0 -> 1     Ri+           / L-
//   1 -> 2     Riclk+, CLK+  / L+ Ro+
//   2 -> 3     Ri-, Ao+      / L-
//   3 -> 4 -> 5  Riclk-, CLK-, then CLK+ / L+ Ro-
//   5 -> 6     Ri+, Ao-      / L-
//   6 -> 7 -> 2  Riclk+, CLK-, then CLK+ / L+ Ro+
// Ro is a rising-edge flip-flop; Riclk only changes just after a rising edge,
// so the falling-edge conditions of the specification hold.
//
// Ports: clk, rst_n (asynchronous, active low), ri, riclk, ao; l, ro, load.
module output_port_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic ri,
  input  logic riclk,
  input  logic ao,
  output logic l,
  output logic ro,
  output logic load
);

  assign l    = ~((ri ^ ro) & ~(ao ^ ro));
  assign load = riclk ^ ro;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ro <= 1'b0;
    else if (load) ro <= riclk;
  end

  // A word is handed on only after the receiver took the previous one.
  no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (ao == ro));

endmodule
