`timescale 1ns/1ps
// delay_element - behavioural model of a matched delay element.
//
// In a bundled-data pipeline the request travelling from one stage control to
// the next passes through a delay that is at least as long as the slowest path
// of the logic between the two stages' registers. On an FPGA this is a chain
// of LUTs sized after place and route; it has no logic function, so this model
// only delays its input: every change of a appears on z DELAY_PS picoseconds
// later. The delay is inertial: a pulse shorter than the delay is lost, which
// a pipeline link never produces, because its source cannot toggle again
// before the delayed edge has reached the next stage and been acknowledged.
// It is not synthesizable as a delay.
//
// Ports: a (input), z (output). Parameter DELAY_PS: the delay in ps.
module delay_element #(
  parameter int DELAY_PS = 6000
) (
  input  logic a,
  output logic z
);

  assign #(real'(DELAY_PS) / 1000.0) z = a;

endmodule
