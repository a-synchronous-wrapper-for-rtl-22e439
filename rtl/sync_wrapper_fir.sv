`timescale 1ns/1ps
// sync_wrapper_fir - synchronous wrapper around the asynchronous FIR pipeline
// (synchronous -> asynchronous pipeline -> synchronous).
//
// To its neighbours the wrapper looks like a synchronous module: a sender in
// the clk1 domain offers samples with valid/ai, a receiver in the clk2 domain
// takes results with ro/ao. Inside, the filter runs without a clock.
//   input side   the input_port takes x_in into the input register on a
//                rising clk1 edge when valid = 1 and the port is idle, and
//                toggles ai (= its request into the pipeline). The sender
//                keeps x_in and valid until it sees ai toggle, then may
//                present the next sample.
//   pipeline     fir_async_pipeline, six self-timed stages.
//   output side  the output_port synchronizes the pipeline's request into
//                clk2, loads the output register and toggles ro. The
//                receiver takes y_out when ro differs from ao and then sets
//                ao equal to ro. ro is also the pipeline's acknowledge.
// clk1 and clk2 may be the same clock or unrelated clocks. Both handshakes
// are two-phase: every toggle of ai is one taken sample, every toggle of ro
// one new result. Each port handles at most one word every three of its
// clock cycles.
//
// Own choices: the input and output registers load on the rising clock edge
// at which their controller raises L (L is brought out for observation);
// one asynchronous active-low reset serves both clock domains.
module sync_wrapper_fir
  import gsla_pkg::*;
#(
  parameter int DELAY1_PS = 6000,
  parameter int DELAY2_PS = 6000,
  parameter int DELAY3_PS = 6000,
  parameter int DELAY4_PS = 6000,
  parameter int DELAY5_PS = 6000
) (
  input  logic  clk1,
  input  logic  clk2,
  input  logic  rst_n,
  // clk1 side
  input  logic  valid,
  input  data_t x_in,
  output logic  ai,
  output logic  l_in,
  // clk2 side
  output data_t y_out,
  output logic  ro,
  input  logic  ao,
  output logic  l_out
);

  data_t x_q;
  data_t y_pipe;
  logic  in_load, out_load;
  logic  p_ri, p_ai, p_ro;

  input_port u_in (
    .clk  (clk1),
    .rst_n(rst_n),
    .valid(valid),
    .ao   (p_ai),
    .ai   (ai),
    .ro   (p_ri),
    .l    (l_in),
    .load (in_load)
  );

  always_ff @(posedge clk1 or negedge rst_n) begin
    if (!rst_n)       x_q <= '0;
    else if (in_load) x_q <= x_in;
  end

  fir_async_pipeline #(
    .DELAY1_PS(DELAY1_PS),
    .DELAY2_PS(DELAY2_PS),
    .DELAY3_PS(DELAY3_PS),
    .DELAY4_PS(DELAY4_PS),
    .DELAY5_PS(DELAY5_PS)
  ) u_fir (
    .rst_n(rst_n),
    .ri   (p_ri),
    .ai   (p_ai),
    .x_in (x_q),
    .ro   (p_ro),
    .ao   (ro),
    .y    (y_pipe)
  );

  output_port u_out (
    .clk  (clk2),
    .rst_n(rst_n),
    .ri   (p_ro),
    .ao   (ao),
    .l    (l_out),
    .ro   (ro),
    .load (out_load)
  );

  always_ff @(posedge clk2 or negedge rst_n) begin
    if (!rst_n)        y_out <= '0;
    else if (out_load) y_out <= y_pipe;
  end

endmodule
