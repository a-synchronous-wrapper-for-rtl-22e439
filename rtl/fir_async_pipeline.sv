`timescale 1ns/1ps
// fir_async_pipeline - five-tap FIR filter, y[t] = sum_i H[i] * x[t-i], built
// as a six-stage bundled-data asynchronous pipeline.
//
// The schedule (two multipliers and one adder per step) and the twenty data
// registers R1..R20 follow the original filter:
//   stage 1  R1..R5  = x(t)..x(t-4)  (a tap line: R1 <- x, R2 <- R1, ...)
//            products H0*R1, H1*R2
//   stage 2  R6, R7 (products), R8 = R3, R9 = R4, R10 = R5
//            sum R6+R7, products H3*R9, H4*R10
//   stage 3  R11 (sum), R12 = R8, R13, R14 (products)
//            product H2*R12, sum R13+R14
//   stage 4  R15 = R11, R16 (product), R17 (sum);  sum R15+R16
//   stage 5  R18 (sum), R19 = R17;                 sum R18+R19
//   stage 6  R20 = y(t)
// Every stage has a pipe_ctrl whose L pulse clocks that stage's registers.
// The request from stage k to stage k+1 passes a delay_element (five of
// them) that must outlast the logic between the two stages; the acknowledge
// from stage k+1 to stage k is the stage k+1 Ro, undelayed. Making stage 1 a
// tap line (so that a single new sample enters per token) is this design's
// choice; products keep bits [PROD_SHIFT +: DATA_W] and sums wrap, see
// gsla_pkg.
//
// Interface (all two-phase, no clock):
//   ri  request in: toggles once per new sample on x_in (x_in stable before)
//   ai  acknowledge out: stage 1 has loaded the sample
//   ro  request out: toggles when a new y is in R20 (y stable until the
//       next ao toggle)
//   ao  acknowledge in: the consumer has taken y
// Timing: with an empty pipeline ro follows ri after the sum of the five
// delays; a stage accepts a new token only after the next stage took the
// previous one.
module fir_async_pipeline
  import gsla_pkg::*;
#(
  parameter int        DELAY1_PS = 6000,
  parameter int        DELAY2_PS = 6000,
  parameter int        DELAY3_PS = 6000,
  parameter int        DELAY4_PS = 6000,
  parameter int        DELAY5_PS = 6000,
  parameter coef_arr_t H         = H_DEFAULT
) (
  input  logic  rst_n,
  input  logic  ri,
  output logic  ai,
  input  data_t x_in,
  output logic  ro,
  input  logic  ao,
  output data_t y
);

  localparam int STAGES = 6;
  localparam int DELAY_PS [STAGES-1] = '{DELAY1_PS, DELAY2_PS, DELAY3_PS, DELAY4_PS, DELAY5_PS};

  logic [STAGES-1:0] c_ri, c_ro, c_ao, c_l;

  assign c_ri[0] = ri;
  assign ai      = c_ro[0];
  assign ro      = c_ro[STAGES-1];
  assign c_ao[STAGES-1] = ao;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    pipe_ctrl u_ctrl (
      .rst_n(rst_n),
      .ri   (c_ri[k]),
      .ao   (c_ao[k]),
      .l    (c_l[k]),
      .ro   (c_ro[k])
    );
    if (k < STAGES-1) begin : g_link
      delay_element #(.DELAY_PS(DELAY_PS[k])) u_delay (
        .a(c_ro[k]),
        .z(c_ri[k+1])
      );
      assign c_ao[k] = c_ro[k+1];
    end
  end

  // Data registers R1..R20.
  data_t r1, r2, r3, r4, r5, r6, r7, r8, r9, r10;
  data_t r11, r12, r13, r14, r15, r16, r17, r18, r19, r20;

  // Stage 1: tap line.
  always_ff @(posedge c_l[0] or negedge rst_n) begin
    if (!rst_n) begin
      {r1, r2, r3, r4, r5} <= '0;
    end else begin
      r1 <= x_in;
      r2 <= r1;
      r3 <= r2;
      r4 <= r3;
      r5 <= r4;
    end
  end

  // Stage 2.
  always_ff @(posedge c_l[1] or negedge rst_n) begin
    if (!rst_n) begin
      {r6, r7, r8, r9, r10} <= '0;
    end else begin
      r6  <= scaled_mul(H[0], r1);
      r7  <= scaled_mul(H[1], r2);
      r8  <= r3;
      r9  <= r4;
      r10 <= r5;
    end
  end

  // Stage 3.
  always_ff @(posedge c_l[2] or negedge rst_n) begin
    if (!rst_n) begin
      {r11, r12, r13, r14} <= '0;
    end else begin
      r11 <= r6 + r7;
      r12 <= r8;
      r13 <= scaled_mul(H[3], r9);
      r14 <= scaled_mul(H[4], r10);
    end
  end

  // Stage 4.
  always_ff @(posedge c_l[3] or negedge rst_n) begin
    if (!rst_n) begin
      {r15, r16, r17} <= '0;
    end else begin
      r15 <= r11;
      r16 <= scaled_mul(H[2], r12);
      r17 <= r13 + r14;
    end
  end

  // Stage 5.
  always_ff @(posedge c_l[4] or negedge rst_n) begin
    if (!rst_n) begin
      {r18, r19} <= '0;
    end else begin
      r18 <= r15 + r16;
      r19 <= r17;
    end
  end

  // Stage 6.
  always_ff @(posedge c_l[5] or negedge rst_n) begin
    if (!rst_n) r20 <= '0;
    else        r20 <= r18 + r19;
  end

  assign y = r20;

endmodule
