`timescale 1ns/1ps
// gsla_pkg - shared types and constants of the synchronous wrapper with the
// asynchronous five-tap FIR pipeline.
//
// DATA_W is the width of every data register of the filter (R1..R20 and the
// wrapper's input and output registers). The original design reports 280
// flip-flops for the 20 registers of the synchronous version of the filter,
// which is 14 bits per register; that is the width used here.
// The coefficients are the ones used in the original filter's simulation
// (489, 506, 512, 506, 489). A product keeps bits [PROD_SHIFT +: DATA_W] of the
// full 2*DATA_W-bit product; PROD_SHIFT = 12 reproduces the published output
// samples (for example 230, 299 and 363) exactly. Sums wrap at DATA_W bits.
package gsla_pkg;

  localparam int DATA_W     = 14;
  localparam int TAPS       = 5;
  localparam int PROD_SHIFT = 12;

  typedef logic [DATA_W-1:0] data_t;
  typedef data_t coef_arr_t [TAPS];

  localparam coef_arr_t H_DEFAULT = '{14'd489, 14'd506, 14'd512, 14'd506, 14'd489};

  // Scaled product: bits [PROD_SHIFT +: DATA_W] of the unsigned product.
  function automatic data_t scaled_mul(data_t h, data_t x);
    return data_t'(((2*DATA_W)'(h) * (2*DATA_W)'(x)) >> PROD_SHIFT);
  endfunction

endpackage
