// pbs_pkg: number format, types and constants shared by the RK4
// Pandey-Baghel-Singh (PBS) chaotic generator.
//
// Every quantity (state x, y, z, step size h, slopes, coefficients) is a
// 32-bit two's-complement fixed-point number with 24 fraction bits
// (Q8.24: range -128 .. +128, resolution 2^-24). The hexadecimal values the
// generator is known to run with (h = 0x00199999 = 0.1, an initial value of
// 0x00199999 = 0.1) are Q8.24 numbers, so that format is used throughout.
//
// The system constants a = 1, b = 1.1 and c = 0.4 are the published
// PBS-system values, rounded to the nearest Q8.24 code. 1/6 (used for the
// h/6 weight of the RK4 sum) is rounded the same way.
package pbs_pkg;

  localparam int unsigned WIDTH = 32;  // word width of all data
  localparam int unsigned FRAC  = 24;  // fraction bits (Q8.24)

  typedef logic signed [WIDTH-1:0] fx_t;

  // One point of the three-dimensional system (or one slope triple).
  typedef struct packed {
    fx_t x;
    fx_t y;
    fx_t z;
  } vec3_t;

  localparam fx_t COEF_A    = 32'sh0100_0000;  // a = 1.0
  localparam fx_t COEF_B    = 32'sh0119_999A;  // b = 1.1
  localparam fx_t COEF_C    = 32'sh0066_6666;  // c = 0.4
  localparam fx_t ONE_SIXTH = 32'sh002A_AAAB;  // 1/6

  // Product pipeline depth of the multiply-accumulate unit; one operation
  // takes MUL_STAGES + 2 clock cycles (operand register, product
  // registers, accumulate register).
  localparam int unsigned MUL_STAGES = 3;

  // Clock edges from the edge that samples Start to the edge that raises
  // Ready: 1 (load) + 4 operations (K1) + 3 x 7 operations (K2..K4)
  // + 3 operations (Ys) + 1 (filter) = 2 + 28 x 5 = 142.

endpackage
