// foc_pkg: types and constants shared by the field-oriented-control datapath.
//
// All currents, voltages, angles and speeds travel as 18-bit words, the word
// width used throughout the design. Currents and voltages are signed integers
// (full scale +/-131071). An angle is an unsigned 18-bit fraction of one
// electrical turn (2^18 = 360 degrees), so angle arithmetic wraps naturally.
// Multiplying constants are fixed point with 16 fraction bits unless a comment
// says otherwise; a product is shifted right arithmetically (rounds toward
// minus infinity).
package foc_pkg;

  localparam int DW = 18;                 // data word width

  typedef logic signed [DW-1:0] sample_t; // current, voltage or speed
  typedef logic        [DW-1:0] angle_t;  // electrical angle, 2^18 per turn

  typedef struct packed { sample_t a; sample_t b; sample_t c; } abc_t;
  typedef struct packed { sample_t alpha; sample_t beta; } ab_t;
  typedef struct packed { sample_t d; sample_t q; } dq_t;

  // Operations of the multiply/add/subtract unit.
  typedef enum logic [1:0] { MAS_MUL = 2'd0, MAS_ADD = 2'd1, MAS_SUB = 2'd2 } mas_op_e;

  // PI channels sharing one PI datapath.
  typedef enum logic [1:0] { PI_SPEED = 2'd0, PI_ID = 2'd1, PI_IQ = 2'd2 } pi_ch_e;

  // CORDIC operation: Park rotates by -theta, inverse Park by +theta.
  typedef enum logic { CORDIC_PARK = 1'b0, CORDIC_IPARK = 1'b1 } cordic_mode_e;

  // Q16 constants.
  localparam sample_t INV_SQRT3 = 18'sd37837;  // round(2^16 / sqrt(3))
  localparam sample_t SQRT3_2   = 18'sd56756;  // round(2^16 * sqrt(3) / 2)

  // Saturate a wide signed value to the 18-bit signed range.
  function automatic sample_t sat18(input logic signed [47:0] v);
    if (v > 48'sd131071)       return 18'sd131071;
    else if (v < -48'sd131072) return -18'sd131072;
    else                       return v[DW-1:0];
  endfunction

endpackage
