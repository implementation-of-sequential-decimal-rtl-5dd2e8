// sdm_pkg: constants and types shared by the sequential decimal multiplier.
//
// Numbers are unsigned decimal integers held in BCD 8421, four bits per digit,
// digit 0 least significant. A number of N digits is a packed array
// logic [N-1:0][3:0]. The default operand length is eight digits (a 32-bit
// BCD word), the size the multiplier was designed and evaluated at; every
// module takes N_DIGITS as a parameter so that other lengths can be built.
package sdm_pkg;

  // Operand length in decimal digits.
  parameter int unsigned N_DIGITS = 8;

  // One BCD 8421 digit.
  typedef logic [3:0] bcd_digit_t;

  // States of the iteration controller.
  typedef enum logic {
    ST_IDLE = 1'b0,
    ST_RUN  = 1'b1
  } ctrl_state_t;

endpackage
