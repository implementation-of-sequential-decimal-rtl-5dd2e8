// easy_multiples: the multiplicand multiples X, 2X, 4X and 5X in BCD 8421.
//
// These four "easy" multiples are enough to form any digit multiple 0..9 of X
// as the sum of at most two of them (see ppg). 2X and 5X come from the
// carry-free digit recoders bcd_x2 and bcd_x5; 4X is 2X doubled again, as the
// design prescribes. All outputs are N_DIGITS+1 digits wide, the width of
// 5X and 4X for an N_DIGITS-digit X; X itself is zero-extended.
// Purely combinational: two doubler levels deep on the 4X path.
module easy_multiples #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic [N_DIGITS-1:0][3:0] x,
  output logic [N_DIGITS:0][3:0]   x1,
  output logic [N_DIGITS:0][3:0]   x2,
  output logic [N_DIGITS:0][3:0]   x4,
  output logic [N_DIGITS:0][3:0]   x5
);

  // 2X doubled has one more digit; it is always zero since 4X < 10^(N+1).
  logic [N_DIGITS+1:0][3:0] x4_wide;

  assign x1 = {4'h0, x};

  bcd_x2 #(.N_DIGITS(N_DIGITS))   u_x2 (.x(x),  .x2(x2));
  bcd_x2 #(.N_DIGITS(N_DIGITS+1)) u_x4 (.x(x2), .x2(x4_wide));
  bcd_x5 #(.N_DIGITS(N_DIGITS))   u_x5 (.x(x),  .x5(x5));

  assign x4 = x4_wide[N_DIGITS:0];

endmodule
