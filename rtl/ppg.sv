// ppg: partial product generator.
//
// For one multiplier digit y (BCD 8421, bits y3..y0) it selects two BCD
// numbers U and V from the easy multiples such that U + V = y * X. The pair is
// the partial product W in double-BCD form: it is never added here, the
// accumulator adds both terms. Selection:
//   V = 2X  when y1,            plus 4X when y3    (y3 and y1 never both set)
//   U = X   when !y3 !y2 y0                         (y = 1, 3)
//     = 4X  when (y2 + y3) !y0                      (y = 4, 6, 8)
//     = 5X  when (y2 + y3) y0                       (y = 5, 7, 9)
// giving 0, X, 2X, 2X+X, 4X, 5X, 2X+4X, 2X+5X, 4X+4X, 4X+5X for y = 0..9.
// The selection signals are those of the original design with one change:
// there the 4X/5X choice tests y1 xor y0, which picks 5X for y = 6 and 4X
// for y = 7 (giving 7X and 6X); here it tests y0 alone. For y = 4, 5, 8, 9
// both forms agree.
// Purely combinational: an AND-OR multiplexer, one gate level per term.
module ppg #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic [N_DIGITS:0][3:0] x1,
  input  logic [N_DIGITS:0][3:0] x2,
  input  logic [N_DIGITS:0][3:0] x4,
  input  logic [N_DIGITS:0][3:0] x5,
  input  sdm_pkg::bcd_digit_t    yi,
  output logic [N_DIGITS:0][3:0] u,
  output logic [N_DIGITS:0][3:0] v
);

  localparam int unsigned W = 4 * (N_DIGITS + 1);

  logic sel_v2, sel_v4, sel_u1, sel_u4, sel_u5;

  always_comb begin
    sel_v2 = yi[1];
    sel_v4 = yi[3];
    sel_u1 = ~yi[3] & yi[0] & ~yi[2];
    sel_u4 = (yi[2] | yi[3]) & ~yi[0];
    sel_u5 = (yi[2] | yi[3]) & yi[0];

    v = ({W{sel_v2}} & x2) | ({W{sel_v4}} & x4);
    u = ({W{sel_u1}} & x1) | ({W{sel_u4}} & x4) | ({W{sel_u5}} & x5);
  end

endmodule
