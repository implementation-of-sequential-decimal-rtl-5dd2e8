// bcd_x2: carry-free doubling of a BCD 8421 number.
//
// Each result digit depends only on its own input digit and the next lower
// one, so there is no carry chain. For input digit x_j the doubled digit is
// (2*x_j mod 10) + c_j, where c_j = 1 when the lower digit x_{j-1} >= 5.
// The low part 2*x_j mod 10 is always even, so c_j simply fills bit 0.
// The bit equations are the two-level sum-of-products forms of the design:
//   bit3 = x3 x0 + x2 !x1 !x0            (digits 4 and 9)
//   bit2 = x3 !x0 + x1 x0 + !x2 x1       (digits 2, 3, 7, 8)
//   bit1 = x3 !x0 + !x3 !x2 x0 + x2 x1 !x0 (digits 1, 3, 6, 8)
//   bit0 = y3 + y2 (y1 + y0)             (y = lower digit, y >= 5)
// Purely combinational. Output is one digit wider than the input; its top
// digit is the carry of the top input digit. Input digits must be valid BCD.
module bcd_x2 #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic [N_DIGITS-1:0][3:0] x,
  output logic [N_DIGITS:0][3:0]   x2
);

  // ext[j+1] is input digit j; ext[0] and ext[N_DIGITS+1] are zero.
  logic [N_DIGITS+1:0][3:0] ext;

  always_comb begin
    ext = '0;
    ext[N_DIGITS:1] = x;
  end

  for (genvar j = 0; j <= N_DIGITS; j++) begin : g_digit
    sdm_pkg::bcd_digit_t d;   // own digit x_j
    sdm_pkg::bcd_digit_t l;   // lower digit x_{j-1}
    assign d = ext[j+1];
    assign l = ext[j];
    always_comb begin
      x2[j][3] = (d[3] & d[0]) | (d[2] & ~d[1] & ~d[0]);
      x2[j][2] = (d[3] & ~d[0]) | (d[1] & d[0]) | (~d[2] & d[1]);
      x2[j][1] = (d[3] & ~d[0]) | (~d[3] & ~d[2] & d[0]) | (d[2] & d[1] & ~d[0]);
      x2[j][0] = l[3] | (l[2] & (l[1] | l[0]));
    end
  end

endmodule
