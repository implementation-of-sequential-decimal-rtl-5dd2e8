// bcd_x5: carry-free multiplication of a BCD 8421 number by five.
//
// 5*x = 10*floor(x/2) + 5*(x mod 2) digit by digit, so result digit j is
// 5*x_j[0] + floor(x_{j-1}/2): at most 5 + 4 = 9, never a carry. With l the
// lower digit x_{j-1} and a = x_j[0] the design's bit equations are
//   bit3 = a (l3 + l2 l1)
//   bit2 = l3 xor (a !(l2 l1))
//   bit1 = l2 xor (l1 a)
//   bit0 = a xor l1
// Purely combinational; the output is one digit wider than the input.
// Input digits must be valid BCD.
module bcd_x5 #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic [N_DIGITS-1:0][3:0] x,
  output logic [N_DIGITS:0][3:0]   x5
);

  // ext[j+1] is input digit j; ext[0] and ext[N_DIGITS+1] are zero.
  logic [N_DIGITS+1:0][3:0] ext;

  always_comb begin
    ext = '0;
    ext[N_DIGITS:1] = x;
  end

  for (genvar j = 0; j <= N_DIGITS; j++) begin : g_digit
    logic       a;   // x_j is odd
    logic [3:1] l;   // floor(x_{j-1} / 2), the upper bits of the lower digit
    assign a = ext[j+1][0];
    assign l = ext[j][3:1];
    always_comb begin
      x5[j][3] = a & (l[3] | (l[2] & l[1]));
      x5[j][2] = l[3] ^ (a & ~(l[2] & l[1]));
      x5[j][1] = l[2] ^ (l[1] & a);
      x5[j][0] = a ^ l[1];
    end
  end

endmodule
