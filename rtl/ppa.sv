// ppa: partial product accumulator, one decimal add per iteration.
//
// Computes P[i+1] = 0.1*P[i] + U[i] + V[i] in BCD 8421, where 0.1*P[i] is the
// running sum with its lowest digit already shifted out (p_shift, N digits)
// and U, V are the double-BCD partial product (N+1 digits each). Three digits
// and an incoming carry of 0..2 are added per position: the binary sum s is at
// most 9+9+9+2 = 29, the digit is s mod 10 and the carry s div 10 ripples to
// the next digit. For valid operands the sum always fits in N+1 digits
// (P stays below 10*X), so the carry out of the top digit is zero and is
// not brought out.
// Purely combinational; the critical path is the N+1 digit carry ripple.
module ppa #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic [N_DIGITS-1:0][3:0] p_shift,
  input  logic [N_DIGITS:0][3:0]   u,
  input  logic [N_DIGITS:0][3:0]   v,
  output logic [N_DIGITS:0][3:0]   p_next
);

  always_comb begin
    logic [1:0] carry;
    logic [4:0] s;
    carry = 2'd0;
    for (int j = 0; j <= N_DIGITS; j++) begin
      s = 5'(u[j]) + 5'(v[j]) + 5'(carry);
      if (j < N_DIGITS) s = s + 5'(p_shift[j]);
      if (s >= 5'd20) begin
        p_next[j] = 4'(s - 5'd20);
        carry     = 2'd2;
      end else if (s >= 5'd10) begin
        p_next[j] = 4'(s - 5'd10);
        carry     = 2'd1;
      end else begin
        p_next[j] = 4'(s);
        carry     = 2'd0;
      end
    end
  end

endmodule
