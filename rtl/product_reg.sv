// product_reg: accumulator register with the digit shifter of the product.
//
// Holds the running sum P (N+1 digits). On shift it loads P[i+1] from the
// accumulator and moves the lowest digit of the old P, which no later partial
// product can change, into the top of a register of low product digits that
// shifts right by one digit. After N shifts from a clear, P holds the upper
// N+1 digits of the product and the low register the lower N-1 digits (the
// first digit shifted out, of the cleared P, falls off the end).
// p_shift = P without its lowest digit is the 0.1*P[i] fed back to the
// accumulator. clear wins over shift. Asynchronous active-low reset.
module product_reg #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       shift,
  input  logic [N_DIGITS:0][3:0]     p_next,
  output logic [N_DIGITS-1:0][3:0]   p_shift,
  output logic [2*N_DIGITS-1:0][3:0] product
);

  logic [N_DIGITS:0][3:0]   p_q;
  logic [N_DIGITS-2:0][3:0] low_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q   <= '0;
      low_q <= '0;
    end else if (clear) begin
      p_q   <= '0;
      low_q <= '0;
    end else if (shift) begin
      p_q <= p_next;
      for (int k = 0; k < int'(N_DIGITS) - 2; k++) low_q[k] <= low_q[k+1];
      low_q[N_DIGITS-2] <= p_q[0];
    end
  end

  assign p_shift = p_q[N_DIGITS:1];
  assign product = {p_q, low_q};

endmodule
