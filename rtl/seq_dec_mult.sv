// seq_dec_mult: sequential BCD 8421 decimal multiplier core.
//
// Multiplies an N-digit multiplicand X by an N-digit multiplier Y, both
// unsigned BCD, one multiplier digit per clock, least significant first:
//   easy_multiples  X, 2X, 4X, 5X of the registered X (fixed for the run)
//   ppg             picks U[i], V[i] with U+V = Y_i * X for digit Y_i
//   ppa             P[i+1] = 0.1*P[i] + U[i] + V[i]
//   product_reg     holds P, shifts its lowest digit into the low product
//   mult_ctrl       load on start, N step cycles, done pulse
// The multiplier register shifts right one digit per step, so its digit 0
// is always Y_i. After N steps the 2N-digit product sits in product_reg.
// Timing: start is sampled at a clock edge (X, Y captured, P cleared); the
// next N edges are the iterations; done is high for the one cycle after the
// last of them, N cycles after the start edge. product stays valid until the
// next start. busy is high during the N iteration cycles, when start is
// ignored. Asynchronous active-low reset. N_DIGITS must be at least 2.
module seq_dec_mult #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [N_DIGITS-1:0][3:0]   x,
  input  logic [N_DIGITS-1:0][3:0]   y,
  output logic                       busy,
  output logic                       done,
  output logic [2*N_DIGITS-1:0][3:0] product
);

  if (N_DIGITS < 2) begin : g_bad_size
    $error("seq_dec_mult: N_DIGITS must be at least 2");
  end

  logic load, step;

  logic [N_DIGITS-1:0][3:0] x_q, y_q;
  logic [N_DIGITS:0][3:0]   m1, m2, m4, m5;
  logic [N_DIGITS:0][3:0]   u, v;
  logic [N_DIGITS:0][3:0]   p_next;
  logic [N_DIGITS-1:0][3:0] p_shift;

  mult_ctrl #(.N_DIGITS(N_DIGITS)) u_ctrl (
    .clk, .rst_n, .start, .load, .step, .busy, .done
  );

  // Operand registers: X held, Y shifted one digit right per iteration.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else if (load) begin
      x_q <= x;
      y_q <= y;
    end else if (step) begin
      y_q <= {4'h0, y_q[N_DIGITS-1:1]};
    end
  end

  easy_multiples #(.N_DIGITS(N_DIGITS)) u_mult (
    .x(x_q), .x1(m1), .x2(m2), .x4(m4), .x5(m5)
  );

  ppg #(.N_DIGITS(N_DIGITS)) u_ppg (
    .x1(m1), .x2(m2), .x4(m4), .x5(m5), .yi(y_q[0]), .u, .v
  );

  ppa #(.N_DIGITS(N_DIGITS)) u_ppa (
    .p_shift, .u, .v, .p_next
  );

  product_reg #(.N_DIGITS(N_DIGITS)) u_preg (
    .clk, .rst_n, .clear(load), .shift(step), .p_next, .p_shift, .product
  );

endmodule
