// seq_dec_mult_top: bus-fed sequential decimal multiplier.
//
// The complete multiplier as it sits on a data bus. A start pulse marks the
// cycle in which data_bus carries operand A, the multiplicand X; the next
// cycle carries operand B, the multiplier Y, both unsigned BCD 8421 with
// N_DIGITS digits (8 by default: a 32-bit bus). operand_loader collects the
// pair and starts seq_dec_mult, which consumes one multiplier digit per clock.
// Timing, counted in clock edges from the one that samples start:
//   edge 0   A captured
//   edge 1   B captured by the core, accumulator cleared
//   edges 2..N+1 the N digit iterations
//   done is high for one cycle after edge N+1 with the 2N-digit product.
// product holds its value until the next operation finishes iterating; a
// start while busy is ignored. The separate product port (rather than
// driving the result back onto the operand bus) is a local choice.
// Asynchronous active-low reset.
module seq_dec_mult_top #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [4*N_DIGITS-1:0]      data_bus,
  output logic                       busy,
  output logic                       done,
  output logic [8*N_DIGITS-1:0]      product
);

  logic                     go, loading, core_busy;
  logic [N_DIGITS-1:0][3:0] a, b;

  operand_loader #(.N_DIGITS(N_DIGITS)) u_load (
    .clk, .rst_n, .start, .enable(!core_busy), .data_bus, .go, .a, .b, .loading
  );

  seq_dec_mult #(.N_DIGITS(N_DIGITS)) u_core (
    .clk, .rst_n, .start(go), .x(a), .y(b), .busy(core_busy), .done, .product
  );

  assign busy = loading | core_busy;

endmodule
