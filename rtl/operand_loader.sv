// operand_loader: takes the two operands from a shared data bus.
//
// An operation begins with a start pulse; the data bus carries operand A (the
// multiplicand) in the start cycle and operand B (the multiplier) in the next
// cycle. A is registered at the start edge; in the following cycle go is
// asserted with a = registered A and b = the bus, so B needs no register and
// the core loads both at the end of that cycle. start is accepted only when
// enable is high (the core is free) and no load is already in progress.
// Two consecutive bus cycles per operation follow the design; passing B
// through unregistered is a local choice. Asynchronous active-low reset.
module operand_loader #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     enable,
  input  logic [N_DIGITS-1:0][3:0] data_bus,
  output logic                     go,
  output logic [N_DIGITS-1:0][3:0] a,
  output logic [N_DIGITS-1:0][3:0] b,
  output logic                     loading
);

  logic [N_DIGITS-1:0][3:0] a_q;
  logic                     loading_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      loading_q <= 1'b0;
    end else if (loading_q) begin
      loading_q <= 1'b0;
    end else if (start && enable) begin
      a_q       <= data_bus;
      loading_q <= 1'b1;
    end
  end

  assign go      = loading_q;
  assign a       = a_q;
  assign b       = data_bus;
  assign loading = loading_q;

  // go lasts exactly one cycle per accepted start.
  a_go_pulse : assert property (@(posedge clk) disable iff (!rst_n) go |=> !go);

endmodule
