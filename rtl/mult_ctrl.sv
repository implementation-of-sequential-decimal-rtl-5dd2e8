// mult_ctrl: iteration controller of the sequential multiplier.
//
// Two states. In IDLE a start pulse asserts load for that cycle (operands are
// captured and the accumulator cleared at the clock edge) and moves to RUN.
// RUN asserts step for exactly N_DIGITS cycles, one per multiplier digit,
// then returns to IDLE and raises done for one cycle, the cycle in which the
// product register holds the final result. start is ignored while busy.
// The controller itself follows from the one-digit-per-clock schedule of the
// design; the two-state form and the registered done are local choices.
// Asynchronous active-low reset.
module mult_ctrl #(
  parameter int unsigned N_DIGITS = sdm_pkg::N_DIGITS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,
  output logic step,
  output logic busy,
  output logic done
);

  localparam int unsigned CW = (N_DIGITS > 1) ? $clog2(N_DIGITS) : 1;

  sdm_pkg::ctrl_state_t state_q;
  logic [CW-1:0]        cnt_q;
  logic                 last;

  assign last = (cnt_q == CW'(N_DIGITS - 1));
  assign load = (state_q == sdm_pkg::ST_IDLE) && start;
  assign step = (state_q == sdm_pkg::ST_RUN);
  assign busy = (state_q == sdm_pkg::ST_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= sdm_pkg::ST_IDLE;
      cnt_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        sdm_pkg::ST_IDLE: begin
          if (start) begin
            state_q <= sdm_pkg::ST_RUN;
            cnt_q   <= '0;
          end
        end
        sdm_pkg::ST_RUN: begin
          cnt_q <= cnt_q + 1'b1;
          if (last) begin
            state_q <= sdm_pkg::ST_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= sdm_pkg::ST_IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse and never overlaps an iteration.
  a_done_pulse : assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_done_idle  : assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
