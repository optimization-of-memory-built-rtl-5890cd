// pulse_gen: turns the level 'start' request into a one-cycle 'start_pulse' at its rising
// edge, which marks the start of a test run of the BIST controller.
//
// The input is registered once and compared with its current value:
//   start_pulse = start & ~start_q.
// The pulse is combinational from 'start', in the cycle where 'start' is first seen high;
// 'start' is expected to be synchronous to clk (no synchroniser is included, a choice of
// this design). Active-low asynchronous reset.
module pulse_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic start_pulse
);

  logic start_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= start;
  end

  assign start_pulse = start & ~start_q;

endmodule
