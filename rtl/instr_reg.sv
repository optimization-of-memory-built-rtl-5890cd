// instr_reg: instruction register (IR) of the BIST controller.
//
// Holds the microword of the operation being applied to the memory under test and decodes
// its position flags (FO/IO/LO) into an element-position code for the instruction pointer.
// It loads the word fetched at the instruction pointer's next value on every clock edge,
// so that in each cycle 'ir' is the word at the current instruction pointer. Cleared
// (an invalid, end-of-test word) by the active-low asynchronous reset. An assertion checks
// that a valid word sets at most one of FO/IO/LO.
module instr_reg
  import mbist_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  microword_t word_in,
  output microword_t ir,
  output elem_pos_e  pos
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ir <= '0;
    else        ir <= word_in;
  end

  assign pos = elem_pos(ir);

  // A legal microword marks at most one of first / in-between / last operation.
  a_one_pos: assert property (@(posedge clk) disable iff (!rst_n)
                              ir.valid |-> $onehot0({ir.fo, ir.io, ir.lo}));

endmodule
