// instr_rom: microcode instruction storage unit of the BIST controller.
//
// Holds the test program, one 7-bit microword (mbist_pkg::microword_t) per memory operation.
// The default contents are the March-SS program of the original architecture (22 words, see
// mbist_pkg::march_ss_word). Any address at or beyond DEPTH reads as an all-zero word,
// whose cleared Valid bit ends the test. Another March algorithm is run by changing the
// contents function and DEPTH.
//
// Read is combinational (address in, word out in the same cycle); the instruction register
// downstream provides the pipeline register. Written as a case-free table built at
// elaboration, so it maps to LUTs or a small ROM.
module instr_rom
  import mbist_pkg::*;
#(
  parameter int unsigned DEPTH = MARCH_SS_LEN,
  parameter int unsigned IP_W  = $clog2(DEPTH + 1)
) (
  input  logic [IP_W-1:0] addr,
  output microword_t      word
);

  microword_t rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    assign rom[i] = march_ss_word(i);
  end

  always_comb begin
    if (int'(addr) < DEPTH) word = rom[addr];
    else                    word = '0;
  end

endmodule
