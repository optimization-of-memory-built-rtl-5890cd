// instr_rom_tb: reads every address of the instruction storage unit and compares it with
// the March-SS microwords written out by hand in hex (bit #1 = MSB), then checks that
// addresses past the program read as an end-of-test (Valid = 0) word.
module instr_rom_tb;
  import mbist_pkg::*;
  localparam int unsigned DEPTH = 22;
  localparam int unsigned IP_W  = 5;
  logic [IP_W-1:0] addr;
  microword_t      word;
  int checks = 0, failures = 0;

  // M0 w0 | M1 up r0 r0 w0 r0 w1 | M2 up r1 r1 w1 r1 w0 | M3 down r0 r0 w0 r0 w1 |
  // M4 down r1 r1 w1 r1 w0 | M5 r0 (descending)
  localparam logic [6:0] EXP [DEPTH] = '{
    7'h42,
    7'h60, 7'h50, 7'h52, 7'h50, 7'h4B,
    7'h61, 7'h51, 7'h53, 7'h51, 7'h4A,
    7'h64, 7'h54, 7'h56, 7'h54, 7'h4F,
    7'h65, 7'h55, 7'h57, 7'h55, 7'h4E,
    7'h44
  };

  instr_rom #(.DEPTH(DEPTH), .IP_W(IP_W)) dut (.addr, .word);

  initial begin
    for (int i = 0; i < 32; i++) begin
      addr = IP_W'(i);
      #1;
      checks++;
      if (i < DEPTH) begin
        if (word !== EXP[i]) begin
          failures++;
          $display("FAIL addr %0d word %h expected %h", i, word, EXP[i]);
        end
      end else if (word.valid !== 1'b0) begin
        failures++;
        $display("FAIL addr %0d should be end of test, got %h", i, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
