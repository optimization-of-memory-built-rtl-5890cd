// instr_reg_tb: loads random microwords into the instruction register and checks the
// held word (one clock later) and the decoded element position.
module instr_reg_tb;
  import mbist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  microword_t word_in, ir;
  elem_pos_e  pos;
  int checks = 0, failures = 0;
  logic [6:0] w;
  elem_pos_e exp_pos;

  instr_reg dut (.clk, .rst_n, .word_in, .ir, .pos);

  always #5 clk = ~clk;

  initial begin
    word_in = '0;
    #12;
    checks++;
    if (ir !== '0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      // keep at most one of FO/IO/LO set, as legal words do
      w = 7'($urandom);
      case ($urandom_range(0, 3))
        0: w[5:3] = 3'b000;
        1: w[5:3] = 3'b100;
        2: w[5:3] = 3'b010;
        default: w[5:3] = 3'b001;
      endcase
      word_in = w;
      @(negedge clk);
      exp_pos = (w[5:3] == 3'b100) ? ELEM_FIRST : (w[5:3] == 3'b010) ? ELEM_MIDDLE :
                (w[5:3] == 3'b001) ? ELEM_LAST : ELEM_SINGLE;
      checks++;
      if (ir !== w || pos !== exp_pos) begin
        failures++;
        $display("FAIL word %h ir %h pos %0d exp %0d", w, ir, pos, exp_pos);
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
