// addr_gen_tb: with a 4-bit address, walks up and down the whole space and checks every
// address and the 'last' flag against a counter in the bench; also checks that 'init'
// overrides 'step' and that no command holds the address.
module addr_gen_tb;
  localparam int unsigned AW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, init_dec = 1'b0, step = 1'b0, dec = 1'b0, last;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  int exp_a;

  addr_gen #(.ADDR_W(AW)) dut (.clk, .rst_n, .init, .init_dec, .step, .dec, .addr, .last);

  always #5 clk = ~clk;

  task automatic chk(int a, logic l);
    #1;
    checks++;
    if (addr !== AW'(a) || last !== l) begin
      failures++;
      $display("FAIL addr %0d last %b dec %b expected %0d %b", addr, last, dec, a, l);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    for (int d = 0; d < 2; d++) begin
      @(negedge clk);
      init = 1'b1; init_dec = d[0]; step = 1'b1; dec = ~d[0];
      @(negedge clk);
      init = 1'b0; dec = d[0];
      exp_a = d ? 15 : 0;
      for (int k = 0; k < 16; k++) begin
        chk(exp_a, k == 15);
        step = 1'b1;
        @(negedge clk);
        exp_a = d ? (exp_a + 15) % 16 : (exp_a + 1) % 16;
      end
      step = 1'b0;
      @(negedge clk);
      @(negedge clk);
      chk(exp_a, (d ? exp_a == 0 : exp_a == 15));
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
