// sram_sp_tb: random writes, reads and idle cycles on a 64 x 8 instance, checked against
// an array in the bench; read data must appear one cycle after the read and hold through
// idle cycles and writes.
module sram_sp_tb;
  localparam int unsigned AW = 6, DW = 8;
  logic clk = 1'b0, cen_n = 1'b1, wen_n = 1'b1;
  logic [AW-1:0] a = '0;
  logic [DW-1:0] d = '0, q;
  logic [DW-1:0] model [1 << AW];
  logic [DW-1:0] exp_q;
  int checks = 0, failures = 0;
  int op;

  sram_sp #(.ADDR_W(AW), .DATA_W(DW)) dut (.clk, .cen_n, .wen_n, .a, .d, .q);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      cen_n = 1'b0; wen_n = 1'b0; a = AW'(i); d = DW'($urandom);
      model[i] = d;
    end
    @(negedge clk);
    cen_n = 1'b0; wen_n = 1'b1; a = '0;
    exp_q = model[0];
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL i=%0d q=%h expected %h", i, q, exp_q);
      end
      op = $urandom_range(0, 2);
      a = AW'($urandom); d = DW'($urandom);
      cen_n = (op == 2); wen_n = (op != 0);
      if (op == 0) model[a] = d;
      else if (op == 1) exp_q = model[a];
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
