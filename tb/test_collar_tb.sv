// test_collar_tb: applies random microwords and addresses and checks the registered memory
// controls, write/expected data (the data bit spread over an 8-bit word) and read strobe
// one clock later, against a model in the bench.
module test_collar_tb;
  import mbist_pkg::*;
  localparam int unsigned AW = 6, DW = 8;
  logic clk = 1'b0, rst_n = 1'b0, exec = 1'b0;
  microword_t ir;
  logic [AW-1:0] addr_in, addr;
  logic [DW-1:0] wdata;
  logic cen_n, wen_n, rd;
  int checks = 0, failures = 0;
  logic e_cen_n, e_wen_n, e_rd;
  logic [AW-1:0] e_addr;
  logic [DW-1:0] e_data;

  test_collar #(.ADDR_W(AW), .DATA_W(DW)) dut (.clk, .rst_n, .exec, .ir, .addr_in,
    .cen_n, .wen_n, .addr, .wdata, .rd);

  always #5 clk = ~clk;

  initial begin
    ir = '0; addr_in = '0;
    #12;
    checks++;
    if (cen_n !== 1'b1 || wen_n !== 1'b1 || rd !== 1'b0) failures++;
    rst_n = 1'b1;
    e_addr = '0; e_data = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      exec = $urandom_range(0, 3) != 0;
      ir = 7'($urandom);
      ir.valid = 1'b1;
      addr_in = AW'($urandom);
      e_cen_n = ~exec;
      e_wen_n = ~(exec & ir.wr);
      e_rd = exec & ~ir.wr;
      if (exec) begin
        e_addr = addr_in;
        e_data = ir.data ? 8'hFF : 8'h00;
      end
      @(negedge clk);
      checks++;
      if (cen_n !== e_cen_n || wen_n !== e_wen_n || rd !== e_rd || addr !== e_addr ||
          wdata !== e_data) begin
        failures++;
        $display("FAIL i=%0d got %b %b %b %h %h exp %b %b %b %h %h", i, cen_n, wen_n, rd,
                 addr, wdata, e_cen_n, e_wen_n, e_rd, e_addr, e_data);
      end
      exec = 1'b0;
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
