// rec_dmrdf_tb: shows what the reliability enhancement circuit is for. A memory whose cell 3
// flips on its third read in a row (a deceptive multiple read destructive fault) is read
// repeatedly at that address, mixed with writes and reads elsewhere. With protection on
// (enb = 0) only the first read of each run reaches the memory, and every read returns the
// right data. With protection off (enb = 1) the same traffic must corrupt the cell, which
// shows the bench really exercises the fault.
module rec_dmrdf_tb;
  localparam int unsigned AW = 5, DW = 8, FA = 3;
  logic clk = 1'b0, rst_n = 1'b0, enb = 1'b0, cen_n = 1'b1, wen_n = 1'b1, cen_out_n, sr;
  logic [AW-1:0] a = '0;
  logic [DW-1:0] d = '0, q;
  logic [DW-1:0] model [1 << AW];
  int checks = 0, failures = 0, wrong_protected = 0, wrong_unprotected = 0, blocked = 0;

  rec #(.ADDR_W(AW)) dut (.clk, .rst_n, .enb, .cen_n, .wen_n, .a, .cen_out_n, .sr);
  sram_dmrdf_model #(.ADDR_W(AW), .DATA_W(DW), .FAULT_ADDR(FA), .K(3)) u_ram (
    .clk, .cen_n(cen_out_n), .wen_n, .a, .d, .q);

  always #5 clk = ~clk;

  task automatic wr(int ad, logic [DW-1:0] v);
    @(negedge clk);
    cen_n = 1'b0; wen_n = 1'b0; a = AW'(ad); d = v;
    model[ad] = v;
    @(negedge clk);
    cen_n = 1'b1; wen_n = 1'b1;
  endtask

  task automatic rd(int ad);
    @(negedge clk);
    cen_n = 1'b0; wen_n = 1'b1; a = AW'(ad);
    #1;
    if (cen_out_n) blocked++;
    @(negedge clk);
    cen_n = 1'b1;
    if (q !== model[ad]) begin
      if (enb) wrong_unprotected++;
      else wrong_protected++;
    end
  endtask

  task automatic traffic();
    for (int r = 0; r < 20; r++) begin
      wr(FA, DW'($urandom));
      wr(7, DW'($urandom));
      for (int k = 0; k < 6; k++) rd(FA);
      rd(7);
      rd(FA);
      rd(FA);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    enb = 1'b0;
    traffic();
    checks++;
    if (wrong_protected != 0) begin
      failures++;
      $display("FAIL %0d wrong reads with protection on", wrong_protected);
    end
    checks++;
    if (blocked == 0) begin
      failures++;
      $display("FAIL no read was blocked");
    end
    enb = 1'b1;
    traffic();
    checks++;
    if (wrong_unprotected == 0) begin
      failures++;
      $display("FAIL the fault never showed without protection");
    end
    $display("blocked reads %0d, wrong reads without protection %0d", blocked,
             wrong_unprotected);
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
