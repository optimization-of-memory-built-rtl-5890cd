// srd_tb: checks the successive read detector on the reference example (reads of A1, A1,
// A2: SR only on the second), on a write between two reads of one address (no SR), on
// idle cycles between two reads (SR kept), and on random traffic against a model.
module srd_tb;
  localparam int unsigned AW = 5;
  logic clk = 1'b0, rst_n = 1'b0, cen_n = 1'b1, wen_n = 1'b1, sr;
  logic [AW-1:0] a = '0;
  int checks = 0, failures = 0, n_sr = 0;
  logic m_y;
  logic [AW-1:0] m_a;

  srd #(.ADDR_W(AW)) dut (.clk, .rst_n, .cen_n, .wen_n, .a, .sr);

  always #5 clk = ~clk;

  task automatic acc(logic c, logic w, logic [AW-1:0] ad, logic exp_sr);
    @(negedge clk);
    cen_n = c; wen_n = w; a = ad;
    #1;
    checks++;
    if (sr !== exp_sr) begin
      failures++;
      $display("FAIL cen=%b wen=%b a=%0d sr=%b expected %b", c, w, ad, sr, exp_sr);
    end
    if (sr) n_sr++;
  endtask

  initial begin
    #12 rst_n = 1'b1;
    acc(1'b0, 1'b1, 5'd1, 1'b0);   // read A1
    acc(1'b0, 1'b1, 5'd1, 1'b1);   // read A1 again: successive read
    acc(1'b0, 1'b1, 5'd2, 1'b0);   // read A2
    acc(1'b0, 1'b0, 5'd2, 1'b0);   // write A2
    acc(1'b0, 1'b1, 5'd2, 1'b0);   // read A2 after a write: allowed
    acc(1'b1, 1'b1, 5'd2, 1'b1);   // idle, same address on the port
    acc(1'b0, 1'b1, 5'd2, 1'b1);   // read A2 again after idle: successive read
    // random traffic against a model
    m_y = 1'b1; m_a = 5'd2;
    for (int i = 0; i < 500; i++) begin
      logic c, w;
      logic [AW-1:0] ad;
      c = $urandom_range(0, 3) == 0;
      w = $urandom_range(0, 3) != 0;
      ad = AW'($urandom_range(0, 3));
      acc(c, w, ad, m_y & w & (ad == m_a));
      if (!c) begin
        if (w) begin m_y = 1'b1; m_a = ad; end
        else m_y = 1'b0;
      end
    end
    checks++;
    if (n_sr < 5) failures++;
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
