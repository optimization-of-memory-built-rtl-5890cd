// rec_tb: places the reliability enhancement circuit in front of a 32 x 8 SRAM and checks
// that, with protection on (enb = 0), a repeated read of one address leaves the SRAM idle
// while its output still gives the right data; that with enb = 1 the chip enable passes
// unchanged; and that reads of other addresses and writes are never blocked.
module rec_tb;
  localparam int unsigned AW = 5, DW = 8;
  logic clk = 1'b0, rst_n = 1'b0, enb = 1'b0, cen_n = 1'b1, wen_n = 1'b1;
  logic cen_out_n, sr;
  logic [AW-1:0] a = '0;
  logic [DW-1:0] d = '0, q;
  logic [DW-1:0] model [1 << AW];
  int checks = 0, failures = 0, blocked = 0, sram_reads = 0;
  logic m_y;
  logic [AW-1:0] m_a;
  logic [DW-1:0] exp_q;

  rec #(.ADDR_W(AW)) dut (.clk, .rst_n, .enb, .cen_n, .wen_n, .a, .cen_out_n, .sr);
  sram_sp #(.ADDR_W(AW), .DATA_W(DW)) u_ram (.clk, .cen_n(cen_out_n), .wen_n, .a, .d, .q);

  always #5 clk = ~clk;

  always @(posedge clk) if (!cen_out_n && wen_n) sram_reads++;

  initial begin
    #12 rst_n = 1'b1;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      cen_n = 1'b0; wen_n = 1'b0; a = AW'(i); d = DW'($urandom);
      model[i] = d;
    end
    m_y = 1'b0; m_a = '0; exp_q = '0;
    for (int i = 0; i < 800; i++) begin
      logic c, w, e;
      @(negedge clk);
      if (i > 0 && m_y) begin
        checks++;
        if (q !== exp_q) begin
          failures++;
          $display("FAIL i=%0d q=%h expected %h", i, q, exp_q);
        end
      end
      e = (i >= 400);                       // protection off in the second half
      c = $urandom_range(0, 4) == 0;
      w = $urandom_range(0, 4) != 0;
      enb = e;
      cen_n = c; wen_n = w; a = AW'($urandom_range(0, 2)); d = DW'($urandom);
      #1;
      checks++;
      if (cen_out_n !== (c | (!e & m_y & w & (a == m_a)))) begin
        failures++;
        $display("FAIL i=%0d cen_out_n=%b", i, cen_out_n);
      end
      if (!c && cen_out_n) blocked++;
      if (!c) begin
        if (w) begin m_y = 1'b1; m_a = a; exp_q = model[a]; end
        else begin m_y = 1'b0; model[a] = d; end
      end
    end
    checks++;
    if (blocked == 0) begin
      failures++;
      $display("FAIL no read was blocked");
    end
    $display("blocked reads: %0d, SRAM reads: %0d", blocked, sram_reads);
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
