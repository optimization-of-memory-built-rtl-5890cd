// redundancy_array_tb: a 4-word array on a 6-bit address space. Test mode: programs words
// from fault pulses, checks that a repeated address updates its word instead of taking a
// new one, that the array fills and that one more faulty address sets 'overflow'. Normal
// mode: random reads and writes over repaired and unrepaired addresses, with the memory
// output driven by the bench; 'hit', the redundant write path and the output multiplexer
// are checked against a model.
module redundancy_array_tb;
  localparam int unsigned AW = 6, DW = 4, W = 4;
  logic clk = 1'b0, rst_n = 1'b0, test_mode = 1'b1, fault = 1'b0, wr = 1'b0, rd = 1'b0;
  logic [AW-1:0] fault_addr = '0, addr = '0;
  logic [DW-1:0] fault_data = '0, wdata = '0, mem_q = '0, mux_out;
  logic hit, full, overflow;
  logic [2:0] used;
  int checks = 0, failures = 0, hits = 0, misses = 0;
  logic [DW-1:0] model [int];
  logic [DW-1:0] exp_out;

  redundancy_array #(.ADDR_W(AW), .DATA_W(DW), .WORDS(W)) dut (.clk, .rst_n, .test_mode,
    .fault, .fault_addr, .fault_data, .addr, .wr, .rd, .wdata, .mem_q, .hit, .mux_out,
    .used, .full, .overflow);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic prog(int a, int dv);
    @(negedge clk);
    fault = 1'b1; fault_addr = AW'(a); fault_data = DW'(dv);
    @(negedge clk);
    fault = 1'b0;
  endtask

  initial begin
    #12 rst_n = 1'b1;
    chk(used == 0 && !full && !overflow, "reset state");
    prog(5, 3);
    prog(9, 1);
    prog(5, 7);
    chk(used == 2, "repeated address takes no new word");
    chk(hit == 1'b0, "no hit in test mode");
    prog(12, 2);
    prog(20, 4);
    chk(used == 4 && full && !overflow, "array full, no overflow yet");
    prog(9, 6);
    chk(!overflow, "known address when full is no overflow");
    prog(33, 5);
    chk(overflow, "new address when full sets overflow");
    model[5] = 7; model[9] = 6; model[12] = 2; model[20] = 4;

    @(negedge clk);
    test_mode = 1'b0;
    exp_out = '0;
    for (int i = 0; i < 400; i++) begin
      int sel;
      sel = $urandom_range(0, 5);
      addr = AW'((sel == 0) ? 5 : (sel == 1) ? 9 : (sel == 2) ? 12 : (sel == 3) ? 20 :
                 $urandom_range(0, 63));
      wr = $urandom_range(0, 2) == 0;
      rd = !wr && $urandom_range(0, 3) != 0;
      wdata = DW'($urandom);
      #1;
      chk(hit == model.exists(int'(addr)), "hit");
      @(negedge clk);
      if (rd) mem_q = DW'($urandom);   // memory read data, held until the next read
      if (rd) exp_out = model.exists(int'(addr)) ? model[int'(addr)] : mem_q;
      if (rd && model.exists(int'(addr))) hits++;
      if (rd && !model.exists(int'(addr))) misses++;
      if (wr && model.exists(int'(addr))) model[int'(addr)] = wdata;
      wr = 1'b0; rd = 1'b0;
      #1;
      // after a read the output shows the redundant word or this cycle's memory data
      if (exp_out !== mux_out) begin
        chk(1'b0, $sformatf("mux_out %h expected %h", mux_out, exp_out));
      end else checks++;
    end
    chk(hits > 10 && misses > 10, "both output paths used");
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
