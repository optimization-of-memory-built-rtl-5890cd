// mbisr_byte_tb: the whole design in its byte-wide form (8-bit data words, the width named
// for the data patterns) on a 64-word memory with 4 redundant words. Bit 3 of word 9 is
// stuck at 1: March-SS must report 7 fault pulses (its seven all-zeros reads of that word),
// all for address 9 with correct data 8'h00, and take 22 * 64 + 1 cycles. In normal mode
// the repaired word must return whatever byte was written while the raw memory output
// shows the stuck bit; other words are served by the memory.
module mbisr_byte_tb;
  localparam int unsigned AW = 6, DW = 8, N = 1 << AW;
  logic clk = 1'b0, rst_n = 1'b0, test_mode = 1'b1, start = 1'b0, rec_enb = 1'b1;
  logic wr_ena = 1'b0, rd_ena = 1'b0;
  logic [AW-1:0] addr_in = '0, fault_addr;
  logic [DW-1:0] data_in = '0, mux_out, mem_out, fault_data;
  logic test_running, test_done, fault, rl_full, overflow, sr_block;
  logic [15:0] fault_count;
  logic [2:0] rl_used;
  int checks = 0, failures = 0, n_pulses = 0, n_cyc = 0;
  logic [DW-1:0] model [N];

  mbisr_top #(.ADDR_W(AW), .DATA_W(DW), .RL_WORDS(4)) dut (.clk, .rst_n, .test_mode, .start,
    .rec_enb, .wr_ena, .rd_ena, .addr_in, .data_in, .mux_out, .mem_out, .test_running,
    .test_done, .fault, .fault_addr, .fault_data, .fault_count, .rl_used, .rl_full,
    .overflow, .sr_block);

  always #5 clk = ~clk;

  always @(negedge clk) dut.u_mut.mem[9][3] = 1'b1;

  always @(posedge clk) if (fault) begin
    n_pulses++;
    checks++;
    if (fault_addr !== 6'd9 || fault_data !== 8'h00) begin
      failures++;
      $display("FAIL fault at %0d data %h", fault_addr, fault_data);
    end
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    do begin
      @(negedge clk);
      start = 1'b0;
      n_cyc++;
    end while (!test_done);
    repeat (5) @(negedge clk);
    chk(n_cyc - 1 == 22 * N + 1, $sformatf("test took %0d cycles", n_cyc - 1));
    chk(n_pulses == 7, $sformatf("%0d fault pulses, expected 7", n_pulses));
    chk(rl_used == 3'd1 && !overflow, "one redundant word used");
    test_mode = 1'b0;
    for (int a = 0; a < N; a++) model[a] = 8'h00;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = ($urandom_range(0, 2) == 0) ? 9 : $urandom_range(0, N - 1);
      @(negedge clk);
      if ($urandom_range(0, 1) == 0) begin
        wr_ena = 1'b1; addr_in = AW'(a); data_in = DW'($urandom);
        model[a] = data_in;
        @(negedge clk);
        wr_ena = 1'b0;
      end else begin
        rd_ena = 1'b1; addr_in = AW'(a);
        @(negedge clk);
        rd_ena = 1'b0;
        chk(mux_out == model[a], $sformatf("read %0d got %h expected %h", a, mux_out, model[a]));
        if (a == 9) chk(mem_out[3] == 1'b1, "raw output of word 9 shows the stuck bit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
