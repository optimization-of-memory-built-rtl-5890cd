// mbisr_top_tb: end-to-end run of the whole design at its default size (1024 x 1 memory,
// 32 redundant words, March-SS), with stuck-at faults forced into the memory array by the
// bench.
//   Run 1: cell 8 stuck at 1 and cell 100 stuck at 0. March-SS reads 0 seven times per cell
//          (three in each of M1 and M3, once in M5) and 1 six times (three in each of M2
//          and M4), so 7 + 6 = 13 fault pulses are expected, two redundant words used, no
//          overflow, and the last fault reported is address 8 with correct data 0. The test
//          must take 22 * 1024 + 1 cycles from the start edge to 'done'.
//          Then normal mode: directed and random reads and writes checked against a model
//          of a fault-free memory ('mux_out' right while 'mem_out' shows the stuck value),
//          and the successive-read protection switched on and off.
//   Run 2: 33 stuck-at cells: the array fills and 'overflow' rises.
// Every mechanism (fault pulse, repeated fault on a programmed word, descending element,
// jump back inside an element, redundant read and write, blocked successive read,
// overflow, mode switch) is counted and must happen at least once.
module mbisr_top_tb;
  localparam int unsigned AW = 10, N = 1 << AW, WORDS = 32;
  logic clk = 1'b0, rst_n = 1'b0, test_mode = 1'b1, start = 1'b0, rec_enb = 1'b1;
  logic wr_ena = 1'b0, rd_ena = 1'b0;
  logic [AW-1:0] addr_in = '0;
  logic [0:0] data_in = '0;
  logic [0:0] mux_out, mem_out, fault_data;
  logic test_running, test_done, fault, rl_full, overflow, sr_block;
  logic [AW-1:0] fault_addr;
  logic [15:0] fault_count;
  logic [5:0] rl_used;
  int checks = 0, failures = 0;

  // fault injection: address -> stuck value
  logic stuck [int];
  logic model [N];
  int n_fault_pulses, n_sr_blocks, n_rl_reads, n_rl_writes, n_desc_ops, n_jumps,
      n_mode_switch, n_overflow, n_repeat_faults;
  int cyc, t_start, t_done;

  mbisr_top dut (.clk, .rst_n, .test_mode, .start, .rec_enb, .wr_ena, .rd_ena, .addr_in,
    .data_in, .mux_out, .mem_out, .test_running, .test_done, .fault, .fault_addr,
    .fault_data, .fault_count, .rl_used, .rl_full, .overflow, .sr_block);

  always #5 clk = ~clk;

  // hold the stuck cells at their value before every read edge
  always @(negedge clk) begin
    foreach (stuck[a]) dut.u_mut.mem[a] = stuck[a];
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fault) n_fault_pulses++;
    if (sr_block) n_sr_blocks++;
    if (test_running && dut.u_bist.ir.valid && dut.u_bist.ir.dec) n_desc_ops++;
    if (dut.u_bist.addr_step && dut.u_bist.ir.lo) n_jumps++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_test();
    @(negedge clk);
    test_mode = 1'b1;
    start = 1'b1;
    // count falling edges until 'done' is seen; the first rising edge after 'start' is
    // cycle 0, so the test length is that count minus one
    t_start = 0;
    t_done = 0;
    do begin
      @(negedge clk);
      start = 1'b0;
      t_done++;
    end while (!test_done);
    t_done--;
    repeat (5) @(negedge clk);
  endtask

  task automatic nwrite(int a, logic v);
    @(negedge clk);
    wr_ena = 1'b1; rd_ena = 1'b0; addr_in = AW'(a); data_in = v;
    if (dut.rl_hit) n_rl_writes++;
    @(negedge clk);
    wr_ena = 1'b0;
    model[a] = v;
  endtask

  task automatic nread(int a, string what);
    @(negedge clk);
    rd_ena = 1'b1; wr_ena = 1'b0; addr_in = AW'(a);
    if (dut.rl_hit) n_rl_reads++;
    @(negedge clk);
    rd_ena = 1'b0;
    chk(mux_out == model[a], $sformatf("%s: read %0d got %b expected %b", what, a, mux_out,
                                       model[a]));
  endtask

  initial begin
    cyc = 0;
    n_fault_pulses = 0; n_sr_blocks = 0; n_rl_reads = 0; n_rl_writes = 0; n_desc_ops = 0;
    n_jumps = 0; n_mode_switch = 0; n_overflow = 0; n_repeat_faults = 0;
    stuck[8] = 1'b1;
    stuck[100] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- run 1: two faults, repair ----------------
    run_test();
    chk(t_done - t_start == 22 * N + 1,
        $sformatf("test length %0d cycles, expected %0d", t_done - t_start, 22 * N + 1));
    chk(n_fault_pulses == 13, $sformatf("%0d fault pulses, expected 13", n_fault_pulses));
    chk(fault_count == 16'd13, "fault count");
    chk(rl_used == 2 && !overflow && !rl_full, $sformatf("%0d redundant words used", rl_used));
    chk(fault_addr == 10'd8 && fault_data == 1'b0, "last fault is address 8, data 0");
    chk(dut.u_rla.fa[0] && dut.u_rla.word_addr[0] == 10'd8, "word 0 holds address 8");
    chk(dut.u_rla.fa[1] && dut.u_rla.word_addr[1] == 10'd100, "word 1 holds address 100");
    n_repeat_faults = n_fault_pulses - rl_used;

    // ---------------- normal mode ----------------
    @(negedge clk);
    test_mode = 1'b0;
    n_mode_switch++;
    rec_enb = 1'b1;
    for (int a = 0; a < N; a++) model[a] = 1'b0;   // contents after March-SS: all zeros
    nwrite(8, 1'b1);
    nread(8, "repaired cell 8");
    nwrite(8, 1'b0);
    nread(8, "repaired cell 8");
    chk(mem_out == 1'b1, "raw memory output shows the stuck 1 at address 8");
    nwrite(100, 1'b1);
    nread(100, "repaired cell 100");
    nread(101, "fault-free cell 101");
    // successive-read protection on: the second read of 50 is kept from the SRAM
    rec_enb = 1'b0;
    nwrite(50, 1'b1);
    nread(50, "first read of 50");
    nread(50, "successive read of 50");
    chk(n_sr_blocks == 1, $sformatf("%0d blocked reads, expected 1", n_sr_blocks));
    // random traffic over a few addresses, protection toggling
    for (int i = 0; i < 2000; i++) begin
      int a;
      case ($urandom_range(0, 3))
        0: a = 8;
        1: a = 100;
        default: a = $urandom_range(0, 15) * 64 + 8;
      endcase
      rec_enb = ($urandom_range(0, 1) != 0);
      if ($urandom_range(0, 2) == 0) nwrite(a, 1'($urandom));
      else nread(a, "random read");
    end

    // ---------------- run 2: 33 faults, overflow ----------------
    rst_n = 1'b0;
    stuck.delete();
    for (int i = 0; i <= WORDS; i++) stuck[3 * i + 1] = 1'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rec_enb = 1'b1;
    n_mode_switch++;
    run_test();
    chk(rl_used == 6'(WORDS) && rl_full, "all redundant words used");
    chk(overflow, "overflow after 33 faulty cells");
    if (overflow) n_overflow++;

    // ---------------- every mechanism happened ----------------
    chk(n_fault_pulses > 0, "fault pulses");
    chk(n_repeat_faults > 0, "repeated faults on a programmed word");
    chk(n_desc_ops > 0, "descending elements");
    chk(n_jumps > 0, "jumps back to the first operation of an element");
    chk(n_rl_reads > 0, "reads served by the redundancy array");
    chk(n_rl_writes > 0, "writes taken by the redundancy array");
    chk(n_sr_blocks > 0, "blocked successive reads");
    chk(n_overflow > 0, "overflow");
    chk(n_mode_switch > 0, "mode switch");
    $display("fault pulses %0d, repeated %0d, descending ops %0d, jumps %0d, RL reads %0d, RL writes %0d, blocked reads %0d",
             n_fault_pulses, n_repeat_faults, n_desc_ops, n_jumps, n_rl_reads, n_rl_writes,
             n_sr_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
