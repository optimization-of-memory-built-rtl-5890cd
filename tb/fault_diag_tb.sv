// fault_diag_tb: issues random reads with random expected data against a memory output
// that is sometimes wrong, and checks the fault pulse, failing address, correct data and
// fault count two cycles after each read, against a model in the bench.
module fault_diag_tb;
  localparam int unsigned AW = 6, DW = 4;
  logic clk = 1'b0, rst_n = 1'b0, rd = 1'b0, fault;
  logic [AW-1:0] addr = '0, fault_addr;
  logic [DW-1:0] exp_data = '0, mem_q = '0, fault_data;
  logic [15:0] fault_count;
  int checks = 0, failures = 0, n_faults = 0, n_ok = 0;

  typedef struct { bit rd; bit bad; logic [AW-1:0] a; logic [DW-1:0] e; } rec_t;
  rec_t hist[$];
  rec_t r;
  logic [AW-1:0] last_fa;
  logic [DW-1:0] last_fd;
  int exp_cnt;

  fault_diag #(.ADDR_W(AW), .DATA_W(DW), .CNT_W(16)) dut (.clk, .rst_n, .rd, .addr,
    .exp_data, .mem_q, .fault, .fault_addr, .fault_data, .fault_count);

  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1'b1;
    exp_cnt = 0; last_fa = '0; last_fd = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      // memory answer for the read issued one cycle ago
      if (hist.size() > 0) begin
        r = hist[hist.size()-1];
        mem_q = r.bad ? r.e ^ DW'($urandom_range(1, (1 << DW) - 1)) : r.e;
        if (!r.rd) mem_q = DW'($urandom);
      end
      // result of the read issued two cycles ago
      if (hist.size() > 1) begin
        r = hist[hist.size()-2];
        checks++;
        if (fault !== (r.rd && r.bad)) begin
          failures++;
          $display("FAIL i=%0d fault=%b expected %b", i, fault, r.rd && r.bad);
        end
        if (r.rd && r.bad) begin
          exp_cnt++; last_fa = r.a; last_fd = r.e; n_faults++;
        end else if (r.rd) n_ok++;
        checks++;
        if (fault_addr !== last_fa || fault_data !== last_fd || fault_count !== 16'(exp_cnt)) begin
          failures++;
          $display("FAIL i=%0d diag %h %h %0d expected %h %h %0d", i, fault_addr, fault_data,
                   fault_count, last_fa, last_fd, exp_cnt);
        end
      end
      r.rd = $urandom_range(0, 2) != 0;
      r.bad = $urandom_range(0, 3) == 0;
      r.a = AW'($urandom);
      r.e = DW'($urandom);
      rd = r.rd; addr = r.a; exp_data = r.e;
      hist.push_back(r);
    end
    checks++;
    if (n_faults == 0 || n_ok == 0) failures++;
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
