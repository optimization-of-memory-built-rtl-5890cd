// mbist_ctrl_tb: runs the BIST controller over a 16-word address space and records every
// memory operation on the collar outputs. The reference stream is expanded in the bench
// from the March-SS notation
//   M0 (w0); up (r0,r0,w0,r0,w1); up (r1,r1,w1,r1,w0); down (r0,r0,w0,r0,w1);
//   down (r1,r1,w1,r1,w0); down (r0)
// and must match operation by operation (read/write, address, data, read strobe). Also
// checked: one operation per cycle with no bubbles (22 * 16 cycles), 'done' at the end,
// and a second run started by a new rising edge of 'start'.
module mbist_ctrl_tb;
  localparam int unsigned AW = 4;
  localparam int unsigned N  = 1 << AW;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic t_cen_n, t_wen_n, t_rd, running, done;
  logic [AW-1:0] t_addr;
  logic [0:0]    t_data;
  int checks = 0, failures = 0;

  typedef struct { bit wr; bit d; int a; } op_t;
  op_t expq[$];
  int  n_ops, first_cyc, last_cyc, cyc;

  mbist_ctrl #(.ADDR_W(AW), .DATA_W(1)) dut (.clk, .rst_n, .start, .t_cen_n, .t_wen_n,
    .t_addr, .t_data, .t_rd, .running, .done);

  always #5 clk = ~clk;

  task automatic add_elem(bit down, string ops);
    for (int k = 0; k < N; k++) begin
      int a;
      a = down ? N - 1 - k : k;
      for (int j = 0; j < ops.len(); j += 2) begin
        op_t o;
        o.wr = (ops[j] == "w");
        o.d  = (ops[j+1] == "1");
        o.a  = a;
        expq.push_back(o);
      end
    end
  endtask

  task automatic build_ref();
    expq.delete();
    add_elem(1'b0, "w0");
    add_elem(1'b0, "r0r0w0r0w1");
    add_elem(1'b0, "r1r1w1r1w0");
    add_elem(1'b1, "r0r0w0r0w1");
    add_elem(1'b1, "r1r1w1r1w0");
    add_elem(1'b1, "r0");
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !t_cen_n) begin
      op_t o;
      if (n_ops == 0) first_cyc = cyc;
      last_cyc = cyc;
      n_ops++;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL extra operation at %0d", t_addr);
      end else begin
        o = expq.pop_front();
        if ((!t_wen_n) !== o.wr || t_addr !== AW'(o.a) || t_data[0] !== o.d ||
            t_rd !== !o.wr) begin
          failures++;
          if (failures < 10)
            $display("FAIL op %0d: got wr=%b a=%0d d=%b rd=%b, expected wr=%b a=%0d d=%b",
                     n_ops, !t_wen_n, t_addr, t_data, t_rd, o.wr, o.a, o.d);
        end
      end
    end
  end

  task automatic run_once();
    build_ref();
    n_ops = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    @(negedge clk);
    start = 1'b0;
    wait (done);
    repeat (4) @(negedge clk);
    checks++;
    if (n_ops != 22 * N || expq.size() != 0) begin
      failures++;
      $display("FAIL %0d operations, %0d left", n_ops, expq.size());
    end
    checks++;
    if (last_cyc - first_cyc + 1 != 22 * N) begin
      failures++;
      $display("FAIL operations spread over %0d cycles", last_cyc - first_cyc + 1);
    end
    checks++;
    if (running || !done) failures++;
  endtask

  initial begin
    cyc = 0;
    #12 rst_n = 1'b1;
    checks++;
    if (running || done || !t_cen_n) failures++;
    run_once();
    run_once();
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
