// instr_ptr_tb: drives the instruction pointer with directed word/position/last-address
// cases and checks its three moves (stay, next, jump back to the element's first word),
// the address commands, and the run/done flags.
module instr_ptr_tb;
  import mbist_pkg::*;
  localparam int unsigned IP_W = 5;
  logic clk = 1'b0, rst_n = 1'b0, start_pulse = 1'b0, addr_last = 1'b0;
  microword_t ir;
  elem_pos_e  pos;
  logic [IP_W-1:0] ip, ip_next;
  logic addr_init, addr_step, running, done;
  int checks = 0, failures = 0;

  instr_ptr #(.IP_W(IP_W)) dut (.clk, .rst_n, .start_pulse, .ir, .pos, .addr_last,
    .ip, .ip_next, .addr_init, .addr_step, .running, .done);

  always #5 clk = ~clk;

  assign pos = elem_pos(ir);

  task automatic apply(logic [6:0] w, logic last, int exp_next, logic exp_init,
                       logic exp_step);
    ir = w; addr_last = last;
    #1;
    checks++;
    if (ip_next !== IP_W'(exp_next) || addr_init !== exp_init || addr_step !== exp_step) begin
      failures++;
      $display("FAIL ip %0d w %h last %b: next %0d init %b step %b, expected %0d %b %b",
               ip, w, last, ip_next, addr_init, addr_step, exp_next, exp_init, exp_step);
    end
    @(negedge clk);
  endtask

  initial begin
    ir = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (running || done) failures++;
    start_pulse = 1'b1;
    #1;
    checks++;
    if (ip_next !== 0 || !addr_init) failures++;
    @(negedge clk);
    start_pulse = 1'b0;
    checks++;
    if (!running) failures++;
    // ip 0: single-operation element w0, not at last address: stay
    apply(7'h42, 1'b0, 0, 1'b0, 1'b1);
    apply(7'h42, 1'b0, 0, 1'b0, 1'b1);
    // last address: move on and re-initialise the address
    apply(7'h42, 1'b1, 1, 1'b1, 1'b0);
    // ip 1..4: FO, IO, IO, IO step through
    apply(7'h60, 1'b0, 2, 1'b0, 1'b0);
    apply(7'h50, 1'b0, 3, 1'b0, 1'b0);
    apply(7'h52, 1'b0, 4, 1'b0, 1'b0);
    apply(7'h50, 1'b0, 5, 1'b0, 1'b0);
    // ip 5: LO not at last address: jump back to FO at ip 1
    apply(7'h4B, 1'b0, 1, 1'b0, 1'b1);
    apply(7'h60, 1'b1, 2, 1'b0, 1'b0);   // FO ignores 'last'
    apply(7'h50, 1'b1, 3, 1'b0, 1'b0);
    apply(7'h52, 1'b1, 4, 1'b0, 1'b0);
    apply(7'h50, 1'b1, 5, 1'b0, 1'b0);
    // LO at last address: next word
    apply(7'h4B, 1'b1, 6, 1'b1, 1'b0);
    // FO of a new element at ip 6, then LO jumps back to 6
    apply(7'h61, 1'b0, 7, 1'b0, 1'b0);
    apply(7'h4A, 1'b0, 6, 1'b0, 1'b1);
    // invalid word ends the run: pointer holds
    apply(7'h00, 1'b0, 6, 1'b0, 1'b0);
    checks++;
    if (running || !done) begin
      failures++;
      $display("FAIL end of test: running %b done %b", running, done);
    end
    // a valid word after the end is not executed
    apply(7'h42, 1'b1, 6, 1'b0, 1'b0);
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
