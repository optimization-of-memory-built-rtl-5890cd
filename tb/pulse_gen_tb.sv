// pulse_gen_tb: drives a random 'start' level and checks that 'start_pulse' is high exactly
// in the first cycle of each high run of 'start', against a reference kept in the bench.
module pulse_gen_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, start_pulse;
  int checks = 0, failures = 0, pulses = 0;
  logic prev;

  pulse_gen dut (.clk, .rst_n, .start, .start_pulse);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      start = ($urandom_range(0, 3) != 0) ? prev : ~prev;
      #1;
      checks++;
      if (start_pulse !== (start && !prev)) begin
        failures++;
        $display("FAIL cycle %0d start=%b prev=%b pulse=%b", i, start, prev, start_pulse);
      end
      if (start_pulse) pulses++;
      prev = start;
    end
    checks++;
    if (pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
