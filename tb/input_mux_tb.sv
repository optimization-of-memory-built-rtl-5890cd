// input_mux_tb: random test-collar and user-port inputs in both modes, checking the memory
// port against the selection rules: collar in test mode; in normal mode reads and writes
// from WrEna/RdEna, a write winning over a read, and writes to repaired addresses held
// back from the memory.
module input_mux_tb;
  localparam int unsigned AW = 10, DW = 1;
  logic test_mode, t_cen_n, t_wen_n, wr_ena, rd_ena, rl_hit, cen_n, wen_n;
  logic [AW-1:0] t_addr, addr_in, a;
  logic [DW-1:0] t_data, data_in, d;
  logic e_cen_n, e_wen_n;
  logic [AW-1:0] e_a;
  logic [DW-1:0] e_d;
  int checks = 0, failures = 0;

  input_mux #(.ADDR_W(AW), .DATA_W(DW)) dut (.test_mode, .t_cen_n, .t_wen_n, .t_addr,
    .t_data, .wr_ena, .rd_ena, .addr_in, .data_in, .rl_hit, .cen_n, .wen_n, .a, .d);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      {test_mode, t_cen_n, t_wen_n, wr_ena, rd_ena, rl_hit} = 6'($urandom);
      t_addr = AW'($urandom); addr_in = AW'($urandom);
      t_data = DW'($urandom); data_in = DW'($urandom);
      #1;
      if (test_mode) begin
        e_cen_n = t_cen_n; e_wen_n = t_wen_n; e_a = t_addr; e_d = t_data;
      end else begin
        e_a = addr_in; e_d = data_in;
        if (wr_ena) begin
          e_cen_n = rl_hit; e_wen_n = rl_hit;
        end else begin
          e_cen_n = !rd_ena; e_wen_n = 1'b1;
        end
      end
      checks++;
      if (cen_n !== e_cen_n || wen_n !== e_wen_n || a !== e_a || d !== e_d) begin
        failures++;
        $display("FAIL inputs %b%b%b%b%b%b: %b %b, expected %b %b", test_mode, t_cen_n,
                 t_wen_n, wr_ena, rd_ena, rl_hit, cen_n, wen_n, e_cen_n, e_wen_n);
      end
    end
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
