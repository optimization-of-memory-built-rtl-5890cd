// mbisr_top: SRAM with microcoded March-SS built-in self-test, word-redundancy self-repair
// and a reliability enhancement circuit against successive reads.
//
// Blocks and data flow:
//   mbist_ctrl        runs the stored March program (March-SS) when 'start' rises and
//                     drives the test collar signals;
//   input_mux         gives the memory port to the test collar (test_mode = 1) or to the
//                     user's WrEna/RdEna/AddrIn/DataIn (test_mode = 0);
//   rec               in normal mode, with rec_enb = 0, keeps the SRAM idle on a read of
//                     the same address as the previous read (bypassed in test mode);
//   sram_sp           the memory under test, 2**ADDR_W x DATA_W;
//   fault_diag        compares read data with expected data in test mode and pulses
//                     'fault' with the failing address and the correct data;
//   redundancy_array  programmed by the fault pulses in test mode; in normal mode it
//                     takes reads and writes of repaired addresses and its output
//                     multiplexer gives 'mux_out'.
// 'mem_out' is the raw memory output, shown next to the repaired 'mux_out'.
//
// Use: hold test_mode = 1, raise 'start', wait for 'test_done' (22 * 2**ADDR_W cycles of
// March-SS plus a few cycles of pipeline; wait about 3 more cycles for the last fault
// pulse to program the array), then set test_mode = 0 and use the memory. Read data
// appears on 'mux_out' one cycle after the read request. Active-low asynchronous reset.
module mbisr_top #(
  parameter int unsigned ADDR_W   = 10,
  parameter int unsigned DATA_W   = 1,
  parameter int unsigned RL_WORDS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_mode,
  input  logic              start,
  input  logic              rec_enb,     // 0: successive-read protection on
  input  logic              wr_ena,
  input  logic              rd_ena,
  input  logic [ADDR_W-1:0] addr_in,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] mux_out,
  output logic [DATA_W-1:0] mem_out,
  output logic              test_running,
  output logic              test_done,
  output logic              fault,
  output logic [ADDR_W-1:0] fault_addr,
  output logic [DATA_W-1:0] fault_data,
  output logic [15:0]       fault_count,
  output logic [$clog2(RL_WORDS+1)-1:0] rl_used,
  output logic              rl_full,
  output logic              overflow,
  output logic              sr_block     // a read was kept from the SRAM this cycle
);

  logic              t_cen_n, t_wen_n, t_rd;
  logic [ADDR_W-1:0] t_addr;
  logic [DATA_W-1:0] t_data;
  logic              m_cen_n, m_wen_n, mem_cen_n;
  logic [ADDR_W-1:0] m_a;
  logic [DATA_W-1:0] m_d;
  logic              rl_hit;
  logic              sr;

  mbist_ctrl #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_bist (
    .clk, .rst_n, .start,
    .t_cen_n, .t_wen_n, .t_addr, .t_data, .t_rd,
    .running(test_running), .done(test_done)
  );

  input_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_imux (
    .test_mode, .t_cen_n, .t_wen_n, .t_addr, .t_data,
    .wr_ena, .rd_ena, .addr_in, .data_in, .rl_hit,
    .cen_n(m_cen_n), .wen_n(m_wen_n), .a(m_a), .d(m_d)
  );

  rec #(.ADDR_W(ADDR_W)) u_rec (
    .clk, .rst_n, .enb(rec_enb | test_mode), .cen_n(m_cen_n), .wen_n(m_wen_n), .a(m_a),
    .cen_out_n(mem_cen_n), .sr
  );

  assign sr_block = sr & ~m_cen_n & mem_cen_n;

  sram_sp #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mut (
    .clk, .cen_n(mem_cen_n), .wen_n(m_wen_n), .a(m_a), .d(m_d), .q(mem_out)
  );

  fault_diag #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .CNT_W(16)) u_diag (
    .clk, .rst_n, .rd(t_rd & test_mode), .addr(t_addr), .exp_data(t_data), .mem_q(mem_out),
    .fault, .fault_addr, .fault_data, .fault_count
  );

  redundancy_array #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .WORDS(RL_WORDS)) u_rla (
    .clk, .rst_n, .test_mode,
    .fault, .fault_addr, .fault_data,
    .addr(addr_in), .wr(wr_ena), .rd(rd_ena & ~wr_ena), .wdata(data_in), .mem_q(mem_out),
    .hit(rl_hit), .mux_out, .used(rl_used), .full(rl_full), .overflow
  );

endmodule
