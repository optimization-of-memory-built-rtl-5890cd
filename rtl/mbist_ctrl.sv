// mbist_ctrl: microcoded memory BIST controller with its memory test collar.
//
// BIST control: pulse generator, instruction pointer, instruction storage unit (March-SS
// by default) and instruction register. Test collar: address generator, R/W control and
// data control. A rising edge on 'start' runs the stored program once over all
// 2**ADDR_W addresses; every microword is one memory operation, so a five-operation March
// element costs five cycles per address and any number of operations per element is
// possible. The clock comes from outside the block.
//
// Timing: the pulse cycle loads the pointer; the first operation is in the instruction
// register one cycle later and reaches the collar outputs (t_*) one more cycle later. A
// program of L operations per address takes L * 2**ADDR_W cycles of execution; 'done'
// rises one cycle after the last operation was issued into the collar (March-SS: 22 per
// address).
module mbist_ctrl
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W   = 10,
  parameter int unsigned DATA_W   = 1,
  parameter int unsigned IM_DEPTH = MARCH_SS_LEN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              t_cen_n,
  output logic              t_wen_n,
  output logic [ADDR_W-1:0] t_addr,
  output logic [DATA_W-1:0] t_data,   // write data, or expected data of a read
  output logic              t_rd,     // the collar operation is a compared read
  output logic              running,
  output logic              done
);

  localparam int unsigned IP_W = $clog2(IM_DEPTH + 1);

  logic            start_pulse;
  logic [IP_W-1:0] ip, ip_next;
  microword_t      rom_word, ir;
  elem_pos_e       pos;
  logic            addr_init, addr_step, addr_last;
  logic [ADDR_W-1:0] addr;

  pulse_gen u_pulse (
    .clk, .rst_n, .start, .start_pulse
  );

  instr_rom #(.DEPTH(IM_DEPTH), .IP_W(IP_W)) u_rom (
    .addr(ip_next), .word(rom_word)
  );

  instr_reg u_ir (
    .clk, .rst_n, .word_in(rom_word), .ir, .pos
  );

  instr_ptr #(.IP_W(IP_W)) u_ip (
    .clk, .rst_n, .start_pulse, .ir, .pos, .addr_last,
    .ip, .ip_next, .addr_init, .addr_step, .running, .done
  );

  addr_gen #(.ADDR_W(ADDR_W)) u_ag (
    .clk, .rst_n, .init(addr_init), .init_dec(rom_word.dec), .step(addr_step),
    .dec(ir.dec), .addr, .last(addr_last)
  );

  test_collar #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_collar (
    .clk, .rst_n, .exec(running & ir.valid), .ir, .addr_in(addr),
    .cen_n(t_cen_n), .wen_n(t_wen_n), .addr(t_addr), .wdata(t_data), .rd(t_rd)
  );

endmodule
