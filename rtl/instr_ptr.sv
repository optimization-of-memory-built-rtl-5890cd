// instr_ptr: instruction pointer and sequencer of the microcoded BIST controller.
//
// Points at the microword to apply next. After each operation it either
//   - stays on the same word (single-operation element, more addresses to visit),
//   - moves to the next word (inside a multi-operation element, or an element finished at
//     its last address), or
//   - jumps back to the first word of the current multi-operation element (its last
//     operation was applied and more addresses remain).
// The jump target is the pointer value saved when the element's FO word executed. In step
// with these decisions it tells the address generator to step (same element, next
// address) or to re-initialise (a new element begins, with the direction of the new word).
//
// Timing: 'start_pulse' loads pointer 0; from the next cycle one operation is applied per
// clock while 'running'. When the instruction register holds a word with Valid = 0 the run
// ends: 'running' falls and 'done' rises on the same edge and stays high until the next
// start. 'ip_next' is combinational and addresses the instruction storage unit.
module instr_ptr
  import mbist_pkg::*;
#(
  parameter int unsigned IP_W = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_pulse,
  input  microword_t      ir,
  input  elem_pos_e       pos,
  input  logic            addr_last,   // current address is the last of this element's order
  output logic [IP_W-1:0] ip,
  output logic [IP_W-1:0] ip_next,
  output logic            addr_init,   // new element: load the first address of ip_next's order
  output logic            addr_step,   // same element: move to the next address
  output logic            running,
  output logic            done
);

  logic [IP_W-1:0] fo_ip;
  logic            exec;

  assign exec = running & ir.valid;

  always_comb begin
    ip_next   = ip;
    addr_init = 1'b0;
    addr_step = 1'b0;
    if (start_pulse) begin
      ip_next   = '0;
      addr_init = 1'b1;
    end else if (exec) begin
      unique case (pos)
        ELEM_SINGLE: begin
          if (addr_last) begin
            ip_next   = ip + 1'b1;
            addr_init = 1'b1;
          end else begin
            addr_step = 1'b1;
          end
        end
        ELEM_FIRST, ELEM_MIDDLE: ip_next = ip + 1'b1;
        ELEM_LAST: begin
          if (addr_last) begin
            ip_next   = ip + 1'b1;
            addr_init = 1'b1;
          end else begin
            ip_next   = fo_ip;
            addr_step = 1'b1;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip      <= '0;
      fo_ip   <= '0;
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      ip <= ip_next;
      if (exec && pos == ELEM_FIRST) fo_ip <= ip;
      if (start_pulse) begin
        running <= 1'b1;
        done    <= 1'b0;
      end else if (running && !ir.valid) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

endmodule
