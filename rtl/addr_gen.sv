// addr_gen: address generator of the memory test collar.
//
// Holds the address of the memory under test that the current microword is applied to,
// and walks the address space upward (0 .. 2**ADDR_W-1) or downward (2**ADDR_W-1 .. 0).
// 'init' loads the first address of a new element in the order given by 'init_dec'
// (1 = descending); 'step' moves one address in the order of the current word ('dec').
// 'last' flags the final address of the current order, which the instruction pointer uses
// to leave an element. Both commands take effect at the next clock edge; 'init' wins.
module addr_gen #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              init_dec,
  input  logic              step,
  input  logic              dec,
  output logic [ADDR_W-1:0] addr,
  output logic              last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      addr <= '0;
    else if (init)   addr <= init_dec ? '1 : '0;
    else if (step)   addr <= dec ? addr - 1'b1 : addr + 1'b1;
  end

  assign last = dec ? (addr == {ADDR_W{1'b0}}) : (addr == {ADDR_W{1'b1}});

endmodule
