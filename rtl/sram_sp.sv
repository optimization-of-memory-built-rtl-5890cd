// sram_sp: single-port synchronous SRAM, the memory under test (1024 x 1 by default).
//
// Written as an array so it simulates and maps to a memory. Active-low chip enable 'cen_n'
// and write enable 'wen_n', sampled on the rising clock edge:
//   cen_n = 0, wen_n = 0: mem[a] <= d
//   cen_n = 0, wen_n = 1: q <= mem[a] (data valid in the next cycle)
//   cen_n = 1:            idle, q keeps the last read data
// The hold of 'q' while idle is what lets the reliability enhancement circuit skip a
// repeated read. Like a real SRAM neither the array nor 'q' is reset.
module sram_sp #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              cen_n,
  input  logic              wen_n,
  input  logic [ADDR_W-1:0] a,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (!cen_n) begin
      if (!wen_n) mem[a] <= d;
      else        q      <= mem[a];
    end
  end

endmodule
