// srd: successive read detector of the reliability enhancement circuit.
//
// Flags a read of the same address as the previous read, with no write in between, so that
// the memory can be kept idle instead of reading a cell again (repeated reads can turn a
// small resistive-open defect into a destructive read fault).
//   - An address register and a flag Y are loaded on every read (CEN = 0, WEN = 1): the
//     register takes the read address and Y is set.
//   - Z compares the current address with the register.
//   - SR = Y & WEN & Z, combinational, for the access now on the port.
// Clearing Y on a write (CEN = 0, WEN = 0) is this design's choice: a write breaks the run
// of successive reads. CEN and WEN are active low. Registers update on the rising clock
// edge from the requested (not the gated) CEN; active-low asynchronous reset clears Y.
module srd #(
  parameter int unsigned ADDR_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cen_n,
  input  logic              wen_n,
  input  logic [ADDR_W-1:0] a,
  output logic              sr
);

  logic [ADDR_W-1:0] addr_q;
  logic              y;
  logic              z;

  assign z  = (a == addr_q);
  assign sr = y & wen_n & z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      y      <= 1'b0;
    end else if (!cen_n) begin
      if (wen_n) begin
        addr_q <= a;
        y      <= 1'b1;
      end else begin
        y      <= 1'b0;
      end
    end
  end

endmodule
