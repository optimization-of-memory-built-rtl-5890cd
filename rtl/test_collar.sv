// test_collar: R/W control and data control of the memory test collar.
//
// Turns the microword in the instruction register and the address from the address
// generator into one registered memory operation per cycle:
//   - R/W control: chip enable 'cen_n' (active low) for every valid word while the test
//     runs, write enable 'wen_n' (active low) when the R/W bit is 1;
//   - data control: the data bit is spread over the whole word (all ones or all zeros),
//     used as write data for a write and as expected read data for a read.
// A read also raises 'rd' with the same registered timing, so the fault diagnosis module
// knows which memory outputs to compare. All outputs change on the clock edge after the
// word was in the instruction register; with no operation the memory is left idle.
// The active-low CEN/WEN convention is this design's choice, matching the memory port.
module test_collar
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              exec,       // a valid word is being applied this cycle
  input  microword_t        ir,
  input  logic [ADDR_W-1:0] addr_in,
  output logic              cen_n,
  output logic              wen_n,
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] wdata,      // write data, and expected data of a read
  output logic              rd
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cen_n <= 1'b1;
      wen_n <= 1'b1;
      addr  <= '0;
      wdata <= '0;
      rd    <= 1'b0;
    end else begin
      cen_n <= ~exec;
      wen_n <= ~(exec & ir.wr);
      rd    <= exec & ~ir.wr;
      if (exec) begin
        addr  <= addr_in;
        wdata <= {DATA_W{ir.data}};
      end
    end
  end

endmodule
