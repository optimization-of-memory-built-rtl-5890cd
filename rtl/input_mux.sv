// input_mux: input multiplexer of the memory under test.
//
// Chooses who drives the memory port. In test mode (test_mode = 1, set by the user) the
// BIST test collar drives chip enable, write enable, address and data. In normal mode the
// user's WrEna/RdEna requests are turned into the memory's active-low CEN/WEN, with two
// rules of this design: a write to an address held by the redundancy array (rl_hit) does
// not reach the memory, since the redundant word takes it, and a write wins over a read
// requested in the same cycle. Purely combinational.
module input_mux #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 1
) (
  input  logic              test_mode,
  // test collar
  input  logic              t_cen_n,
  input  logic              t_wen_n,
  input  logic [ADDR_W-1:0] t_addr,
  input  logic [DATA_W-1:0] t_data,
  // normal-mode user port
  input  logic              wr_ena,
  input  logic              rd_ena,
  input  logic [ADDR_W-1:0] addr_in,
  input  logic [DATA_W-1:0] data_in,
  input  logic              rl_hit,
  // memory port
  output logic              cen_n,
  output logic              wen_n,
  output logic [ADDR_W-1:0] a,
  output logic [DATA_W-1:0] d
);

  logic n_wr;

  assign n_wr = wr_ena & ~rl_hit;

  always_comb begin
    if (test_mode) begin
      cen_n = t_cen_n;
      wen_n = t_wen_n;
      a     = t_addr;
      d     = t_data;
    end else begin
      cen_n = ~(n_wr | (rd_ena & ~wr_ena));
      wen_n = ~n_wr;
      a     = addr_in;
      d     = data_in;
    end
  end

endmodule
