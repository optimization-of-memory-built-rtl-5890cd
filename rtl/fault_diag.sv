// fault_diag: fault diagnosis module of the BIST.
//
// Compares the data read from the memory under test with the expected data from the test
// collar. The collar's read strobe, address and expected data are delayed by one cycle to
// line up with the memory's synchronous read output. On a mismatch 'fault' pulses high
// for one cycle, together with the failing address and the expected (correct) data, which
// program the redundancy array. 'fault_count' counts mismatches since reset (saturating),
// a convenience of this design.
//
// Timing: read issued to the memory in cycle k, data on 'mem_q' in cycle k+1, 'fault' and
// its diagnostic outputs registered, valid in cycle k+2.
module fault_diag #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 1,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd,          // compared read issued to the memory this cycle
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] exp_data,
  input  logic [DATA_W-1:0] mem_q,       // memory output, one cycle after the read
  output logic              fault,
  output logic [ADDR_W-1:0] fault_addr,
  output logic [DATA_W-1:0] fault_data,  // expected (correct) data of the failing read
  output logic [CNT_W-1:0]  fault_count
);

  logic              rd_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] exp_q;
  logic              mismatch;

  assign mismatch = rd_q && (mem_q != exp_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q        <= 1'b0;
      addr_q      <= '0;
      exp_q       <= '0;
      fault       <= 1'b0;
      fault_addr  <= '0;
      fault_data  <= '0;
      fault_count <= '0;
    end else begin
      rd_q   <= rd;
      addr_q <= addr;
      exp_q  <= exp_data;
      fault  <= mismatch;
      if (mismatch) begin
        fault_addr <= addr_q;
        fault_data <= exp_q;
        if (fault_count != '1) fault_count <= fault_count + 1'b1;
      end
    end
  end

endmodule
