// sram_dmrdf_model: behavioural model (simulation only) of a single-port synchronous SRAM
// with one cell that suffers a deceptive multiple read destructive fault, as caused by a
// small resistive-open defect in a cell pull-up. Same port as sram_sp.
//
// The weak cell at FAULT_ADDR counts reads in a row (no other access to the memory in
// between). The K-th such read still returns the right value but flips the stored value,
// so a following read returns wrong data. A write to the cell or an access to any other
// address restarts the count. Idle cycles (cen_n = 1) do not.
module sram_dmrdf_model #(
  parameter int unsigned ADDR_W     = 5,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned FAULT_ADDR = 3,
  parameter int unsigned K          = 3
) (
  input  logic              clk,
  input  logic              cen_n,
  input  logic              wen_n,
  input  logic [ADDR_W-1:0] a,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] mem [2**ADDR_W];
  int unsigned       run = 0;

  always @(posedge clk) begin
    if (!cen_n) begin
      if (!wen_n) begin
        mem[a] <= d;
        run    <= 0;
      end else begin
        q <= mem[a];
        if (a == ADDR_W'(FAULT_ADDR)) begin
          if (run + 1 >= K) begin
            mem[a] <= ~mem[a];
            run    <= 0;
          end else begin
            run <= run + 1;
          end
        end else begin
          run <= 0;
        end
      end
    end
  end

endmodule
