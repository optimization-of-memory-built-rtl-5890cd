// rec: reliability enhancement circuit (REC) placed in front of an SRAM's chip enable.
//
// A successive read detector (srd) watches the SRAM's CEN/WEN/address. When it sees a read
// of the same address as the previous read (SR = 1) and protection is on, the SRAM's chip
// enable is forced inactive, so the SRAM stays idle and keeps driving the data of the first
// read, which is the correct data. Protection is controlled by the active-low enable 'enb':
//   enb = 1: SR is blocked, cen_out_n = cen_n
//   enb = 0: cen_out_n = cen_n | SR
// 'sr' is brought out for observation. All signals are active low as on the SRAM port; the
// gating is combinational, the detector registers update on the rising clock edge.
module rec #(
  parameter int unsigned ADDR_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enb,
  input  logic              cen_n,
  input  logic              wen_n,
  input  logic [ADDR_W-1:0] a,
  output logic              cen_out_n,
  output logic              sr
);

  srd #(.ADDR_W(ADDR_W)) u_srd (
    .clk, .rst_n, .cen_n, .wen_n, .a, .sr
  );

  assign cen_out_n = enb ? cen_n : (cen_n | sr);

endmodule
