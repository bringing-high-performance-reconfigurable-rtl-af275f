// Behavioural model of one on-board local memory bank (word-addressed SRAM)
// as seen by the arithmetic unit: one read port whose data appears exactly
// LAT cycles after the read enable, and one write port. Testbenches preload
// and inspect the contents through the mem array.
module obm_model #(
  parameter int unsigned AW  = 19,
  parameter int unsigned DW  = 64,
  parameter int unsigned LAT = 1
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] pipe [LAT];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    pipe[0] <= re ? mem[raddr] : '0;
    for (int s = 1; s < LAT; s++) pipe[s] <= pipe[s-1];
  end
  assign rdata = pipe[LAT-1];
endmodule
