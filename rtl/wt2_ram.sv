// wt2_ram: data memory of the Walsh unit (block WT2).
//
// A DW-bit RAM of DEPTH words (96 in the source, of which the 64-point
// transform uses 64). It has one synchronous write port (we/waddr/wdata,
// written on the rising clock edge) and one asynchronous read port
// (raddr/rdata), like the distributed CLB RAM of the FPGA family the source
// targets. The separate read and write addresses let a butterfly write its
// sum in the same cycle it reads its second operand. Contents are not reset.
module wt2_ram #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 96,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
