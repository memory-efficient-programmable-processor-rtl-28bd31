// ifht2d_ram: single-port RAM of 2**AW words of DW bits (64k x 16 by
// default), the intermediate-data store of the 2-D IFHT processor.
//
// One access per rising clock edge: when we is high, wdata is written at
// addr; rdata returns the word at addr registered on the same edge (the old
// word if it is written then). The contents are not reset.
module ifht2d_ram #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
