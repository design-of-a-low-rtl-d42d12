// sync_dmem -- vector data scratchpad of SyncPro: single-port synchronous
// SRAM of 256 vectors x 128 bit (4 kByte).
//
// The core addresses it in the DE stage. A store (en=1, we=1) writes wdata
// on the edge that ends DE; a load (en=1, we=0) samples the address on that
// edge and rdata holds the vector during EX, where Scalar2 forwards it to a
// vector register file. With en=0 rdata keeps its value. Size follows the
// architecture description; the port behaviour is this design's macro model.
// Being single-ported, one load or one store per cycle is possible; the
// program must not issue both in one bundle.
module sync_dmem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we)
        mem[addr] <= wdata;
      else
        rdata <= mem[addr];
    end
  end
endmodule
