// sync_pmem -- L1 program memory of SyncPro: single-port synchronous SRAM,
// 256 words of 96 bit (one instruction bundle per word, 3 kByte).
//
// One port serves both the core and the program loader. A write (we=1)
// stores wdata at addr on the clock edge. A read (en=1, we=0) samples addr
// on the edge and presents the word on rdata during the next cycle; this is
// the FE1 (addressing) / FE2 (read) split of the fetch pipeline. With en=0
// rdata keeps its value, which is how the fetch holds an instruction during
// a stall. Size follows the architecture description; the hold-on-disable
// behaviour is this design's choice of macro model. No reset of the array.
module sync_pmem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 96,
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
    if (we)
      mem[addr] <= wdata;
    else if (en)
      rdata <= mem[addr];
  end
endmodule
