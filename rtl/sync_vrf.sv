// sync_vrf -- vector register file of one SyncPro vector cluster: 4
// registers of 128 bit (four complex samples) with 3 read and 1 write port.
//
// Read ports A and B are local: they feed the two operands of the cluster's
// own vector slot. Read port C is the broadcast port through which all other
// slots (the other vector slots and Scalar1) read this file; only one such
// intercluster read per file and cycle is possible. Reads are combinational
// (DE stage); the write port is written on the edge that ends EX (EX2 for
// the complex multiplier). No bypass. Registers reset to 0. Sizes and port
// counts follow the architecture description.
module sync_vrf #(
  parameter int unsigned NREGS = 4,
  parameter int unsigned W     = 128,
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra_a,
  input  logic [AW-1:0] ra_b,
  input  logic [AW-1:0] ra_c,
  output logic [W-1:0]  rd_a,
  output logic [W-1:0]  rd_b,
  output logic [W-1:0]  rd_c,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd_a = regs[ra_a];
  assign rd_b = regs[ra_b];
  assign rd_c = regs[ra_c];
endmodule
