// sync_srf -- scalar register file of SyncPro: 16 registers of 16 bit with
// 4 read and 2 write ports, shared by the two scalar slots.
//
// Read ports 0/1 belong to Scalar1, 2/3 to Scalar2; they are combinational
// and are used in the DE stage. Write port 0 is driven by Scalar1, port 1 by
// Scalar2; both write on the clock edge that ends EX. There is no bypass: a
// value written at the end of a cycle is read from the next cycle on
// (forwarding is left to the program). If both write ports name the same
// register, port 1 wins; the program must avoid this. Registers reset to 0.
// Sizes and port counts follow the architecture description.
module sync_srf #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned W     = 16,
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0][AW-1:0]    raddr,
  output logic [3:0][W-1:0]     rdata,
  input  logic [1:0]            we,
  input  logic [1:0][AW-1:0]    waddr,
  input  logic [1:0][W-1:0]     wdata
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < 4; p++) rdata[p] = regs[raddr[p]];

  write_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !(we[0] && we[1] && waddr[0] == waddr[1]));
endmodule
