// sync_vwr_xbar -- vector result write interconnect of SyncPro.
//
// Four units can produce a vector result in a cycle: vector slot 1 and 2
// (end of EX), vector slot 3, the complex multiplier (end of EX2), and slot
// Scalar2 (vector load, generate vector; end of EX). Each VRF write port can
// be written from any of them. For VRF j the first writer naming cluster j,
// in the order V1, V2, V3, Scalar2, gets the port; a second writer in the
// same cycle is a program error (the architecture leaves conflict avoidance
// to the programmer) and is flagged by `conflict` and an assertion.
// Purely combinational. The all-to-all connectivity follows the architecture
// description; the priority order is this design's.
module sync_vwr_xbar
  import syncpro_pkg::*;
(
  input  logic              clk,       // only for the assertion
  input  logic  [3:0]       wen,       // writer valid: V1, V2, V3, Scalar2
  input  vsel_t [3:0]       wsel,
  input  vec_t  [3:0]       wdat,
  output logic  [2:0]       vrf_we,
  output logic  [2:0][1:0]  vrf_wa,
  output vec_t  [2:0]       vrf_wd,
  output logic              conflict
);
  always_comb begin
    conflict = 1'b0;
    for (int j = 0; j < 3; j++) begin
      vrf_we[j] = 1'b0;
      vrf_wa[j] = '0;
      vrf_wd[j] = '0;
      for (int w = 0; w < 4; w++) begin
        if (wen[w] && wsel[w].cl == 2'(j)) begin
          if (!vrf_we[j]) begin
            vrf_we[j] = 1'b1;
            vrf_wa[j] = wsel[w].r;
            vrf_wd[j] = wdat[w];
          end else begin
            conflict = 1'b1;
          end
        end
      end
    end
  end

  write_port_conflict: assert property (@(posedge clk) !conflict);
endmodule
