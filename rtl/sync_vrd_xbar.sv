// sync_vrd_xbar -- vector operand read interconnect of SyncPro.
//
// Seven vector operands may be requested per bundle: operands A and B of
// each of the three vector slots and the vector source of slot Scalar1
// (vector store, vector evaluation). An operand that lives in the slot's own
// cluster is read through that VRF's local port A or B. Every other request
// is served by the broadcast port (port C) of the VRF that holds it; each VRF
// has one broadcast port, so per cycle only one register per VRF can be read
// across clusters (several requests naming the same register share it). The
// broadcast address of VRF j goes to the first request naming j in the order
// Scalar1, V1.A, V1.B, V2.A, V2.B, V3.A, V3.B; a second request naming a
// different register of the same VRF is a program error flagged by an
// assertion. Purely combinational (DE stage). The local/broadcast split
// follows the architecture description; the priority order is this design's.
module sync_vrd_xbar
  import syncpro_pkg::*;
(
  input  logic                 clk,       // only for the assertion
  input  logic                 chk_en,    // a valid bundle is in DE
  input  vreq_t [2:0]          va,        // operand A request of slot k
  input  vreq_t [2:0]          vb,        // operand B request of slot k
  input  vreq_t                s1,        // Scalar1 vector request
  // VRF port addresses and data, index = cluster
  output logic  [2:0][1:0]     ra_a,
  output logic  [2:0][1:0]     ra_b,
  output logic  [2:0][1:0]     ra_c,
  input  vec_t  [2:0]          rd_a,
  input  vec_t  [2:0]          rd_b,
  input  vec_t  [2:0]          rd_c,
  // routed operands
  output vec_t  [2:0]          opa,
  output vec_t  [2:0]          opb,
  output vec_t                 s1_vec,
  output logic                 conflict
);
  vreq_t [6:0] req;
  logic  [6:0] remote;   // request served by a broadcast port

  always_comb begin
    req = {vb[2], va[2], vb[1], va[1], vb[0], va[0], s1};
    remote[0] = s1.used && s1.sel.cl != CL_NONE;
    for (int k = 0; k < 3; k++) begin
      remote[1 + 2*k] = va[k].used && va[k].sel.cl != CL_NONE && va[k].sel.cl != 2'(k);
      remote[2 + 2*k] = vb[k].used && vb[k].sel.cl != CL_NONE && vb[k].sel.cl != 2'(k);
    end
  end

  always_comb begin
    conflict = 1'b0;
    for (int j = 0; j < 3; j++) begin
      logic taken;
      taken   = 1'b0;
      ra_a[j] = va[j].sel.r;
      ra_b[j] = vb[j].sel.r;
      ra_c[j] = '0;
      for (int q = 0; q < 7; q++) begin
        if (remote[q] && req[q].sel.cl == 2'(j)) begin
          if (!taken) begin
            ra_c[j] = req[q].sel.r;
            taken   = 1'b1;
          end else if (req[q].sel.r != ra_c[j]) begin
            conflict = 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    s1_vec = (s1.sel.cl == CL_NONE) ? '0 : rd_c[s1.sel.cl];
    for (int k = 0; k < 3; k++) begin
      if (va[k].sel.cl == CL_NONE)    opa[k] = '0;
      else if (va[k].sel.cl == 2'(k)) opa[k] = rd_a[k];
      else                            opa[k] = rd_c[va[k].sel.cl];
      if (vb[k].sel.cl == CL_NONE)    opb[k] = '0;
      else if (vb[k].sel.cl == 2'(k)) opb[k] = rd_b[k];
      else                            opb[k] = rd_c[vb[k].sel.cl];
    end
  end

  broadcast_conflict: assert property (@(posedge clk) !(chk_en && conflict));
endmodule
