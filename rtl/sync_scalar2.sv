// sync_scalar2 -- slot Scalar2 of SyncPro: vector load and generate-vector
// unit (vload, gen_vec).
//
// DE side (combinational): for vld the data-memory address is ra + imm, for
// vldp it is ra itself; dm_load requests the read. EX side (combinational on
// the DE/EX pipeline registers): vld/vldp pass the scratchpad output on as
// the vector result, spread builds four copies of the complex value
// (a + j*b), pinld passes the input-stream vector captured in DE. vldp also
// returns a + sext(imm) for the scalar register file (address
// post-increment, through the SRF's second write port). Results are written
// at the end of EX. Load, spread and pinld follow the instruction set; the
// post-increment form is this design's use of the second SRF write port.
module sync_scalar2
  import syncpro_pkg::*;
(
  // DE stage
  input  s2_op_e          de_op,
  input  sword_t          de_a,
  input  logic [7:0]      de_imm,
  output logic [DM_AW-1:0] dm_addr,
  output logic            dm_load,
  // EX stage
  input  s2_op_e          ex_op,
  input  sword_t          ex_a,
  input  sword_t          ex_b,
  input  logic [7:0]      ex_imm,
  input  vec_t            ex_in_vec,    // pinld data captured in DE
  input  vec_t            dm_rdata,
  output vec_t            vres,
  output logic            vwen,
  output sword_t          sres,
  output logic            swen
);
  always_comb begin
    dm_load = de_op == S2_VLD || de_op == S2_VLDP;
    dm_addr = (de_op == S2_VLD) ? DM_AW'(de_a + sext8(de_imm)) : DM_AW'(de_a);
  end

  always_comb begin
    vwen = 1'b1;
    swen = 1'b0;
    sres = ex_a + sext8(ex_imm);
    unique case (ex_op)
      S2_VLD:    vres = dm_rdata;
      S2_VLDP: begin
        vres = dm_rdata;
        swen = 1'b1;
      end
      S2_SPREAD: for (int i = 0; i < LANES; i++) begin
        vres[i].re = ex_a;
        vres[i].im = ex_b;
      end
      S2_PINLD:  vres = ex_in_vec;
      default: begin
        vres = '0;
        vwen = 1'b0;
      end
    endcase
  end
endmodule
