// sync_decoder -- DE-stage instruction decoder of SyncPro.
//
// Splits the 96-bit bundle (layout in syncpro_pkg) into its five slots and
// derives everything the DE stage drives: the four scalar register file read
// addresses (Scalar1: ra, rb; Scalar2: ra, rb), the vector operand requests
// of the three vector slots and of Scalar1 for the read interconnect, the
// write enables and destinations of every slot, data memory load/store,
// input-port (pinld) and output-port (pinst) requests and the branch.
// Opcodes outside a slot's list decode as nop. Combinational; `valid` = 0
// (bubble or squashed bundle) clears every enable. Which unit executes which
// instruction follows the slot assignment of the architecture; the field
// layout is this design's.
module sync_decoder
  import syncpro_pkg::*;
(
  input  logic     valid,
  input  bundle_t  ir,
  output de_ctrl_t c
);
  vslot_t [2:0] vs;
  assign vs = {ir.v3, ir.v2, ir.v1};

  always_comb begin
    logic s1_alu, s1_eval, s1_br;
    logic [2:0] ua, ub, uw;

    c = '0;
    c.valid   = valid;
    c.s1_op   = s1_op_e'(ir.s1.op);
    c.s2_op   = s2_op_e'(ir.s2.op);
    c.v1_op   = v1_op_e'(ir.v1.op);
    c.v2_op   = v2_op_e'(ir.v2.op);
    c.v3_op   = v3_op_e'(ir.v3.op);
    c.srf_ra0 = ir.s1.ra;
    c.srf_ra1 = ir.s1.imm[3:0];
    c.srf_ra2 = ir.s2.ra;
    c.srf_ra3 = ir.s2.imm[3:0];
    c.s1_rd   = ir.s1.rd;
    c.s1_imm  = ir.s1.imm;
    c.s2_vd   = vsel_t'(ir.s2.rd);
    c.s2_rd   = ir.s2.ra;
    c.s2_imm  = ir.s2.imm;

    // Scalar1
    s1_alu  = ir.s1.op inside {[S1_MOV:S1_MODI]};
    s1_eval = ir.s1.op inside {[S1_RGREP:S1_IMAX]};
    s1_br   = ir.s1.op inside {[S1_BEQZ:S1_JMP]};
    c.s1_wen        = valid && (s1_alu || s1_eval);
    c.s1_vreq.used  = valid && (s1_eval || ir.s1.op == S1_VST);
    c.s1_vreq.sel   = (ir.s1.op == S1_VST) ? vsel_t'(ir.s1.rd) : vsel_t'(ir.s1.ra);
    c.dm_store      = valid && ir.s1.op == S1_VST;
    c.pinst         = valid && ir.s1.op == S1_PINST;
    c.branch        = valid && s1_br;
    c.br_op         = s1_br ? s1_op_e'(ir.s1.op) : S1_NOP;
    c.br_target     = ir.s1.imm;

    // Scalar2
    c.s2_vwen = valid && ir.s2.op inside {[S2_VLD:S2_PINLD]};
    c.s2_swen = valid && ir.s2.op == S2_VLDP;
    c.dm_load = valid && ir.s2.op inside {S2_VLD, S2_VLDP};
    c.pinld   = valid && ir.s2.op == S2_PINLD;
    if (!c.s2_vwen) c.s2_op = S2_NOP;

    // vector slots: which operands are read, whether a result is written
    ua = '0; ub = '0; uw = '0;
    case (ir.v1.op)
      V1_VADD, V1_VSUB, V1_VAND, V1_VOR:             begin ua[0] = 1; ub[0] = 1; uw[0] = 1; end
      V1_VASR, V1_VLSL, V1_VCON, V1_VREAL, V1_VIMAG: begin ua[0] = 1; uw[0] = 1; end
      V1_VMOV:                                       uw[0] = 1;
      default: ;
    endcase
    case (ir.v2.op)
      V2_VTRIANG, V2_VROT: begin ua[1] = 1; ub[1] = 1; uw[1] = 1; end
      V2_VLEVEL:           begin ua[1] = 1; uw[1] = 1; end
      default: ;
    endcase
    case (ir.v3.op)
      V3_VCML: begin ua[2] = 1; ub[2] = 1; uw[2] = 1; end
      default: ;
    endcase
    if (!uw[0]) c.v1_op = V1_NOP;
    if (!uw[1]) c.v2_op = V2_NOP;
    if (!uw[2]) c.v3_op = V3_NOP;

    for (int k = 0; k < 3; k++) begin
      c.va[k].used = valid && ua[k];
      c.va[k].sel  = vs[k].a;
      c.vb[k].used = valid && ub[k];
      c.vb[k].sel  = vs[k].b;
      c.vd[k]      = vs[k].d;
      c.vwen[k]    = valid && uw[k];
      c.vimm[k]    = {vs[k].a, vs[k].b};
      c.vaux[k]    = vs[k].aux;
    end
  end
endmodule
