// sync_veval -- vector evaluation unit of SyncPro slot Scalar1 (eval_vec).
//
// Turns a vector into a scalar: rgrep / igrep return the real / imaginary
// part of lane imm[1:0]; rmax / imax return the largest (signed) real /
// imaginary part over the four lanes. Combinational EX-stage unit; `wen` is
// set for these four operations. The operations follow the instruction set;
// that rmax/imax return the value (not its lane) is this design's reading.
module sync_veval
  import syncpro_pkg::*;
(
  input  s1_op_e     op,
  input  vec_t       v,
  input  logic [1:0] lane,
  output sword_t     y,
  output logic       wen
);
  sword_t mr, mi;

  always_comb begin
    mr = v[0].re;
    mi = v[0].im;
    for (int i = 1; i < LANES; i++) begin
      if (v[i].re > mr) mr = v[i].re;
      if (v[i].im > mi) mi = v[i].im;
    end
  end

  always_comb begin
    wen = 1'b1;
    unique case (op)
      S1_RGREP: y = v[lane].re;
      S1_IGREP: y = v[lane].im;
      S1_RMAX:  y = mr;
      S1_IMAX:  y = mi;
      default: begin
        y   = '0;
        wen = 1'b0;
      end
    endcase
  end
endmodule
