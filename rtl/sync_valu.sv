// sync_valu -- vector ALU of SyncPro slot Vector1 (valu, vext).
//
// Combinational EX-stage unit on vectors of four complex 16-bit samples.
// vadd / vsub work lane by lane on real and imaginary parts; vasr / vlsl
// shift every component by the 4-bit amount in the b field; vand / vor are
// bitwise over all 128 bits; vmov fills every lane with the 8-bit signed
// immediate (formed from the a and b fields) as real part and 0 as imaginary
// part; vcon conjugates; vreal / vimag keep only the real / imaginary parts
// and clear the other. Arithmetic wraps (no saturation). The operation list
// follows the instruction set; immediates, wrap-around and the exact
// vreal/vimag/vmov results are this design's choices.
module sync_valu
  import syncpro_pkg::*;
(
  input  v1_op_e     op,
  input  vec_t       a,
  input  vec_t       b,
  input  logic [7:0] imm,      // {a field, b field}
  output vec_t       y,
  output logic       wen
);
  logic [3:0] sh;
  assign sh = imm[3:0];

  always_comb begin
    wen = 1'b1;
    y   = '0;
    for (int i = 0; i < LANES; i++) begin
      unique case (op)
        V1_VMOV: begin
          y[i].re = sext8(imm);
          y[i].im = '0;
        end
        V1_VADD: begin
          y[i].re = a[i].re + b[i].re;
          y[i].im = a[i].im + b[i].im;
        end
        V1_VSUB: begin
          y[i].re = a[i].re - b[i].re;
          y[i].im = a[i].im - b[i].im;
        end
        V1_VASR: begin
          y[i].re = a[i].re >>> sh;
          y[i].im = a[i].im >>> sh;
        end
        V1_VLSL: begin
          y[i].re = a[i].re <<< sh;
          y[i].im = a[i].im <<< sh;
        end
        V1_VAND: y[i] = a[i] & b[i];
        V1_VOR:  y[i] = a[i] | b[i];
        V1_VCON: begin
          y[i].re = a[i].re;
          y[i].im = -a[i].im;
        end
        V1_VREAL: begin
          y[i].re = a[i].re;
          y[i].im = '0;
        end
        V1_VIMAG: begin
          y[i].re = '0;
          y[i].im = a[i].im;
        end
        default: wen = 1'b0;
      endcase
    end
  end
endmodule
