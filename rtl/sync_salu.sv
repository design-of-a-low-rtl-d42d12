// sync_salu -- scalar ALU and multiplier of SyncPro slot Scalar1 (salu,
// smul).
//
// Combinational EX-stage unit on 16-bit signed words. Operations: mov, movi
// (12-bit sign-extended immediate), add, addi, sub, mul (low 16 bits of the
// product), lsl, asr (shift by imm[3:0]), and, or, xor and modi. modi is the
// modulo index step for circular buffers: it wraps a in to [0, b) by adding
// or subtracting b once. The operation list follows the instruction set; the
// exact semantics of mul (integer, low half) and modi, and wrap-around
// arithmetic without saturation, are this design's choices. `wen` says
// whether the operation writes a scalar register.
module sync_salu
  import syncpro_pkg::*;
(
  input  s1_op_e     op,
  input  sword_t     a,
  input  sword_t     b,
  input  logic [3:0] ra_field,   // upper immediate bits for movi
  input  logic [7:0] imm,
  output sword_t     y,
  output logic       wen
);
  logic signed [31:0] prod;
  assign prod = a * b;

  always_comb begin
    y   = '0;
    wen = 1'b1;
    unique case (op)
      S1_MOV:  y = a;
      S1_MOVI: y = sword_t'(signed'({ra_field, imm}));
      S1_ADD:  y = a + b;
      S1_ADDI: y = a + sext8(imm);
      S1_SUB:  y = a - b;
      S1_MUL:  y = prod[SW-1:0];
      S1_LSL:  y = a <<< imm[3:0];
      S1_ASR:  y = a >>> imm[3:0];
      S1_AND:  y = a & b;
      S1_OR:   y = a | b;
      S1_XOR:  y = a ^ b;
      S1_MODI: begin
        if (a >= b)       y = a - b;
        else if (a < 0)   y = a + b;
        else              y = a;
      end
      default: wen = 1'b0;
    endcase
  end
endmodule
