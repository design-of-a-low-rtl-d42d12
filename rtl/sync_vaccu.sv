// sync_vaccu -- vector accumulation unit of SyncPro slot Vector2 (vaccu).
//
// Implements the accumulation scheme that keeps every intermediate sum of a
// running accumulation, so that each sample's correlation value is
// available:
//   vtriang: y[i] = a[0] + a[1] + ... + a[i] + b[i]   (prefix sum + offset)
//   vlevel:  y[i] = a[aux]                             (broadcast one lane)
// A running sum over a stream is kept by vtriang(A_k, B_k) followed by
// B_k+1 = vlevel(C_k, lane 3). Both follow the architecture description; the
// lane-select operand of vlevel (the document's formula uses lane 3) is this
// design's generalisation. Combinational EX-stage unit, complex 16-bit
// wrap-around arithmetic.
module sync_vaccu
  import syncpro_pkg::*;
(
  input  v2_op_e     op,
  input  vec_t       a,
  input  vec_t       b,
  input  logic [1:0] lane,
  output vec_t       y,
  output logic       wen
);
  vec_t pre;   // prefix sums of a

  always_comb begin
    cplx_t run;
    run = '0;
    for (int i = 0; i < LANES; i++) begin
      run.re = run.re + a[i].re;
      run.im = run.im + a[i].im;
      pre[i] = run;
    end
  end

  always_comb begin
    wen = 1'b1;
    y   = '0;
    unique case (op)
      V2_VTRIANG: for (int i = 0; i < LANES; i++) begin
        y[i].re = pre[i].re + b[i].re;
        y[i].im = pre[i].im + b[i].im;
      end
      V2_VLEVEL:  for (int i = 0; i < LANES; i++) y[i] = a[lane];
      default:    wen = 1'b0;
    endcase
  end
endmodule
