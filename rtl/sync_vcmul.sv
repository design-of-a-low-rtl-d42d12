// sync_vcmul -- complex vector multiplier of SyncPro slot Vector3.
//
// Four lanes of complex 16 x 16-bit multiplication in two pipeline stages.
// vcmul_1 (EX) forms the four real partial products of each lane and stores
// them in a pipeline register; vcmul_2 (EX2) combines them,
//   re = a.re*b.re - a.im*b.im,   im = a.re*b.im + a.im*b.re,
// shifts the 33-bit sums right arithmetically by 15 - 4*sh (15, 11, 7 or 3)
// and keeps the low 16 bits. A product issued with `en` in EX appears on y
// with `vld` one cycle later (EX2) and is written to its register file at the
// end of EX2. The two-stage split follows the pipeline model; the output
// scaling is this design's choice. The partial-product register loads only
// when the unit is used (operand isolation).
module sync_vcmul
  import syncpro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  vec_t       a,
  input  vec_t       b,
  input  logic [1:0] sh,
  output vec_t       y,
  output logic       vld
);
  typedef struct packed {
    logic signed [31:0] rr, ii, ri, ir;
  } pp_t;

  pp_t  [LANES-1:0] pp_q;
  logic [1:0]       sh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= 1'b0;
      pp_q <= '0;
      sh_q <= '0;
    end else begin
      vld <= en;
      if (en) begin
        sh_q <= sh;
        for (int i = 0; i < LANES; i++) begin
          pp_q[i].rr <= a[i].re * b[i].re;
          pp_q[i].ii <= a[i].im * b[i].im;
          pp_q[i].ri <= a[i].re * b[i].im;
          pp_q[i].ir <= a[i].im * b[i].re;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      logic signed [32:0] sr, si;
      logic [4:0] s;
      s     = 5'd15 - {1'b0, sh_q, 2'b00};
      sr    = 33'(pp_q[i].rr) - 33'(pp_q[i].ii);
      si    = 33'(pp_q[i].ri) + 33'(pp_q[i].ir);
      y[i].re = SW'(sr >>> s);
      y[i].im = SW'(si >>> s);
    end
  end
endmodule
