// sync_valign -- vector align unit of SyncPro slot Vector2 (valign, vrotX).
//
// vrot X: takes the eight lanes of the pair {b, a} (a supplies lanes 0..3,
// b lanes 4..7) and returns lanes X..X+3, with X = aux (0..3) and indices
// taken modulo 8. With a == b this is a plain rotation of one vector by X
// positions towards lane 0; with consecutive vectors a, b it extracts the
// window of four samples starting X samples into a, which is what delayed
// correlations need when the delay is not a multiple of four. The
// instruction name and "rotate X positions" follow the instruction set; the
// two-vector form and the direction are this design's choices.
// Combinational EX-stage unit.
module sync_valign
  import syncpro_pkg::*;
(
  input  v2_op_e     op,
  input  vec_t       a,
  input  vec_t       b,
  input  logic [1:0] x,
  output vec_t       y,
  output logic       wen
);
  cplx_t [2*LANES-1:0] pair;
  assign pair = {b, a};

  always_comb begin
    wen = (op == V2_VROT);
    for (int i = 0; i < LANES; i++)
      y[i] = pair[3'(i + 32'(x))];
  end
endmodule
