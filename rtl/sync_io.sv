// sync_io -- I/O interface of SyncPro.
//
// Input: a blocking stream of vectors (four complex samples). When the bundle
// in DE holds a pinld and no vector is offered (in_valid = 0), `stall` holds
// the front of the pipeline (FE1, FE2, DE) and sends bubbles into EX; this is
// the wait state the core sits in between input vectors. When a vector is
// offered, in_ready is raised in the same cycle (valid/ready handshake,
// transfer when both are high) and the vector is handed to Scalar2 (vec).
// Output: pinst writes a 16-bit scalar to out_data at the end of EX, marked
// by a one-cycle out_valid pulse. The blocking input interface follows the
// architecture description; the handshake signalling and the output port
// are this design's choices.
module sync_io
  import syncpro_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // DE stage
  input  logic   pinld_req,
  input  vec_t   in_data,
  input  logic   in_valid,
  output logic   in_ready,
  output logic   stall,
  output vec_t   vec,
  // EX stage
  input  logic   pinst_en,
  input  sword_t pinst_val,
  output sword_t out_data,
  output logic   out_valid
);
  assign stall    = pinld_req && !in_valid;
  assign in_ready = pinld_req && in_valid;
  assign vec      = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= pinst_en;
      if (pinst_en) out_data <= pinst_val;
    end
  end
endmodule
