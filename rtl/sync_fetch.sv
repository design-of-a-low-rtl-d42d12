// sync_fetch -- instruction fetch (FE1, FE2) and branch control of SyncPro.
//
// FE1: the program counter addresses the single-port program memory. FE2:
// the memory presents the 96-bit bundle, which is latched at the end of FE2
// into the instruction register read by DE. A branch is resolved in DE (the
// condition register is read there): when taken, the PC is loaded with the
// 8-bit absolute target and the two bundles already fetched behind the
// branch (in FE1 and FE2) are squashed, so a taken branch costs two bubbles
// and has no delay slots. Conditions test one scalar register: == 0, != 0,
// < 0, >= 0, or always (jump). While `stall` is high (a pinld waiting for
// input), PC, FE2 and DE hold and the program memory is disabled so its
// output holds too. With run = 0 the PC returns to 0 and nothing is issued.
// The FE1/FE2/DE split follows the pipeline model; branch resolution in DE
// with squashing, and the condition set, are this design's choices.
module sync_fetch
  import syncpro_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             stall,
  // branch in DE
  input  logic             br_req,
  input  s1_op_e           br_op,
  input  sword_t           br_val,
  input  logic [PM_AW-1:0] br_target,
  output logic             br_taken,
  // program memory
  output logic             pm_en,
  output logic [PM_AW-1:0] pm_addr,
  input  logic [IW-1:0]    pm_rdata,
  // to DE
  output logic [IW-1:0]    ir,
  output logic             de_valid,
  output logic [PM_AW-1:0] de_pc,
  output logic [PM_AW-1:0] pc
);
  logic             fe2_valid;
  logic [PM_AW-1:0] fe2_pc;

  always_comb begin
    unique case (br_op)
      S1_BEQZ: br_taken = br_val == 0;
      S1_BNEZ: br_taken = br_val != 0;
      S1_BLTZ: br_taken = br_val < 0;
      S1_BGEZ: br_taken = br_val >= 0;
      S1_JMP:  br_taken = 1'b1;
      default: br_taken = 1'b0;
    endcase
    br_taken = br_taken && br_req && !stall;
  end

  assign pm_en   = run && !stall;
  assign pm_addr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      fe2_valid <= 1'b0;
      fe2_pc    <= '0;
      de_valid  <= 1'b0;
      de_pc     <= '0;
      ir        <= '0;
    end else if (!run) begin
      pc        <= '0;
      fe2_valid <= 1'b0;
      de_valid  <= 1'b0;
    end else if (!stall) begin
      if (br_taken) begin
        pc        <= br_target;
        fe2_valid <= 1'b0;
        de_valid  <= 1'b0;
      end else begin
        pc        <= pc + 1'b1;
        fe2_valid <= 1'b1;
        fe2_pc    <= pc;
        de_valid  <= fe2_valid;
        de_pc     <= fe2_pc;
        ir        <= pm_rdata;
      end
    end
  end
endmodule
