// sync_fetch_tb -- self-checking testbench of the fetch stages and branch
// control, run against a program memory whose word at address p encodes p.
// Every cycle it checks that the bundle in DE is the one the program order
// predicts: consecutive addresses, a taken branch followed by exactly two
// bubbles and then the target, a stall holding DE, two bubbles after
// (re)start at address 0. Branch conditions (==0, !=0, <0, >=0, always)
// are checked against their definitions.
module sync_fetch_tb;
  import syncpro_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, stall = 0, br_req = 0, br_taken;
  s1_op_e br_op = S1_NOP;
  sword_t br_val = '0;
  logic [7:0] br_target = '0, pm_addr, de_pc, pc;
  logic pm_en, de_valid;
  logic [95:0] pm_rdata, ir;
  logic pm_we = 0;
  logic [7:0] pm_waddr = '0;
  logic [95:0] pm_wdata = '0;
  int checks = 0, failures = 0, n_taken = 0, n_stall = 0, n_not = 0;

  sync_pmem u_pm (.clk, .en(pm_en), .we(pm_we), .addr(pm_we ? pm_waddr : pm_addr),
                  .wdata(pm_wdata), .rdata(pm_rdata));
  sync_fetch dut (.*);
  always #5 clk = ~clk;

  function automatic logic [95:0] word(input logic [7:0] p);
    return {24'hC0FFEE, p, 32'(p) * 32'h01010101, ~(32'(p) * 32'h00030005)};
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    logic [7:0] exp_pc;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); pm_we = 1; pm_waddr = 8'(i); pm_wdata = word(8'(i));
    end
    @(negedge clk); pm_we = 0;
    for (int phase = 0; phase < 3; phase++) begin
      run = 1; gap = 2; exp_pc = 0;
      for (int n = 0; n < 3000; n++) begin
        logic cond;
        // present DE-stage inputs, then check the bundle and the decision
        stall = 0; br_req = 0; br_op = S1_NOP;
        #1;
        if (de_valid) begin
          stall  = ($urandom % 6) == 0;
          br_req = ($urandom % 5) == 0;
          br_op  = s1_op_e'(S1_BEQZ + $urandom % 5);
          case ($urandom % 3) 0: br_val = 0; 1: br_val = -5; default: br_val = 7; endcase
          br_target = 8'($urandom);
        end
        #1;
        case (br_op)
          S1_BEQZ: cond = br_val == 0;
          S1_BNEZ: cond = br_val != 0;
          S1_BLTZ: cond = br_val < 0;
          S1_BGEZ: cond = br_val >= 0;
          default: cond = 1;
        endcase
        cond = cond && br_req && !stall;
        checks++;
        if (br_taken !== cond) begin failures++; $display("branch decision wrong"); end
        checks++;
        if (gap > 0) begin
          if (de_valid) begin failures++; $display("expected bubble, got pc %0d", de_pc); end
        end else if (!de_valid || de_pc !== exp_pc || ir !== word(exp_pc)) begin
          failures++;
          $display("expected pc %0d, got valid %b pc %0d", exp_pc, de_valid, de_pc);
        end
        if (gap > 0)       gap--;
        else if (stall)    n_stall++;
        else if (cond)     begin gap = 2; exp_pc = br_target; n_taken++; end
        else begin
          exp_pc = exp_pc + 1;
          if (br_req) n_not++;
        end
        @(negedge clk);
      end
      // stop and restart from address 0
      run = 0; stall = 0; br_req = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (pc !== 0 || de_valid) begin failures++; $display("run=0 did not reset fetch"); end
    end
    checks++;
    if (n_taken == 0 || n_stall == 0 || n_not == 0) failures++;
    $display("taken %0d, not taken %0d, stalls %0d", n_taken, n_not, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
