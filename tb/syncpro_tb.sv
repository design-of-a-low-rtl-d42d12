// syncpro_tb -- end-to-end testbench of the SyncPro core at its default
// sizes. It loads a small program, an IEEE 802.11a-style delayed
// autocorrelation kernel, streams input vectors in and compares every value
// the program writes to the output port with a reference model computed
// here from the instruction definitions.
//
// Kernel, per input vector x_k (four complex samples):
//   x_k-8 comes from an 8-entry ring buffer in the scratchpad (vldp with
//   post-increment of the ring pointer), x_k-4 from ring slot (p+4) mod 8
//   (modi), x_k is stored back (vst);
//   s = x_k-4 + x_k-8 (vadd), p = s * conj(x_k) (vcon, vcml),
//   C_k = vtriang(p, B_k), B_k+1 = vlevel(C_k, 3): running sum per sample;
//   m = rmax(C_k) is written out (pinst); if m >= THR the remaining vector
//   count is written out as well (sub + bltz); bnez closes the loop.
// The input stream has random gaps, so the core waits in pinld, and a
// second phase offers data continuously to measure the cycles per vector,
// which must stay within the 40 cycles available per vector at 200 MHz and
// 20 Msample/s (5 M vectors/s). Mechanisms counted (each must occur): input
// wait cycles, taken and not-taken branches, intercluster broadcast reads,
// vector results written from the multiplier's second stage, scratchpad
// loads with post-increment and stores, vector accumulations.
module syncpro_tb;
  import syncpro_pkg::*;

  localparam int N_VEC = 160;     // vectors processed
  localparam int THR   = 2000;    // detection threshold (fits the 12-bit movi)
  localparam int AUX   = 1;       // vcml scaling: >> 11

  logic clk = 0, rst_n = 0, run = 0;
  logic pm_we = 0;
  logic [7:0] pm_waddr = '0;
  logic [95:0] pm_wdata = '0;
  logic [127:0] in_data = '0;
  logic in_valid = 0, in_ready, out_valid, waiting;
  logic [15:0] out_data;
  logic [7:0] pc;
  int checks = 0, failures = 0;

  syncpro dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ assembler
  function automatic logic [3:0] vr(input int cl, input int r);
    return {2'(cl), 2'(r)};
  endfunction
  function automatic sslot_t S(input int op, input int rd, input int ra, input int imm);
    return '{op: 5'(op), rd: 4'(rd), ra: 4'(ra), imm: 8'(imm)};
  endfunction
  function automatic vslot_t V(input int op, input logic [3:0] d, input logic [3:0] a,
                               input logic [3:0] b, input int aux);
    return '{op: 4'(op), d: d, a: a, b: b, aux: 2'(aux)};
  endfunction
  localparam sslot_t SNOP = '0;
  localparam vslot_t VNOP = '{op: 4'd0, d: 4'hC, a: 4'hC, b: 4'hC, aux: 2'd0};

  bundle_t prog [64];
  int plen;

  task automatic emit(input sslot_t s1, input sslot_t s2, input vslot_t v1,
                      input vslot_t v2, input vslot_t v3);
    prog[plen] = '{s1: s1, s2: s2, v1: v1, v2: v2, v3: v3};
    plen++;
  endtask

  localparam int LOOP = 11, NEXT = 31, FIN = 32;

  task automatic build_program();
    plen = 0;
    // prologue
    emit(S(S1_MOVI, 2, 0, 8), S(S2_SPREAD, vr(1,2), 0, 0), VNOP, VNOP, VNOP);
    emit(S(S1_MOVI, 5, N_VEC >> 8, N_VEC & 255), SNOP, VNOP, VNOP, VNOP);
    emit(S(S1_MOVI, 8, THR >> 8, THR & 255), SNOP, VNOP, VNOP, VNOP);
    for (int i = 0; i < 8; i++)       // clear the ring buffer with V3.r3 (= 0)
      emit(S(S1_VST, vr(2,3), 0, i), SNOP, VNOP, VNOP, VNOP);
    // loop body, address 11
    emit(S(S1_ADDI, 3, 1, 4),   S(S2_PINLD, vr(0,0), 0, 0), VNOP, VNOP, VNOP);       // L0
    emit(S(S1_ADDI, 5, 5, -1),  S(S2_VLDP, vr(0,1), 1, 1),  VNOP, VNOP, VNOP);       // L1
    emit(S(S1_MODI, 3, 3, 2),   SNOP, V(V1_VCON, vr(0,2), vr(0,0), 4'hC, 0), VNOP, VNOP);
    emit(S(S1_VST, vr(0,0), 1, -1), SNOP, VNOP, VNOP, VNOP);                         // L3
    emit(SNOP, S(S2_VLD, vr(0,3), 3, 0), VNOP, VNOP, VNOP);                          // L4
    emit(S(S1_MODI, 1, 1, 2),   SNOP, VNOP, VNOP, VNOP);                             // L5
    emit(SNOP, SNOP, V(V1_VADD, vr(1,0), vr(0,3), vr(0,1), 0), VNOP, VNOP);          // L6
    emit(SNOP, SNOP, VNOP, VNOP, VNOP);                                              // L7
    emit(SNOP, SNOP, VNOP, VNOP, V(V3_VCML, vr(2,0), vr(1,0), vr(0,2), AUX));        // L8
    emit(SNOP, SNOP, VNOP, VNOP, VNOP);                                              // L9
    emit(SNOP, SNOP, VNOP, VNOP, VNOP);                                              // L10
    emit(SNOP, SNOP, VNOP, V(V2_VTRIANG, vr(1,1), vr(2,0), vr(1,2), 0), VNOP);       // L11
    emit(SNOP, SNOP, VNOP, VNOP, VNOP);                                              // L12
    emit(S(S1_RMAX, 6, vr(1,1), 0), SNOP, VNOP, V(V2_VLEVEL, vr(1,2), vr(1,1), 4'hC, 3), VNOP);
    emit(SNOP, SNOP, VNOP, VNOP, VNOP);                                              // L14
    emit(S(S1_PINST, 0, 6, 0),  SNOP, VNOP, VNOP, VNOP);                             // L15
    emit(S(S1_SUB, 7, 6, 8),    SNOP, VNOP, VNOP, VNOP);                             // L16
    emit(SNOP, SNOP, VNOP, VNOP, VNOP);                                              // L17
    emit(S(S1_BLTZ, 0, 7, NEXT), SNOP, VNOP, VNOP, VNOP);                            // L18
    emit(S(S1_PINST, 0, 5, 0),  SNOP, VNOP, VNOP, VNOP);                             // L19
    emit(S(S1_BNEZ, 0, 5, LOOP), SNOP, VNOP, VNOP, VNOP);                            // NEXT
    emit(S(S1_JMP, 0, 0, FIN),  SNOP, VNOP, VNOP, VNOP);                             // FIN
  endtask

  // ------------------------------------------------------------ stimulus and reference
  int xr [N_VEC][4], xi [N_VEC][4];
  int exp_q [$];

  function automatic int w16(input longint v);
    logic signed [15:0] t;
    t = 16'(v);
    return int'(t);
  endfunction

  task automatic make_input_and_reference();
    int br, bi, cr [4], ci [4];
    for (int k = 0; k < N_VEC; k++)
      for (int i = 0; i < 4; i++) begin
        int n, pr, pi;
        n = 4 * k + i;
        xr[k][i] = int'($urandom % 129) - 64;
        xi[k][i] = int'($urandom % 129) - 64;
        if (k >= 40 && k < 80) begin     // periodic preamble, period 16 samples
          pr = ((n % 16) * 97 % 11) * 60 - 300;
          pi = ((n % 16) * 53 % 13) * 50 - 300;
          xr[k][i] += pr;
          xi[k][i] += pi;
        end
      end
    br = 0; bi = 0;
    for (int k = 0; k < N_VEC; k++) begin
      int m, rem;
      longint accr, acci;
      accr = 0; acci = 0;
      for (int i = 0; i < 4; i++) begin
        int sr, si, d4r, d4i, d8r, d8i, conj_i;
        longint pr, pi;
        d4r = (k >= 4) ? xr[k-4][i] : 0;  d4i = (k >= 4) ? xi[k-4][i] : 0;
        d8r = (k >= 8) ? xr[k-8][i] : 0;  d8i = (k >= 8) ? xi[k-8][i] : 0;
        sr = w16(d4r + d8r); si = w16(d4i + d8i);
        conj_i = w16(-xi[k][i]);
        pr = longint'(sr) * xr[k][i] - longint'(si) * conj_i;
        pi = longint'(sr) * conj_i + longint'(si) * xr[k][i];
        accr += w16(pr >>> (15 - 4 * AUX));
        acci += w16(pi >>> (15 - 4 * AUX));
        cr[i] = w16(accr + br);
        ci[i] = w16(acci + bi);
      end
      br = cr[3]; bi = ci[3];
      m = cr[0];
      for (int i = 1; i < 4; i++) if (cr[i] > m) m = cr[i];
      exp_q.push_back(m);
      rem = N_VEC - 1 - k;
      if (w16(m - THR) >= 0) exp_q.push_back(rem);
    end
  endtask

  // ------------------------------------------------------------ monitors
  int n_out = 0, n_wait = 0, n_taken = 0, n_not_taken = 0, n_bcast = 0, n_ex2 = 0;
  int n_ldp = 0, n_st = 0, n_acc = 0, n_det = 0, n_in = 0;
  int last_in_cycle = -1, cyc = 0, max_gap = 0;
  logic fast_phase = 0;

  always @(posedge clk) if (rst_n && run) begin
    cyc++;
    if (waiting) n_wait++;
    if (dut.c.branch && !dut.stall) begin
      if (dut.br_taken) n_taken++; else n_not_taken++;
    end
    if (dut.de_go) begin
      for (int k = 0; k < 3; k++) begin
        if (dut.c.va[k].used && dut.c.va[k].sel.cl != 2'(k)) n_bcast++;
        if (dut.c.vb[k].used && dut.c.vb[k].sel.cl != 2'(k)) n_bcast++;
      end
      if (dut.c.s1_vreq.used) n_bcast++;
      if (dut.c.s2_swen) n_ldp++;
      if (dut.c.dm_store) n_st++;
      if (dut.c.v2_op == V2_VTRIANG) n_acc++;
    end
    if (dut.u_vcmul.vld) n_ex2++;
    if (in_valid && in_ready) begin
      n_in++;
      if (fast_phase && last_in_cycle >= 0 && cyc - last_in_cycle > max_gap)
        max_gap = cyc - last_in_cycle;
      last_in_cycle = cyc;
    end
    if (out_valid) begin
      int e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", $signed(out_data));
      end else begin
        e = exp_q.pop_front();
        if ($signed(out_data) !== 16'(e)) begin
          failures++;
          $display("output %0d: got %0d exp %0d", n_out, $signed(out_data), e);
        end
      end
      n_out++;
    end
  end

  // ------------------------------------------------------------ driver
  task automatic check_count(input string nm, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", nm);
    end
  endtask

  initial begin
    build_program();
    make_input_and_reference();
    #12 rst_n = 1;
    for (int i = 0; i < plen; i++) begin
      @(negedge clk); pm_we = 1; pm_waddr = 8'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 0; run = 1;
    for (int k = 0; k < N_VEC; k++) begin
      fast_phase = k >= N_VEC / 2;
      if (!fast_phase) repeat ($urandom % 40) @(negedge clk);   // gaps: core waits
      for (int i = 0; i < 4; i++) begin
        in_data[32*i +: 16]      = 16'(xr[k][i]);
        in_data[32*i + 16 +: 16] = 16'(xi[k][i]);
      end
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (100) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    checks++;
    if (pc < FIN || pc > FIN + 1) begin failures++; $display("program did not finish, pc %0d", pc); end
    checks++;
    if (max_gap > 40 || max_gap == 0) begin
      failures++;
      $display("cycles per vector %0d exceed the 40-cycle budget", max_gap);
    end
    check_count("input wait", n_wait);
    check_count("taken branch", n_taken);
    check_count("not-taken branch", n_not_taken);
    check_count("broadcast read", n_bcast);
    check_count("multiplier EX2 write", n_ex2);
    check_count("load with post-increment", n_ldp);
    check_count("store", n_st);
    check_count("vector accumulation", n_acc);
    n_det = n_out - N_VEC;
    check_count("detection output", n_det);
    $display("vectors %0d, outputs %0d (detections %0d), max cycles per vector %0d",
             n_in, n_out, n_det, max_gap);
    $display("wait cycles %0d, branches taken %0d / not taken %0d, broadcast reads %0d",
             n_wait, n_taken, n_not_taken, n_bcast);
    $display("vcml results %0d, vldp %0d, vst %0d, vtriang %0d", n_ex2, n_ldp, n_st, n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
