// syncpro_isa_tb -- random-program test of the whole SyncPro core against an
// instruction-level model.
//
// Each round loads a random straight-line program into the program memory
// and runs it. Every bundle fills its five slots with random operations:
//   Scalar1: every scalar ALU op, vst, rgrep/igrep/rmax/imax, pinst
//   Scalar2: vld, vldp, spread, pinld
//   Vector1..3: every vector op, operands in any cluster.
// Illegal combinations are repaired by turning a slot into a nop: two
// different registers read across clusters from one file, two units writing
// one vector file in the same cycle, two writers of one scalar register, or
// a store and a load in one bundle. Three empty bundles follow each random
// bundle, so no result latency is visible and the model can execute the
// bundles one after another, reading all operands before writing any
// result. After each round (the program ends in a jump-to-self) the scalar
// and vector register files and the scratchpad are compared with the model,
// and every pinst value is compared as it appears. Register state carries
// over from round to round.
module syncpro_isa_tb;
  import syncpro_pkg::*;

  localparam int ROUNDS  = 30;
  localparam int NBUNDLE = 60;      // random bundles per round (4 words each)

  logic clk = 0, rst_n = 0, run = 0;
  logic pm_we = 0;
  logic [7:0] pm_waddr = '0;
  logic [95:0] pm_wdata = '0;
  logic [127:0] in_data;
  logic in_valid = 1, in_ready, out_valid, waiting;
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

  // ------------------------------------------------------------ model state
  logic [15:0] m_srf [16];
  vec_t        m_vrf [3][4];
  vec_t        m_dm  [256];
  vec_t        stream [$];        // input vectors, consumed by pinld
  int          in_idx = 0;
  int          exp_q [$];
  int          opcount [string];

  function automatic vec_t rvec();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
  function automatic sword_t s8(input logic [7:0] v);
    return sword_t'(signed'(v));
  endfunction
  function automatic vec_t rdv(input logic [3:0] sel);
    return (sel[3:2] == 2'd3) ? vec_t'('0) : m_vrf[sel[3:2]][sel[1:0]];
  endfunction
  function automatic cplx_t cmul(input cplx_t a, b, input int aux);
    longint pr, pi;
    cplx_t y;
    pr = longint'(a.re) * b.re - longint'(a.im) * b.im;
    pi = longint'(a.re) * b.im + longint'(a.im) * b.re;
    y.re = 16'(pr >>> (15 - 4 * aux));
    y.im = 16'(pi >>> (15 - 4 * aux));
    return y;
  endfunction

  // operands an opcode reads: bit1 = a, bit0 = b
  function automatic logic [1:0] vuse(input int slot, input int op);
    case (slot)
      0: case (op) 2, 3, 6, 7: return 2'b11; 4, 5, 8, 9, 10: return 2'b10; default: return 2'b00; endcase
      1: case (op) 1, 3: return 2'b11; 2: return 2'b10; default: return 2'b00; endcase
      default: return (op == 1) ? 2'b11 : 2'b00;
    endcase
  endfunction
  function automatic bit vwrites(input int slot, input int op);
    case (slot)
      0: return op >= 1 && op <= 10;
      1: return op >= 1 && op <= 3;
      default: return op == 1;
    endcase
  endfunction

  // execute one bundle on the model
  task automatic iss(input bundle_t b);
    vslot_t vs [3];
    vec_t   vres [3];
    logic   vw [3];
    logic [15:0] a1, b1, a2, b2, y1;
    logic   w1;
    vec_t   s2v;
    logic   s2w, s2sw;
    vs[0] = b.v1; vs[1] = b.v2; vs[2] = b.v3;
    a1 = m_srf[b.s1.ra]; b1 = m_srf[b.s1.imm[3:0]];
    a2 = m_srf[b.s2.ra]; b2 = m_srf[b.s2.imm[3:0]];
    // Scalar1
    w1 = 1; y1 = 0;
    case (s1_op_e'(b.s1.op))
      S1_MOV:  y1 = a1;
      S1_MOVI: y1 = 16'(signed'({b.s1.ra, b.s1.imm}));
      S1_ADD:  y1 = a1 + b1;
      S1_ADDI: y1 = a1 + s8(b.s1.imm);
      S1_SUB:  y1 = a1 - b1;
      S1_MUL:  y1 = 16'(int'(signed'(a1)) * int'(signed'(b1)));
      S1_LSL:  y1 = a1 << b.s1.imm[3:0];
      S1_ASR:  y1 = 16'(signed'(a1) >>> b.s1.imm[3:0]);
      S1_AND:  y1 = a1 & b1;
      S1_OR:   y1 = a1 | b1;
      S1_XOR:  y1 = a1 ^ b1;
      S1_MODI: y1 = (signed'(a1) >= signed'(b1)) ? a1 - b1 : (signed'(a1) < 0) ? a1 + b1 : a1;
      S1_RGREP, S1_IGREP, S1_RMAX, S1_IMAX: begin
        vec_t v;
        sword_t m;
        v = rdv(b.s1.ra);
        case (s1_op_e'(b.s1.op))
          S1_RGREP: y1 = v[b.s1.imm[1:0]].re;
          S1_IGREP: y1 = v[b.s1.imm[1:0]].im;
          S1_RMAX: begin m = v[0].re; for (int i = 1; i < 4; i++) if (v[i].re > m) m = v[i].re; y1 = m; end
          default: begin m = v[0].im; for (int i = 1; i < 4; i++) if (v[i].im > m) m = v[i].im; y1 = m; end
        endcase
      end
      default: w1 = 0;
    endcase
    if (s1_op_e'(b.s1.op) == S1_PINST) exp_q.push_back(int'(signed'(a1)));
    // Scalar2
    s2w = 1; s2sw = 0; s2v = '0;
    case (s2_op_e'(b.s2.op))
      S2_VLD:    s2v = m_dm[8'(a2 + s8(b.s2.imm))];
      S2_VLDP:   begin s2v = m_dm[8'(a2)]; s2sw = 1; end
      S2_SPREAD: for (int i = 0; i < 4; i++) begin s2v[i].re = a2; s2v[i].im = b2; end
      S2_PINLD:  begin s2v = stream[in_idx]; in_idx++; end
      default:   s2w = 0;
    endcase
    // vector slots
    for (int k = 0; k < 3; k++) begin
      vec_t a, bb;
      int op;
      op = vs[k].op; a = rdv(vs[k].a); bb = rdv(vs[k].b);
      vw[k] = vwrites(k, op);
      vres[k] = '0;
      if (k == 0) begin
        logic [7:0] imm;
        imm = {vs[k].a, vs[k].b};
        for (int i = 0; i < 4; i++)
          case (op)
            1:  begin vres[k][i].re = s8(imm); vres[k][i].im = 0; end
            2:  begin vres[k][i].re = a[i].re + bb[i].re; vres[k][i].im = a[i].im + bb[i].im; end
            3:  begin vres[k][i].re = a[i].re - bb[i].re; vres[k][i].im = a[i].im - bb[i].im; end
            4:  begin vres[k][i].re = a[i].re >>> imm[3:0]; vres[k][i].im = a[i].im >>> imm[3:0]; end
            5:  begin vres[k][i].re = a[i].re << imm[3:0]; vres[k][i].im = a[i].im << imm[3:0]; end
            6:  vres[k][i] = a[i] & bb[i];
            7:  vres[k][i] = a[i] | bb[i];
            8:  begin vres[k][i].re = a[i].re; vres[k][i].im = -a[i].im; end
            9:  begin vres[k][i].re = a[i].re; vres[k][i].im = 0; end
            10: begin vres[k][i].re = 0; vres[k][i].im = a[i].im; end
            default: ;
          endcase
      end else if (k == 1) begin
        cplx_t acc;
        acc = '0;
        for (int i = 0; i < 4; i++)
          case (op)
            1: begin
              acc.re = acc.re + a[i].re; acc.im = acc.im + a[i].im;
              vres[k][i].re = acc.re + bb[i].re; vres[k][i].im = acc.im + bb[i].im;
            end
            2: vres[k][i] = a[vs[k].aux];
            3: vres[k][i] = ((i + vs[k].aux) < 4) ? a[i + vs[k].aux] : bb[i + vs[k].aux - 4];
            default: ;
          endcase
      end else if (op == 1)
        for (int i = 0; i < 4; i++) vres[k][i] = cmul(a[i], bb[i], vs[k].aux);
    end
    // write back: Scalar1, Scalar2 scalar, EX-stage vector writers, then vcml
    if (s2sw) m_srf[b.s2.ra] = a2 + s8(b.s2.imm);
    if (w1) m_srf[b.s1.rd] = y1;
    if (s1_op_e'(b.s1.op) == S1_VST) m_dm[8'(a1 + s8(b.s1.imm))] = rdv(b.s1.rd);
    for (int k = 0; k < 2; k++)
      if (vw[k] && vs[k].d[3:2] != 3) m_vrf[vs[k].d[3:2]][vs[k].d[1:0]] = vres[k];
    if (s2w && b.s2.rd[3:2] != 3) m_vrf[b.s2.rd[3:2]][b.s2.rd[1:0]] = s2v;
    if (vw[2] && vs[2].d[3:2] != 3) m_vrf[vs[2].d[3:2]][vs[2].d[1:0]] = vres[2];
  endtask

  // ------------------------------------------------------------ random bundles
  function automatic logic [3:0] rsel();
    return {2'(($urandom % 8 == 0) ? 3 : $urandom % 3), 2'($urandom)};
  endfunction

  task automatic rand_bundle(output bundle_t b);
    logic [2:0] bc_have;
    logic [2:0][1:0] bc_reg;
    logic [3:0] ex_wr;     // vector files written in EX (one bit per cluster)
    bit ok;
    int s1ops [] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18};
    b = {$urandom, $urandom, $urandom};
    b.s1.op = 5'(s1ops[$urandom % s1ops.size()]);
    b.s2.op = 5'($urandom % 5);
    b.v1.op = 4'($urandom % 11);
    b.v2.op = 4'($urandom % 4);
    b.v3.op = 4'($urandom % 2);
    b.s1.rd = (b.s1.op == S1_VST) ? rsel() : b.s1.rd;
    if (b.s1.op inside {[S1_RGREP:S1_IMAX]}) b.s1.ra = rsel();
    b.s2.rd = rsel();
    b.v1.a = rsel(); b.v1.b = (b.v1.op inside {V1_VMOV, V1_VASR, V1_VLSL}) ? 4'($urandom) : rsel();
    b.v2.a = rsel(); b.v2.b = rsel();
    b.v3.a = rsel(); b.v3.b = rsel();
    b.v1.d = rsel(); b.v2.d = rsel(); b.v3.d = rsel();
    // one scratchpad access; one writer per scalar register
    if (b.s1.op == S1_VST && b.s2.op inside {S2_VLD, S2_VLDP}) b.s2.op = S2_NOP;
    if (b.s2.op == S2_VLDP && b.s1.op inside {[S1_MOV:S1_MODI], [S1_RGREP:S1_IMAX]} &&
        b.s1.rd == b.s2.ra) b.s2.op = S2_NOP;
    // broadcast reads: one register per file across clusters
    bc_have = '0; bc_reg = '0;
    if (b.s1.op inside {S1_VST, [S1_RGREP:S1_IMAX]}) begin
      logic [3:0] s;
      s = (b.s1.op == S1_VST) ? b.s1.rd : b.s1.ra;
      if (s[3:2] != 3) begin bc_have[s[3:2]] = 1; bc_reg[s[3:2]] = s[1:0]; end
    end
    for (int k = 0; k < 3; k++) begin
      vslot_t v;
      logic [1:0] u;
      logic [2:0] h2;
      logic [2:0][1:0] r2;
      v = (k == 0) ? b.v1 : (k == 1) ? b.v2 : b.v3;
      u = vuse(k, v.op);
      ok = 1; h2 = bc_have; r2 = bc_reg;
      for (int q = 0; q < 2; q++) begin
        logic [3:0] s;
        s = (q == 0) ? v.a : v.b;
        if (u[1 - q] && s[3:2] != 3 && s[3:2] != 2'(k)) begin
          if (h2[s[3:2]] && r2[s[3:2]] != s[1:0]) ok = 0;
          h2[s[3:2]] = 1; r2[s[3:2]] = s[1:0];
        end
      end
      if (!ok) v.op = 0;
      else begin bc_have = h2; bc_reg = r2; end
      if (k == 0) b.v1 = v; else if (k == 1) b.v2 = v; else b.v3 = v;
    end
    // one EX-stage writer per vector file (vcml writes a cycle later)
    ex_wr = '0;
    if (vwrites(0, b.v1.op)) ex_wr[b.v1.d[3:2]] = 1;
    if (vwrites(1, b.v2.op)) begin
      if (b.v2.d[3:2] != 3 && ex_wr[b.v2.d[3:2]]) b.v2.op = 0;
      else ex_wr[b.v2.d[3:2]] = 1;
    end
    if (b.s2.op != S2_NOP && b.s2.rd[3:2] != 3 && ex_wr[b.s2.rd[3:2]]) b.s2.op = S2_NOP;
    opcount[$sformatf("s1_%0d", b.s1.op)]++;
    opcount[$sformatf("s2_%0d", b.s2.op)]++;
    opcount[$sformatf("v1_%0d", b.v1.op)]++;
    opcount[$sformatf("v2_%0d", b.v2.op)]++;
    opcount[$sformatf("v3_%0d", b.v3.op)]++;
  endtask

  // ------------------------------------------------------------ checks
  task automatic compare_state(input int round);
    int bad;
    bad = 0;
    for (int i = 0; i < 16; i++) if (dut.u_srf.regs[i] !== m_srf[i]) bad++;
    for (int r = 0; r < 4; r++) begin
      if (dut.g_vrf[0].u_vrf.regs[r] !== m_vrf[0][r]) bad++;
      if (dut.g_vrf[1].u_vrf.regs[r] !== m_vrf[1][r]) bad++;
      if (dut.g_vrf[2].u_vrf.regs[r] !== m_vrf[2][r]) bad++;
    end
    for (int a = 0; a < 256; a++) if (dut.u_dmem.mem[a] !== m_dm[a]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("round %0d: %0d state words differ", round, bad);
    end
  endtask

  int n_out = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected pinst at %0t pc %0d run %0d", $time, pc, run); end
    else begin
      e = exp_q.pop_front();
      if ($signed(out_data) !== 16'(e)) begin
        failures++; $display("pinst %0d: got %0d exp %0d", n_out, $signed(out_data), e);
      end
    end
    n_out++;
  end

  // input stream: next vector offered as soon as one is taken
  int taken = 0;
  assign in_data = stream[taken];
  always @(posedge clk) if (in_valid && in_ready) taken <= taken + 1;

  initial begin
    for (int i = 0; i < 4000; i++) stream.push_back(rvec());
    for (int i = 0; i < 16; i++) m_srf[i] = '0;
    for (int j = 0; j < 3; j++) for (int r = 0; r < 4; r++) m_vrf[j][r] = '0;
    for (int a = 0; a < 256; a++) begin
      m_dm[a] = rvec();
      dut.u_dmem.mem[a] = m_dm[a];
    end
    #12 rst_n = 1;
    for (int round = 0; round < ROUNDS; round++) begin
      int fin;
      fin = NBUNDLE * 4;
      for (int i = 0; i < NBUNDLE; i++) begin
        bundle_t b;
        rand_bundle(b);
        iss(b);
        @(negedge clk); pm_we = 1; pm_waddr = 8'(4 * i); pm_wdata = b;
        for (int z = 1; z < 4; z++) begin
          @(negedge clk); pm_waddr = 8'(4 * i + z); pm_wdata = '0;
        end
      end
      begin
        bundle_t j;
        j = '0;
        j.s1.op = S1_JMP;
        j.s1.imm = 8'(fin);
        @(negedge clk); pm_waddr = 8'(fin); pm_wdata = j;
      end
      @(negedge clk); pm_we = 0; run = 1;
      while (pc != 8'(fin)) @(negedge clk);
      repeat (10) @(negedge clk);
      run = 0;
      @(negedge clk);
      compare_state(round);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d pinst values missing", exp_q.size()); end
    checks++;
    if (taken != in_idx) begin failures++; $display("pinld took %0d vectors, model %0d", taken, in_idx); end
    // every opcode of every slot must have been issued
    for (int op = 0; op <= 18; op++) begin checks++; if (!opcount.exists($sformatf("s1_%0d", op))) begin failures++; $display("s1 op %0d never issued", op); end end
    for (int op = 0; op <= 4; op++)  begin checks++; if (!opcount.exists($sformatf("s2_%0d", op))) begin failures++; $display("s2 op %0d never issued", op); end end
    for (int op = 0; op <= 10; op++) begin checks++; if (!opcount.exists($sformatf("v1_%0d", op))) begin failures++; $display("v1 op %0d never issued", op); end end
    for (int op = 0; op <= 3; op++)  begin checks++; if (!opcount.exists($sformatf("v2_%0d", op))) begin failures++; $display("v2 op %0d never issued", op); end end
    checks++; if (!opcount.exists("v3_1")) begin failures++; $display("v3 op 1 never issued"); end
    $display("rounds %0d, bundles %0d, pinst values %0d, pinld vectors %0d", ROUNDS, ROUNDS * NBUNDLE, n_out, taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
