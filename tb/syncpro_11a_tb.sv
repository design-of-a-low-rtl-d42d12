// syncpro_11a_tb -- runs an IEEE 802.11a-style packet-detection kernel on
// the SyncPro core at its default sizes and checks it against a reference
// model of the same fixed-point algorithm.
//
// The kernel merges the three classic loops into one pass per input vector
// x_k (four complex samples):
//   correlate:  s = x_k-4 + x_k-8 (16- and 32-sample delays from a ring
//               buffer in the scratchpad), prod = vcml(s, conj x_k),
//               Corr = running sum of prod (vtriang / vlevel);
//   normalize:  pw = vcml(x_k, conj x_k), Pacc = running sum of pw; the
//               division is replaced by a comparison of squares:
//               diff = |Corr|^2 - (Pacc^2 >> 1);
//   detect:     m = rmax(diff) is written out; the largest m above 0 and its
//               vector number are tracked; when TRAIL vectors have passed
//               without a new maximum, the vector number of the peak is
//               written out and the program stops.
// The stream is quiet noise, a periodic preamble (period 16 samples) and
// quiet noise again. The testbench checks every output value, that the peak
// is reported at the end of the preamble, and that the kernel keeps within
// the 40 cycles per vector that 20 Msample/s leaves at 200 MHz.
module syncpro_11a_tb;
  import syncpro_pkg::*;

  localparam int MAXV  = 120;     // vectors available in the stream
  localparam int PRE0  = 10;      // first preamble vector
  localparam int PRE1  = 42;      // first vector after the preamble
  localparam int TRAIL = 3;       // vectors without a new maximum
  localparam int AP = 1, AC = 1, AQ = 0, T = 1;   // scalings

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
    repeat (100000) @(posedge clk);
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
  localparam vslot_t VNOP = '{op: 4'd0, d: 4'hC, a: 4'hC, b: 4'hC, aux: 2'd0};
  localparam int LOOP = 11, TR = LOOP + 27, FIN = LOOP + 35;

  bundle_t prog [64];

  task automatic build_program();
    int L;
    for (int i = 0; i < 64; i++) prog[i] = '{s1: '0, s2: '0, v1: VNOP, v2: VNOP, v3: VNOP};
    prog[0].s1 = S(S1_MOVI, 2, 0, 8);          // ring size
    prog[1].s1 = S(S1_MOVI, 11, 0, TRAIL);
    for (int i = 0; i < 8; i++) prog[2 + i].s1 = S(S1_VST, vr(2,3), 0, i);   // clear ring
    L = LOOP;
    // register use: VRF1: x_k 0.0, x_k-8 0.1, Pacc^2>>T 0.2, x_k-4 0.3
    //               VRF2: Bcorr 1.0, Bpow 1.1, Corr 1.2, Pacc 1.3
    //               VRF3: s / diff 2.0, prod / |Corr|^2 2.1, pw / Pacc^2 2.2, conj 2.3
    prog[L+0].s2  = S(S2_PINLD, vr(0,0), 0, 0);
    prog[L+0].s1  = S(S1_ADDI, 3, 1, 4);
    prog[L+1].s2  = S(S2_VLDP, vr(0,1), 1, 1);
    prog[L+1].s1  = S(S1_ADDI, 10, 10, 1);                     // vector number
    prog[L+2].s1  = S(S1_MODI, 3, 3, 2);
    prog[L+2].v1  = V(V1_VCON, vr(2,3), vr(0,0), 4'hC, 0);
    prog[L+3].s1  = S(S1_VST, vr(0,0), 1, -1);
    prog[L+4].s2  = S(S2_VLD, vr(0,3), 3, 0);
    prog[L+4].v3  = V(V3_VCML, vr(2,2), vr(0,0), vr(2,3), AP);  // power
    prog[L+5].s1  = S(S1_MODI, 1, 1, 2);
    prog[L+6].v1  = V(V1_VADD, vr(2,0), vr(0,3), vr(0,1), 0);
    prog[L+7].v2  = V(V2_VTRIANG, vr(1,3), vr(2,2), vr(1,1), 0);
    prog[L+8].v3  = V(V3_VCML, vr(2,1), vr(2,0), vr(2,3), AC);  // correlation product
    prog[L+9].v2  = V(V2_VLEVEL, vr(1,1), vr(1,3), 4'hC, 3);
    prog[L+9].v3  = V(V3_VCML, vr(2,2), vr(1,3), vr(1,3), AQ);  // Pacc^2
    prog[L+11].v2 = V(V2_VTRIANG, vr(1,2), vr(2,1), vr(1,0), 0);
    prog[L+12].v1 = V(V1_VASR, vr(0,2), vr(2,2), 4'(T), 0);
    prog[L+13].v2 = V(V2_VLEVEL, vr(1,0), vr(1,2), 4'hC, 3);
    prog[L+13].v1 = V(V1_VCON, vr(2,3), vr(1,2), 4'hC, 0);
    prog[L+15].v3 = V(V3_VCML, vr(2,1), vr(1,2), vr(2,3), AQ);  // |Corr|^2
    prog[L+18].v1 = V(V1_VSUB, vr(2,0), vr(2,1), vr(0,2), 0);
    prog[L+20].s1 = S(S1_RMAX, 4, vr(2,0), 0);
    prog[L+22].s1 = S(S1_SUB, 7, 6, 4);                         // max - m
    prog[L+23].s1 = S(S1_PINST, 0, 4, 0);
    prog[L+24].s1 = S(S1_BGEZ, 0, 7, TR);
    prog[L+25].s1 = S(S1_MOV, 6, 4, 0);                         // new maximum
    prog[L+26].s1 = S(S1_MOV, 9, 10, 0);                        // its position
    prog[L+28].s1 = S(S1_SUB, 13, 10, 9);
    prog[L+30].s1 = S(S1_SUB, 14, 13, 11);
    prog[L+32].s1 = S(S1_BNEZ, 0, 14, LOOP);
    prog[L+33].s1 = S(S1_BEQZ, 0, 6, LOOP);
    prog[L+34].s1 = S(S1_PINST, 0, 9, 0);
    prog[FIN].s1  = S(S1_JMP, 0, 0, FIN);
  endtask

  // ------------------------------------------------------------ stimulus and reference
  int xr [MAXV][4], xi [MAXV][4];
  int exp_q [$];
  int nvec, peak_pos;

  function automatic int w16(input longint v);
    logic signed [15:0] t;
    t = 16'(v);
    return int'(t);
  endfunction

  // one lane of vcml with scaling select aux
  function automatic void cmul(input int ar, ai, br, bi, aux, output int yr, yi);
    longint pr, pi;
    pr = longint'(ar) * br - longint'(ai) * bi;
    pi = longint'(ar) * bi + longint'(ai) * br;
    yr = w16(pr >>> (15 - 4 * aux));
    yi = w16(pi >>> (15 - 4 * aux));
  endfunction

  task automatic make_input_and_reference();
    int bcr, bci, bpr, bpi, mx, pos;
    for (int k = 0; k < MAXV; k++)
      for (int i = 0; i < 4; i++) begin
        int n;
        n = 4 * k + i;
        xr[k][i] = int'($urandom % 17) - 8;
        xi[k][i] = int'($urandom % 17) - 8;
        if (k >= PRE0 && k < PRE1) begin
          xr[k][i] += ((n % 16) * 7 % 11) * 50 - 250;
          xi[k][i] += ((n % 16) * 5 % 13) * 40 - 240;
        end
      end
    bcr = 0; bci = 0; bpr = 0; bpi = 0; mx = 0; pos = 0;
    nvec = 0; peak_pos = -1;
    for (int k = 0; k < MAXV; k++) begin
      int cr [4], ci [4], pr [4], pi [4], df [4], m, n;
      longint acr, aci, apr, api;
      acr = 0; aci = 0; apr = 0; api = 0;
      for (int i = 0; i < 4; i++) begin
        int sr, si, cjr, cji, tr, ti, wr, wi;
        cjr = xr[k][i]; cji = w16(-xi[k][i]);
        sr = w16(((k >= 4) ? xr[k-4][i] : 0) + ((k >= 8) ? xr[k-8][i] : 0));
        si = w16(((k >= 4) ? xi[k-4][i] : 0) + ((k >= 8) ? xi[k-8][i] : 0));
        cmul(xr[k][i], xi[k][i], cjr, cji, AP, wr, wi);
        cmul(sr, si, cjr, cji, AC, tr, ti);
        apr += wr; api += wi; acr += tr; aci += ti;
        pr[i] = w16(apr + bpr); pi[i] = w16(api + bpi);
        cr[i] = w16(acr + bcr); ci[i] = w16(aci + bci);
      end
      bpr = pr[3]; bpi = pi[3]; bcr = cr[3]; bci = ci[3];
      for (int i = 0; i < 4; i++) begin
        int qr, qi, er, ei;
        cmul(pr[i], pi[i], pr[i], pi[i], AQ, qr, qi);
        cmul(cr[i], ci[i], cr[i], w16(-ci[i]), AQ, er, ei);
        df[i] = w16(er - (qr >>> T));
      end
      m = df[0];
      for (int i = 1; i < 4; i++) if (df[i] > m) m = df[i];
      exp_q.push_back(m);
      n = k + 1;
      if (!(w16(mx - m) >= 0)) begin mx = m; pos = n; end
      nvec = n;
      if (w16(w16(n - pos) - TRAIL) == 0 && mx != 0) begin
        exp_q.push_back(pos);
        peak_pos = pos;
        break;
      end
    end
  endtask

  // ------------------------------------------------------------ monitor
  int n_out = 0, cyc = 0, first_in = -1, last_in = -1, n_in = 0, last_val = 0;

  always @(posedge clk) if (rst_n && run) begin
    cyc++;
    if (in_valid && in_ready) begin
      if (first_in < 0) first_in = cyc;
      last_in = cyc;
      n_in++;
    end
    if (out_valid) begin
      int e;
      checks++;
      last_val = $signed(out_data);
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

  initial begin
    build_program();
    make_input_and_reference();
    #12 rst_n = 1;
    for (int i = 0; i <= FIN; i++) begin
      @(negedge clk); pm_we = 1; pm_waddr = 8'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 0; run = 1;
    for (int k = 0; k < nvec; k++) begin
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
    repeat (80) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    checks++;
    if (peak_pos <= PRE0 || peak_pos > PRE1 + 1) begin
      failures++;
      $display("peak at vector %0d is not at the end of the preamble", peak_pos);
    end
    checks++;
    if (pc < FIN || pc > FIN + 1) begin failures++; $display("program did not stop, pc %0d", pc); end
    checks++;
    if ((last_in - first_in) / (n_in - 1) > 40) begin
      failures++;
      $display("kernel exceeds the 40-cycle budget per vector");
    end
    $display("vectors %0d, peak reported at vector %0d, %0d cycles per vector",
             n_in, last_val, (last_in - first_in) / (n_in - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
