// sync_vrd_xbar_tb -- self-checking testbench of the vector operand read
// interconnect. The three register files are modelled in the testbench:
// every register holds a pattern that names its cluster and index, and the
// file outputs follow the addresses the interconnect drives. Random request
// sets that respect the one-broadcast-read-per-file rule must deliver the
// named register to every operand; request sets that break it must raise
// `conflict`.
module sync_vrd_xbar_tb;
  import syncpro_pkg::*;
  logic clk = 0, chk_en = 0;
  vreq_t [2:0]     va, vb;
  vreq_t           s1;
  logic [2:0][1:0] ra_a, ra_b, ra_c;
  vec_t  [2:0]     rd_a, rd_b, rd_c;
  vec_t  [2:0]     opa, opb;
  vec_t            s1_vec;
  logic            conflict;
  int checks = 0, failures = 0, n_conf = 0, n_bcast = 0;

  sync_vrd_xbar dut (.*);
  always #5 clk = ~clk;

  function automatic vec_t pat(input int cl, input int r);
    vec_t v;
    for (int i = 0; i < 4; i++) begin
      v[i].re = 16'(16'h1000 * (cl + 1) + 16'h0100 * r + i);
      v[i].im = 16'(16'h8000 | (cl << 8) | (r << 4) | i);
    end
    return v;
  endfunction

  always_comb
    for (int j = 0; j < 3; j++) begin
      rd_a[j] = pat(j, int'(ra_a[j]));
      rd_b[j] = pat(j, int'(ra_b[j]));
      rd_c[j] = pat(j, int'(ra_c[j]));
    end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vreq_t rnd_req();
    vreq_t q;
    q.used   = 1'($urandom);
    q.sel.cl = 2'($urandom % 3);
    q.sel.r  = 2'($urandom);
    return q;
  endfunction

  task automatic chk(input vreq_t q, input vec_t got, input string nm);
    if (!q.used) return;
    checks++;
    if (got !== pat(q.sel.cl, q.sel.r)) begin
      failures++;
      $display("%s: cl %0d r %0d wrong", nm, q.sel.cl, q.sel.r);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      vreq_t [6:0] all;
      logic [2:0][1:0] want;
      logic [2:0] have;
      logic bad;
      for (int k = 0; k < 3; k++) begin
        va[k] = rnd_req();
        vb[k] = rnd_req();
      end
      s1 = rnd_req();
      all = {vb[2], va[2], vb[1], va[1], vb[0], va[0], s1};
      // expected conflict: two remote requests to one file, different regs
      bad = 0; have = '0; want = '0;
      for (int q = 0; q < 7; q++) begin
        int own;
        own = (q == 0) ? -1 : (q - 1) / 2;
        if (all[q].used && int'(all[q].sel.cl) != own) begin
          if (!have[all[q].sel.cl]) begin
            have[all[q].sel.cl] = 1;
            want[all[q].sel.cl] = all[q].sel.r;
          end else if (want[all[q].sel.cl] != all[q].sel.r) bad = 1;
        end
      end
      #1;
      checks++;
      if (conflict !== bad) begin
        failures++;
        $display("conflict flag %0b expected %0b", conflict, bad);
      end
      if (bad) n_conf++;
      else begin
        n_bcast += $countones(have);
        chk(s1, s1_vec, "s1");
        for (int k = 0; k < 3; k++) begin
          chk(va[k], opa[k], $sformatf("v%0d.a", k + 1));
          chk(vb[k], opb[k], $sformatf("v%0d.b", k + 1));
        end
      end
      #4;
    end
    checks++;
    if (n_conf == 0 || n_bcast == 0) failures++;
    $display("conflicting sets %0d, broadcast reads %0d", n_conf, n_bcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
