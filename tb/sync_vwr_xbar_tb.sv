// sync_vwr_xbar_tb -- self-checking testbench of the vector result write
// interconnect. Random writer sets (V1, V2, V3, Scalar2) with random
// destinations: without a clash every file must get exactly the writer that
// names it; with two writers on one file the flag must be raised (the clock
// is not toggled then, so the assertion stays quiet).
module sync_vwr_xbar_tb;
  import syncpro_pkg::*;
  logic clk = 0;
  logic  [3:0]      wen;
  vsel_t [3:0]      wsel;
  vec_t  [3:0]      wdat;
  logic  [2:0]      vrf_we;
  logic  [2:0][1:0] vrf_wa;
  vec_t  [2:0]      vrf_wd;
  logic             conflict;
  int checks = 0, failures = 0, n_conf = 0, n_wr = 0;

  sync_vwr_xbar dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int cnt [3];
      int who [3];
      logic bad;
      for (int w = 0; w < 4; w++) begin
        wen[w]     = 1'($urandom);
        wsel[w].cl = 2'($urandom);        // cluster 3 = no file
        wsel[w].r  = 2'($urandom);
        wdat[w]    = {$urandom, $urandom, $urandom, $urandom};
      end
      bad = 0;
      for (int j = 0; j < 3; j++) begin
        cnt[j] = 0; who[j] = -1;
        for (int w = 3; w >= 0; w--)
          if (wen[w] && wsel[w].cl == 2'(j)) begin cnt[j]++; who[j] = w; end
        if (cnt[j] > 1) bad = 1;
      end
      #1;
      checks++;
      if (conflict !== bad) begin failures++; $display("flag %0b exp %0b", conflict, bad); end
      if (bad) n_conf++;
      else
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (who[j] < 0) begin
            if (vrf_we[j] !== 1'b0) begin failures++; $display("file %0d written", j); end
          end else begin
            n_wr++;
            if (vrf_we[j] !== 1'b1 || vrf_wa[j] !== wsel[who[j]].r || vrf_wd[j] !== wdat[who[j]]) begin
              failures++;
              $display("file %0d: writer %0d not routed", j, who[j]);
            end
          end
        end
      #4;
    end
    checks++;
    if (n_conf == 0 || n_wr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
