// sync_vcmul_tb -- self-checking testbench of the two-stage complex vector
// multiplier. Random operands and scaling are issued on random cycles; every
// issued product must appear exactly one cycle later (EX2) with vld set and
// equal the 64-bit integer reference, shifted by 15 - 4*sh and truncated.
// Cycles without an issue must leave vld low.
module sync_vcmul_tb;
  import syncpro_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, vld;
  vec_t a = '0, b = '0, y;
  logic [1:0] sh = '0;
  int checks = 0, failures = 0, issued = 0;

  sync_vcmul dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd();
    return ($urandom % 4 == 0) ? (($urandom % 2) ? 32767 : -32768) : int'($urandom % 65536) - 32768;
  endfunction

  initial begin
    logic pend;
    vec_t exp_y;
    pend = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      vec_t ny;
      @(negedge clk);
      // check what was issued in the previous cycle
      checks++;
      if (vld !== pend) begin failures++; $display("vld %b exp %b", vld, pend); end
      if (pend && y !== exp_y) begin
        failures++;
        $display("cycle %0d: got %h exp %h", n, y, exp_y);
      end
      en = $urandom % 3 != 0;
      for (int i = 0; i < 4; i++) begin
        longint ar, ai, br, bi, pr, pi;
        int s;
        ar = rnd(); ai = rnd(); br = rnd(); bi = rnd();
        a[i].re = 16'(ar); a[i].im = 16'(ai); b[i].re = 16'(br); b[i].im = 16'(bi);
        sh = (i == 0) ? 2'($urandom) : sh;
        s = 15 - 4 * int'(sh);
        pr = ar * br - ai * bi;
        pi = ar * bi + ai * br;
        ny[i].re = 16'(pr >>> s);
        ny[i].im = 16'(pi >>> s);
      end
      pend = en;
      if (en) begin exp_y = ny; issued++; end
    end
    $display("issued %0d", issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
