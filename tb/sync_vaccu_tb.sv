// sync_vaccu_tb -- self-checking testbench of the vector accumulation unit.
// Part 1: random vtriang / vlevel operations against the lane formulas.
// Part 2: the running-sum scheme, vtriang(A_k, B_k) followed by
// B_k+1 = vlevel(C_k, lane 3), over a stream of vectors must reproduce the
// running sum of every individual sample.
module sync_vaccu_tb;
  import syncpro_pkg::*;
  v2_op_e     op;
  vec_t       a, b, y;
  logic [1:0] lane;
  logic       wen;
  int checks = 0, failures = 0;

  sync_vaccu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t bk;
    int run_re, run_im;
    for (int n = 0; n < 20000; n++) begin
      int ar [4], ai [4], br [4], bi [4];
      for (int i = 0; i < 4; i++) begin
        ar[i] = int'($urandom % 65536) - 32768; ai[i] = int'($urandom % 65536) - 32768;
        br[i] = int'($urandom % 65536) - 32768; bi[i] = int'($urandom % 65536) - 32768;
        a[i].re = 16'(ar[i]); a[i].im = 16'(ai[i]);
        b[i].re = 16'(br[i]); b[i].im = 16'(bi[i]);
      end
      lane = 2'($urandom);
      op = v2_op_e'($urandom % 4);
      #1;
      checks++;
      if (wen !== (op inside {V2_VTRIANG, V2_VLEVEL})) begin failures++; $display("wen"); end
      for (int i = 0; i < 4; i++) begin
        int er, ei;
        er = 0; ei = 0;
        if (op == V2_VTRIANG) begin
          for (int j = 0; j <= i; j++) begin er += ar[j]; ei += ai[j]; end
          er += br[i]; ei += bi[i];
        end else if (op == V2_VLEVEL) begin
          er = ar[lane]; ei = ai[lane];
        end
        if (op inside {V2_VTRIANG, V2_VLEVEL}) begin
          checks++;
          if (y[i].re !== 16'(er) || y[i].im !== 16'(ei)) begin
            failures++;
            $display("%s lane %0d wrong", op.name(), i);
          end
        end
      end
      #1;
    end
    // running sum over a stream
    bk = '0; run_re = 0; run_im = 0;
    for (int k = 0; k < 200; k++) begin
      vec_t c;
      for (int i = 0; i < 4; i++) begin
        a[i].re = 16'(int'($urandom % 200) - 100);
        a[i].im = 16'(int'($urandom % 200) - 100);
      end
      op = V2_VTRIANG; b = bk; #1; c = y;
      for (int i = 0; i < 4; i++) begin
        run_re += int'(a[i].re); run_im += int'(a[i].im);
        checks++;
        if (c[i].re !== 16'(run_re) || c[i].im !== 16'(run_im)) begin
          failures++;
          $display("stream %0d lane %0d: got %0d exp %0d", k, i, c[i].re, run_re);
        end
      end
      op = V2_VLEVEL; a = c; lane = 2'd3; #1; bk = y;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
