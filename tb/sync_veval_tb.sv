// sync_veval_tb -- self-checking testbench of the vector evaluation unit.
// Random vectors (often with ties and negative values): rgrep/igrep must
// return the chosen lane's component, rmax/imax the largest signed
// component; other opcodes must not assert wen.
module sync_veval_tb;
  import syncpro_pkg::*;
  s1_op_e     op;
  vec_t       v;
  logic [1:0] lane;
  sword_t     y;
  logic       wen;
  int checks = 0, failures = 0;

  sync_veval dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int re [4], im [4], e, mr, mi;
      logic ew;
      for (int i = 0; i < 4; i++) begin
        re[i] = ($urandom % 2) ? int'($urandom % 65536) - 32768 : int'($urandom % 7) - 3;
        im[i] = ($urandom % 2) ? int'($urandom % 65536) - 32768 : int'($urandom % 7) - 3;
        v[i].re = 16'(re[i]); v[i].im = 16'(im[i]);
      end
      mr = -40000; mi = -40000;
      for (int i = 0; i < 4; i++) begin
        if (re[i] > mr) mr = re[i];
        if (im[i] > mi) mi = im[i];
      end
      lane = 2'($urandom);
      op = s1_op_e'($urandom % 24);
      ew = 1;
      case (op)
        S1_RGREP: e = re[lane];
        S1_IGREP: e = im[lane];
        S1_RMAX:  e = mr;
        S1_IMAX:  e = mi;
        default: begin e = 0; ew = 0; end
      endcase
      #1;
      checks++;
      if (wen !== ew || (ew && y !== 16'(e))) begin
        failures++;
        $display("%s lane %0d: got %0d exp %0d", op.name(), lane, y, e);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
