// sync_valign_tb -- self-checking testbench of the align/rotate unit.
// For every shift X, lane i of the result must be lane i+X of the eight-lane
// pair (a in lanes 0..3, b in lanes 4..7); also checks the pure rotation
// case a == b.
module sync_valign_tb;
  import syncpro_pkg::*;
  v2_op_e     op;
  vec_t       a, b, y;
  logic [1:0] x;
  logic       wen;
  int checks = 0, failures = 0;

  sync_valign dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      cplx_t src [8];
      for (int i = 0; i < 4; i++) begin
        a[i] = cplx_t'($urandom);
        b[i] = (n % 4 == 0) ? a[i] : cplx_t'($urandom);
      end
      for (int i = 0; i < 4; i++) begin src[i] = a[i]; src[i+4] = b[i]; end
      x = 2'($urandom);
      op = v2_op_e'($urandom % 4);
      #1;
      checks++;
      if (wen !== (op == V2_VROT)) begin failures++; $display("wen"); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (y[i] !== src[(i + x) % 8]) begin
          failures++;
          $display("x=%0d lane %0d wrong", x, i);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
