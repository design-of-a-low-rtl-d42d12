// sync_valu_tb -- self-checking testbench of the Vector1 ALU. Random complex
// vectors and every opcode; the expected lanes are computed with integer
// arithmetic, truncated to 16 bits per component.
module sync_valu_tb;
  import syncpro_pkg::*;
  v1_op_e     op;
  vec_t       a, b, y;
  logic [7:0] imm;
  logic       wen;
  int checks = 0, failures = 0;

  sync_valu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int ar [4], ai [4], br [4], bi [4], er, ei, sh, s8;
      logic ew;
      for (int i = 0; i < 4; i++) begin
        ar[i] = int'($urandom % 65536) - 32768; ai[i] = int'($urandom % 65536) - 32768;
        br[i] = int'($urandom % 65536) - 32768; bi[i] = int'($urandom % 65536) - 32768;
        a[i].re = 16'(ar[i]); a[i].im = 16'(ai[i]);
        b[i].re = 16'(br[i]); b[i].im = 16'(bi[i]);
      end
      imm = 8'($urandom); sh = imm % 16; s8 = (int'(imm) ^ 128) - 128;
      op = v1_op_e'($urandom % 12);
      ew = op inside {[V1_VMOV:V1_VIMAG]};
      #1;
      checks++;
      if (wen !== ew) begin failures++; $display("%0d: wen %b", op, wen); end
      if (ew)
        for (int i = 0; i < 4; i++) begin
          case (op)
            V1_VMOV:  begin er = s8;            ei = 0; end
            V1_VADD:  begin er = ar[i] + br[i]; ei = ai[i] + bi[i]; end
            V1_VSUB:  begin er = ar[i] - br[i]; ei = ai[i] - bi[i]; end
            V1_VASR:  begin er = ar[i] >>> sh;  ei = ai[i] >>> sh; end
            V1_VLSL:  begin er = ar[i] << sh;   ei = ai[i] << sh; end
            V1_VAND:  begin er = ar[i] & br[i]; ei = ai[i] & bi[i]; end
            V1_VOR:   begin er = ar[i] | br[i]; ei = ai[i] | bi[i]; end
            V1_VCON:  begin er = ar[i];         ei = -ai[i]; end
            V1_VREAL: begin er = ar[i];         ei = 0; end
            default:  begin er = 0;             ei = ai[i]; end
          endcase
          checks++;
          if (y[i].re !== 16'(er) || y[i].im !== 16'(ei)) begin
            failures++;
            $display("%s lane %0d: got %0d,%0d exp %0d,%0d", op.name(), i, y[i].re, y[i].im, 16'(er), 16'(ei));
          end
        end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
