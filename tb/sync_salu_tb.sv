// sync_salu_tb -- self-checking testbench of the Scalar1 ALU/multiplier.
// Random operands (with a bias to edge values) for every operation; the
// expected result is computed with 32-bit integer arithmetic and truncated
// to 16 bits. Non-ALU opcodes must not assert wen.
module sync_salu_tb;
  import syncpro_pkg::*;
  s1_op_e     op;
  sword_t     a, b, y;
  logic [3:0] ra_field;
  logic [7:0] imm;
  logic       wen;
  int checks = 0, failures = 0;

  sync_salu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd16();
    case ($urandom % 6)
      0: return 32767;
      1: return -32768;
      2: return int'($urandom % 17) - 8;
      default: return int'($urandom % 65536) - 32768;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int ia, ib, e, sh;
      logic ew;
      ia = rnd16(); ib = rnd16();
      op = s1_op_e'($urandom % 24);
      a = 16'(ia); b = 16'(ib);
      ra_field = 4'($urandom); imm = 8'($urandom); sh = imm % 16;
      if (op == S1_MODI) begin   // modi is defined for a in (-b, 2b)
        ib = 1 + $urandom % 300;
        ia = int'($urandom % (3 * ib - 1)) - ib + 1;
        a = 16'(ia); b = 16'(ib);
      end
      ew = 1;
      case (op)
        S1_MOV:  e = ia;
        S1_MOVI: e = (int'({ra_field, imm}) ^ 2048) - 2048;
        S1_ADD:  e = ia + ib;
        S1_ADDI: e = ia + ((int'(imm) ^ 128) - 128);
        S1_SUB:  e = ia - ib;
        S1_MUL:  e = ia * ib;
        S1_LSL:  e = ia * (1 << sh);
        S1_ASR:  e = ia >>> sh;
        S1_AND:  e = ia & ib;
        S1_OR:   e = ia | ib;
        S1_XOR:  e = ia ^ ib;
        S1_MODI: e = ((ia % ib) + ib) % ib;
        default: begin e = 0; ew = 0; end
      endcase
      #1;
      checks++;
      if (wen !== ew || (ew && y !== 16'(e))) begin
        failures++;
        $display("%s a=%0d b=%0d imm=%h: got %0d/%b exp %0d/%b", op.name(), ia, ib, imm, y, wen, 16'(e), ew);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
