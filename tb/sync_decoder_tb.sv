// sync_decoder_tb -- self-checking testbench of the DE-stage decoder.
// Random bundles (random opcodes including undefined ones, random fields);
// the expected controls are derived from the instruction-set tables below:
// register-file addresses, which vector operands each vector opcode reads,
// write enables, memory, port and branch requests. A bundle with valid = 0
// must produce no enable at all.
module sync_decoder_tb;
  import syncpro_pkg::*;
  logic     valid;
  bundle_t  ir;
  de_ctrl_t c;
  int checks = 0, failures = 0;

  sync_decoder dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string nm, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0h exp %0h (s1 op %0d s2 op %0d)", nm, got, exp, ir.s1.op, ir.s2.op);
    end
  endtask

  // operands read by each vector opcode: {a, b}; result written: w
  function automatic logic [2:0] v1_use(input int op);
    case (op)
      2, 3, 6, 7:     return 3'b111;
      4, 5, 8, 9, 10: return 3'b101;
      1:              return 3'b001;
      default:        return 3'b000;
    endcase
  endfunction
  function automatic logic [2:0] v2_use(input int op);
    case (op)
      1, 3:    return 3'b111;
      2:       return 3'b101;
      default: return 3'b000;
    endcase
  endfunction
  function automatic logic [2:0] v3_use(input int op);
    return (op == 1) ? 3'b111 : 3'b000;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int s1, s2;
      logic [2:0] u [3];
      logic ev;
      ir = {$urandom, $urandom, $urandom};
      ir.s1.op = 5'($urandom % 26);
      ir.s2.op = 5'($urandom % 6);
      ir.v1.op = 4'($urandom % 12);
      ir.v2.op = 4'($urandom % 5);
      ir.v3.op = 4'($urandom % 3);
      valid = ($urandom % 8) != 0;
      s1 = ir.s1.op; s2 = ir.s2.op;
      u[0] = v1_use(ir.v1.op); u[1] = v2_use(ir.v2.op); u[2] = v3_use(ir.v3.op);
      #1;
      ev = valid;
      expect_eq("srf ra0", c.srf_ra0, ir.s1.ra);
      expect_eq("srf ra1", c.srf_ra1, ir.s1.imm[3:0]);
      expect_eq("srf ra2", c.srf_ra2, ir.s2.ra);
      expect_eq("srf ra3", c.srf_ra3, ir.s2.imm[3:0]);
      expect_eq("s1 wen", c.s1_wen, ev && ((s1 >= 1 && s1 <= 12) || (s1 >= 14 && s1 <= 17)));
      expect_eq("s1 vreq", c.s1_vreq.used, ev && (s1 >= 13 && s1 <= 17));
      if (s1 == 13) expect_eq("vst src", c.s1_vreq.sel, ir.s1.rd);
      else          expect_eq("eval src", c.s1_vreq.sel, ir.s1.ra);
      expect_eq("store", c.dm_store, ev && s1 == 13);
      expect_eq("pinst", c.pinst, ev && s1 == 18);
      expect_eq("branch", c.branch, ev && s1 >= 19 && s1 <= 23);
      expect_eq("target", c.br_target, ir.s1.imm);
      expect_eq("load", c.dm_load, ev && (s2 == 1 || s2 == 2));
      expect_eq("s2 vwen", c.s2_vwen, ev && s2 >= 1 && s2 <= 4);
      expect_eq("s2 swen", c.s2_swen, ev && s2 == 2);
      expect_eq("pinld", c.pinld, ev && s2 == 4);
      for (int k = 0; k < 3; k++) begin
        expect_eq($sformatf("v%0d a", k), c.va[k].used, ev && u[k][2]);
        expect_eq($sformatf("v%0d b", k), c.vb[k].used, ev && u[k][1]);
        expect_eq($sformatf("v%0d w", k), c.vwen[k], ev && u[k][0]);
      end
      expect_eq("v1 dst", c.vd[0], ir.v1.d);
      expect_eq("v3 srcA", c.va[2].sel, ir.v3.a);
      expect_eq("v2 aux", c.vaux[1], ir.v2.aux);
      expect_eq("v1 imm", c.vimm[0], {ir.v1.a, ir.v1.b});
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
