// sync_scalar2_tb -- self-checking testbench of the Scalar2 slot logic.
// DE side: load address (ra + imm for vld, ra for vldp) and load request.
// EX side: result vector and write enables for vld, vldp (plus the
// post-incremented address), spread and pinld, and no write for nop or
// undefined opcodes.
module sync_scalar2_tb;
  import syncpro_pkg::*;
  s2_op_e     de_op, ex_op;
  sword_t     de_a, ex_a, ex_b, sres;
  logic [7:0] de_imm, ex_imm, dm_addr;
  logic       dm_load, vwen, swen;
  vec_t       ex_in_vec, dm_rdata, vres;
  int checks = 0, failures = 0;

  sync_scalar2 dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10000; n++) begin
      int ia, ib, simm;
      vec_t ev;
      logic evw, esw, eld;
      int eaddr;
      de_op = s2_op_e'($urandom % 6);
      ex_op = s2_op_e'($urandom % 6);
      ia = int'($urandom % 65536) - 32768; ib = int'($urandom % 65536) - 32768;
      de_a = 16'(ia); de_imm = 8'($urandom);
      ex_a = 16'(ia); ex_b = 16'(ib); ex_imm = de_imm;
      simm = (int'(de_imm) ^ 128) - 128;
      ex_in_vec = {$urandom, $urandom, $urandom, $urandom};
      dm_rdata  = {$urandom, $urandom, $urandom, $urandom};
      eld   = de_op inside {S2_VLD, S2_VLDP};
      eaddr = (de_op == S2_VLD) ? (ia + simm) & 255 : ia & 255;
      evw = 1; esw = 0;
      case (ex_op)
        S2_VLD:    ev = dm_rdata;
        S2_VLDP:   begin ev = dm_rdata; esw = 1; end
        S2_SPREAD: for (int i = 0; i < 4; i++) begin ev[i].re = 16'(ia); ev[i].im = 16'(ib); end
        S2_PINLD:  ev = ex_in_vec;
        default:   begin ev = '0; evw = 0; end
      endcase
      #1;
      checks++;
      if (dm_load !== eld || (eld && dm_addr !== 8'(eaddr))) begin
        failures++; $display("DE %s: addr %0d exp %0d", de_op.name(), dm_addr, eaddr);
      end
      checks++;
      if (vwen !== evw || (evw && vres !== ev)) begin
        failures++; $display("EX %s: vector result wrong", ex_op.name());
      end
      checks++;
      if (swen !== esw || (esw && sres !== 16'(ia + simm))) begin
        failures++; $display("EX %s: scalar result wrong", ex_op.name());
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
