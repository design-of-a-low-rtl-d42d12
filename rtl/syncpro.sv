// syncpro -- SyncPro, a low-power VLIW processor for packet detection and
// coarse time synchronization of OFDM(A) receivers (IEEE 802.11a/g/n,
// IEEE 802.16e) at 20 Msample/s.
//
// Every cycle one 96-bit bundle issues up to five operations: two scalar
// slots on 16-bit words and three vector slots on vectors of four complex
// samples (128 bit).
//   Scalar1: scalar ALU/multiplier, vector store, vector evaluation
//            (rgrep/igrep/rmax/imax), branches, output port (pinst)
//   Scalar2: vector load, generate vector (spread), input port (pinld)
//   Vector1: vector ALU;  Vector2: accumulate (vtriang/vlevel) and align
//   (vrot);  Vector3: complex multiplier (two execute stages)
// Registers are clustered: one scalar file (16 x 16 bit, 4R/2W) shared by the
// scalar slots, and one vector file per vector slot (4 x 128 bit, 2 local
// read ports, 1 broadcast read port, 1 write port). A read interconnect
// routes local and broadcast ports to the operands, a write interconnect
// lets every vector-producing unit write every vector file.
//
// Pipeline: FE1 (address program memory) - FE2 (read bundle) - DE (decode,
// read register files, address data memory; operands are captured in
// pipeline registers) - EX (execute, write register files) - EX2 (complex
// multiplier only). There are no interlocks and no forwarding: a result
// written at the end of EX is visible to the bundle two behind it (three
// behind for vcml). A taken branch squashes the two bundles behind it.
// A pinld with no input vector offered stalls FE1..DE and feeds bubbles into
// EX: this is the wait state between input vectors.
//
// Interface: with run = 0 the core is idle at PC 0 and the program memory
// can be written through pm_we/pm_waddr/pm_wdata; raising run starts
// execution at address 0. in_data/in_valid/in_ready is the input stream
// (transfer when both valid and ready are high), out_data/out_valid the pinst
// output. The architecture (slots, files, sizes, pipeline stages, memories)
// follows the published design; the encoding, branch handling, handshakes
// and the operand-register load enables (a stand-in for the clock gating and
// operand isolation applied at gate level) are this design's choices.
module syncpro
  import syncpro_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 256,
  parameter int unsigned DM_DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             pm_we,
  input  logic [PM_AW-1:0] pm_waddr,
  input  logic [IW-1:0]    pm_wdata,
  input  logic [VW-1:0]    in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [SW-1:0]    out_data,
  output logic             out_valid,
  output logic             waiting,
  output logic [PM_AW-1:0] pc
);
  // ---------------------------------------------------------------- fetch
  logic             fe_pm_en;
  logic [PM_AW-1:0] fe_pm_addr;
  logic [IW-1:0]    pm_rdata, ir;
  logic             de_valid, stall, br_taken;
  logic [PM_AW-1:0] de_pc;
  de_ctrl_t         c;
  logic [3:0][SW-1:0] srf_rd;

  sync_pmem #(.DEPTH(PM_DEPTH), .WIDTH(IW)) u_pmem (
    .clk, .en(run && fe_pm_en), .we(!run && pm_we),
    .addr(run ? $clog2(PM_DEPTH)'(fe_pm_addr) : $clog2(PM_DEPTH)'(pm_waddr)),
    .wdata(pm_wdata), .rdata(pm_rdata)
  );

  sync_fetch u_fetch (
    .clk, .rst_n, .run, .stall,
    .br_req(c.branch), .br_op(c.br_op), .br_val(srf_rd[0]), .br_target(c.br_target),
    .br_taken,
    .pm_en(fe_pm_en), .pm_addr(fe_pm_addr), .pm_rdata,
    .ir, .de_valid, .de_pc, .pc
  );

  // ---------------------------------------------------------------- decode
  sync_decoder u_dec (.valid(de_valid), .ir(bundle_t'(ir)), .c);

  logic de_go;   // the bundle in DE issues this cycle
  vec_t in_vec;
  assign de_go = c.valid && !stall;

  // ---------------------------------------------------------------- register files
  logic [1:0]          srf_we;
  logic [1:0][3:0]     srf_wa;
  logic [1:0][SW-1:0]  srf_wd;

  sync_srf u_srf (
    .clk, .rst_n,
    .raddr({c.srf_ra3, c.srf_ra2, c.srf_ra1, c.srf_ra0}), .rdata(srf_rd),
    .we(srf_we), .waddr(srf_wa), .wdata(srf_wd)
  );

  logic [2:0][1:0] vra_a, vra_b, vra_c, vwa;
  vec_t [2:0]      vrd_a, vrd_b, vrd_c, vwd;
  logic [2:0]      vwe;
  vec_t [2:0]      opa, opb;
  vec_t            s1_vec;
  logic            rd_conflict, wr_conflict;

  for (genvar j = 0; j < NVRF; j++) begin : g_vrf
    sync_vrf u_vrf (
      .clk, .rst_n,
      .ra_a(vra_a[j]), .ra_b(vra_b[j]), .ra_c(vra_c[j]),
      .rd_a(vrd_a[j]), .rd_b(vrd_b[j]), .rd_c(vrd_c[j]),
      .we(vwe[j]), .wa(vwa[j]), .wd(vwd[j])
    );
  end

  sync_vrd_xbar u_vrd (
    .clk, .chk_en(de_go), .va(c.va), .vb(c.vb), .s1(c.s1_vreq),
    .ra_a(vra_a), .ra_b(vra_b), .ra_c(vra_c),
    .rd_a(vrd_a), .rd_b(vrd_b), .rd_c(vrd_c),
    .opa, .opb, .s1_vec, .conflict(rd_conflict)
  );

  // ---------------------------------------------------------------- data memory (addressed in DE)
  logic [DM_AW-1:0] s2_dm_addr, st_addr;
  logic             s2_dm_load;
  vec_t             dm_rdata;

  assign st_addr = DM_AW'(srf_rd[0] + sext8(c.s1_imm));

  sync_dmem #(.DEPTH(DM_DEPTH), .WIDTH(VW)) u_dmem (
    .clk, .en(de_go && (c.dm_store || s2_dm_load)), .we(c.dm_store),
    .addr(c.dm_store ? $clog2(DM_DEPTH)'(st_addr) : $clog2(DM_DEPTH)'(s2_dm_addr)),
    .wdata(s1_vec), .rdata(dm_rdata)
  );

  // ---------------------------------------------------------------- I/O
  sword_t ex_s1a;
  de_ctrl_t ex;

  sync_io u_io (
    .clk, .rst_n,
    .pinld_req(c.pinld), .in_data(vec_t'(in_data)), .in_valid, .in_ready, .stall,
    .vec(in_vec),
    .pinst_en(ex.pinst), .pinst_val(ex_s1a), .out_data(out_data), .out_valid
  );
  assign waiting = stall;

  // ---------------------------------------------------------------- DE/EX pipeline registers
  sword_t     ex_s1b, ex_s2a, ex_s2b;
  vec_t       ex_s1v, ex_in_vec;
  vec_t [2:0] ex_opa, ex_opb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex        <= '0;
      ex_s1a    <= '0;
      ex_s1b    <= '0;
      ex_s2a    <= '0;
      ex_s2b    <= '0;
      ex_s1v    <= '0;
      ex_in_vec <= '0;
      ex_opa    <= '0;
      ex_opb    <= '0;
    end else begin
      ex <= de_go ? c : '0;
      // operand registers load only for the slots that use them
      if (de_go && (c.s1_wen || c.pinst)) begin
        ex_s1a <= srf_rd[0];
        ex_s1b <= srf_rd[1];
      end
      if (de_go && c.s1_vreq.used) ex_s1v <= s1_vec;
      if (de_go && (c.s2_vwen || c.s2_swen)) begin
        ex_s2a <= srf_rd[2];
        ex_s2b <= srf_rd[3];
      end
      if (de_go && c.pinld) ex_in_vec <= in_vec;
      for (int k = 0; k < 3; k++) begin
        if (de_go && c.va[k].used) ex_opa[k] <= opa[k];
        if (de_go && c.vb[k].used) ex_opb[k] <= opb[k];
      end
    end
  end

  // ---------------------------------------------------------------- Scalar1 (EX)
  sword_t alu_y, eval_y;
  logic   alu_wen, eval_wen;

  sync_salu u_salu (
    .op(ex.s1_op), .a(ex_s1a), .b(ex_s1b), .ra_field(ex.srf_ra0), .imm(ex.s1_imm),
    .y(alu_y), .wen(alu_wen)
  );
  sync_veval u_veval (
    .op(ex.s1_op), .v(ex_s1v), .lane(ex.s1_imm[1:0]), .y(eval_y), .wen(eval_wen)
  );

  // ---------------------------------------------------------------- Scalar2 (DE address, EX result)
  vec_t   s2_vres;
  logic   s2_vwen, s2_swen;
  sword_t s2_sres;

  sync_scalar2 u_s2 (
    .de_op(c.s2_op), .de_a(srf_rd[2]), .de_imm(c.s2_imm),
    .dm_addr(s2_dm_addr), .dm_load(s2_dm_load),
    .ex_op(ex.s2_op), .ex_a(ex_s2a), .ex_b(ex_s2b), .ex_imm(ex.s2_imm),
    .ex_in_vec, .dm_rdata,
    .vres(s2_vres), .vwen(s2_vwen), .sres(s2_sres), .swen(s2_swen)
  );

  always_comb begin
    srf_we[0] = ex.s1_wen && (alu_wen || eval_wen);
    srf_wa[0] = ex.s1_rd;
    srf_wd[0] = alu_wen ? alu_y : eval_y;
    srf_we[1] = ex.s2_swen && s2_swen;
    srf_wa[1] = ex.s2_rd;
    srf_wd[1] = s2_sres;
  end

  // ---------------------------------------------------------------- vector slots (EX, EX2)
  vec_t v1_y, acc_y, aln_y, v2_y, v3_y;
  logic v1_wen, acc_wen, aln_wen, v3_vld;
  vsel_t ex2_vd;

  sync_valu u_valu (
    .op(ex.v1_op), .a(ex_opa[0]), .b(ex_opb[0]), .imm(ex.vimm[0]), .y(v1_y), .wen(v1_wen)
  );
  sync_vaccu u_vaccu (
    .op(ex.v2_op), .a(ex_opa[1]), .b(ex_opb[1]), .lane(ex.vaux[1]), .y(acc_y), .wen(acc_wen)
  );
  sync_valign u_valign (
    .op(ex.v2_op), .a(ex_opa[1]), .b(ex_opb[1]), .x(ex.vaux[1]), .y(aln_y), .wen(aln_wen)
  );
  assign v2_y = aln_wen ? aln_y : acc_y;

  sync_vcmul u_vcmul (
    .clk, .rst_n, .en(ex.vwen[2]), .a(ex_opa[2]), .b(ex_opb[2]), .sh(ex.vaux[2]),
    .y(v3_y), .vld(v3_vld)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ex2_vd <= '0;
    else if (ex.vwen[2]) ex2_vd <= ex.vd[2];
  end

  sync_vwr_xbar u_vwr (
    .clk,
    .wen({ex.s2_vwen && s2_vwen, v3_vld, ex.vwen[1] && (acc_wen || aln_wen),
          ex.vwen[0] && v1_wen}),
    .wsel({ex.s2_vd, ex2_vd, ex.vd[1], ex.vd[0]}),
    .wdat({s2_vres, v3_y, v2_y, v1_y}),
    .vrf_we(vwe), .vrf_wa(vwa), .vrf_wd(vwd), .conflict(wr_conflict)
  );

  single_port_dmem: assert property (@(posedge clk) disable iff (!rst_n)
    !(de_go && c.dm_store && c.dm_load));
endmodule
