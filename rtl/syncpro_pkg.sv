// syncpro_pkg -- types, sizes and instruction encoding shared by the SyncPro
// pre-synchronization processor.
//
// SyncPro is a 5-slot VLIW: two scalar slots (Scalar1, Scalar2) working on
// 16-bit signed words and three vector slots (Vector1..3) working on vectors
// of four complex samples (4 x (16-bit real, 16-bit imaginary) = 128 bit).
// The sizes (16 x 16-bit scalar registers, three clusters of 4 x 128-bit
// vector registers, 256 x 96-bit program words, 256 x 128-bit data vectors)
// and the instruction mnemonics follow the architecture description. The
// binary encoding of the 96-bit bundle, the opcode numbers and the use of
// immediate fields are this design's own choice:
//
//   bundle[95:75] Scalar1 slot  {op[4:0], rd[3:0], ra[3:0], imm[7:0]}
//   bundle[74:54] Scalar2 slot  {op[4:0], rd[3:0], ra[3:0], imm[7:0]}
//   bundle[53:36] Vector1 slot  {op[3:0], d[3:0], a[3:0], b[3:0], aux[1:0]}
//   bundle[35:18] Vector2 slot  (same layout)
//   bundle[17:0]  Vector3 slot  (same layout)
//
// A vector register is named by 4 bits {cluster[1:0], reg[1:0]}; cluster
// 0..2 selects VRF1..VRF3, cluster 3 names no register. In scalar slots the
// second scalar source rb is imm[3:0].
package syncpro_pkg;

  localparam int unsigned SW     = 16;   // scalar word / sample component
  localparam int unsigned LANES  = 4;    // complex samples per vector
  localparam int unsigned VW     = 2 * SW * LANES;  // 128
  localparam int unsigned NVRF   = 3;    // vector clusters
  localparam int unsigned VREGS  = 4;    // registers per VRF
  localparam int unsigned SREGS  = 16;   // scalar registers
  localparam int unsigned IW     = 96;   // instruction bundle width
  localparam int unsigned PM_AW  = 8;    // 256 program words
  localparam int unsigned DM_AW  = 8;    // 256 data vectors

  typedef logic signed [SW-1:0] sword_t;

  typedef struct packed {
    logic signed [SW-1:0] im;
    logic signed [SW-1:0] re;
  } cplx_t;

  // lane 0 occupies bits [31:0], its real part bits [15:0]
  typedef cplx_t [LANES-1:0] vec_t;

  typedef struct packed {
    logic [1:0] cl;   // cluster 0..2, 3 = none
    logic [1:0] r;
  } vsel_t;

  localparam logic [1:0] CL_NONE = 2'd3;

  typedef enum logic [4:0] {
    S1_NOP   = 5'd0,
    S1_MOV   = 5'd1,   // rd = ra
    S1_MOVI  = 5'd2,   // rd = sext({ra, imm}) (12-bit immediate)
    S1_ADD   = 5'd3,   // rd = ra + rb
    S1_ADDI  = 5'd4,   // rd = ra + sext(imm)
    S1_SUB   = 5'd5,   // rd = ra - rb
    S1_MUL   = 5'd6,   // rd = low 16 bits of ra * rb
    S1_LSL   = 5'd7,   // rd = ra << imm[3:0]
    S1_ASR   = 5'd8,   // rd = ra >>> imm[3:0]
    S1_AND   = 5'd9,
    S1_OR    = 5'd10,
    S1_XOR   = 5'd11,
    S1_MODI  = 5'd12,  // rd = ra wrapped into [0, rb)
    S1_VST   = 5'd13,  // dmem[ra + imm] = vreg(rd field)
    S1_RGREP = 5'd14,  // rd = re(vreg(ra field)[imm[1:0]])
    S1_IGREP = 5'd15,  // rd = im(vreg(ra field)[imm[1:0]])
    S1_RMAX  = 5'd16,  // rd = max over lanes of re(vreg(ra field))
    S1_IMAX  = 5'd17,  // rd = max over lanes of im(vreg(ra field))
    S1_PINST = 5'd18,  // output port = ra
    S1_BEQZ  = 5'd19,  // if ra == 0 goto imm
    S1_BNEZ  = 5'd20,
    S1_BLTZ  = 5'd21,
    S1_BGEZ  = 5'd22,
    S1_JMP   = 5'd23   // goto imm
  } s1_op_e;

  typedef enum logic [4:0] {
    S2_NOP    = 5'd0,
    S2_VLD    = 5'd1,  // vreg(rd field) = dmem[ra + imm]
    S2_VLDP   = 5'd2,  // vreg(rd field) = dmem[ra]; ra = ra + sext(imm)
    S2_SPREAD = 5'd3,  // vreg(rd field) = 4 x (ra + j*rb)
    S2_PINLD  = 5'd4   // vreg(rd field) = next input-stream vector (blocking)
  } s2_op_e;

  typedef enum logic [3:0] {
    V1_NOP   = 4'd0,
    V1_VMOV  = 4'd1,   // d = 4 x (sext({a,b}) + j*0)
    V1_VADD  = 4'd2,
    V1_VSUB  = 4'd3,
    V1_VASR  = 4'd4,   // components >>> b field
    V1_VLSL  = 4'd5,   // components <<  b field
    V1_VAND  = 4'd6,
    V1_VOR   = 4'd7,
    V1_VCON  = 4'd8,   // complex conjugate
    V1_VREAL = 4'd9,   // keep real parts, imaginary = 0
    V1_VIMAG = 4'd10   // keep imaginary parts, real = 0
  } v1_op_e;

  typedef enum logic [3:0] {
    V2_NOP    = 4'd0,
    V2_VTRIANG = 4'd1, // d[i] = a[0] + .. + a[i] + b[i]
    V2_VLEVEL = 4'd2,  // d[i] = a[aux]
    V2_VROT   = 4'd3   // d[i] = {b,a}[i + aux]  (rotate / align)
  } v2_op_e;

  typedef enum logic [3:0] {
    V3_NOP  = 4'd0,
    V3_VCML = 4'd1     // d[i] = (a[i] * b[i]) >>> (15 - 4*aux)
  } v3_op_e;

  typedef struct packed {
    logic [4:0] op;
    logic [3:0] rd;
    logic [3:0] ra;
    logic [7:0] imm;
  } sslot_t;

  typedef struct packed {
    logic [3:0] op;
    vsel_t      d;
    vsel_t      a;
    vsel_t      b;
    logic [1:0] aux;
  } vslot_t;

  typedef struct packed {
    sslot_t s1;
    sslot_t s2;
    vslot_t v1;
    vslot_t v2;
    vslot_t v3;
  } bundle_t;

  // a vector operand request towards the read interconnect
  typedef struct packed {
    logic  used;
    vsel_t sel;
  } vreq_t;

  // decoded controls of one bundle in DE
  typedef struct packed {
    logic          valid;
    s1_op_e        s1_op;
    s2_op_e        s2_op;
    v1_op_e        v1_op;
    v2_op_e        v2_op;
    v3_op_e        v3_op;
    logic [3:0]    srf_ra0, srf_ra1, srf_ra2, srf_ra3;  // 4 SRF read ports
    logic          s1_wen;      // Scalar1 writes SRF (at end of EX)
    logic [3:0]    s1_rd;
    logic [7:0]    s1_imm;
    vreq_t         s1_vreq;     // Scalar1 vector source (vstore / evaluate)
    logic          s2_vwen;     // Scalar2 writes a vector (at end of EX)
    logic          s2_swen;     // Scalar2 writes SRF (post-increment)
    vsel_t         s2_vd;
    logic [3:0]    s2_rd;
    logic [7:0]    s2_imm;
    vreq_t [2:0]   va;          // operand A request of vector slot k
    vreq_t [2:0]   vb;          // operand B request of vector slot k
    vsel_t [2:0]   vd;          // destination of vector slot k
    logic  [2:0]   vwen;        // vector slot k writes a result
    logic [2:0][7:0] vimm;      // {a,b} fields of vector slot k
    logic [2:0][1:0] vaux;
    logic          dm_store;    // data memory write in DE
    logic          dm_load;     // data memory read in DE
    logic          pinld;       // needs an input-stream vector
    logic          pinst;       // writes the output port in EX
    logic          branch;      // conditional or unconditional branch
    s1_op_e        br_op;
    logic [7:0]    br_target;
  } de_ctrl_t;

  function automatic sword_t sext8(input logic [7:0] v);
    return sword_t'(signed'(v));
  endfunction

endpackage
