// t0_pkg: types and constants shared by the T0 vector coprocessor.
//
// The vector unit has 16 vector registers of 32 elements of 32 bits, striped
// over 8 parallel 32-bit slices (lanes): element i of a register lives in
// slice i%8 of element group i/8. These numbers follow the chip. The
// configuration word of the arithmetic pipelines and the decoded vector
// instruction format below are this design's own encodings: the chip takes the
// pipeline configuration from a scalar register named in each instruction, but
// the bit layout of that register and of the instruction are not published.
package t0_pkg;

  localparam int unsigned ELEN   = 32;  // bits per element
  localparam int unsigned LANES  = 8;   // parallel slices
  localparam int unsigned NVREG  = 16;  // vector registers
  localparam int unsigned VLMAX  = 32;  // elements per vector register
  localparam int unsigned NGRP   = VLMAX / LANES;  // element groups per register

  // Logic unit operation.
  typedef enum logic [1:0] {LOP_PASSA = 2'd0, LOP_AND = 2'd1, LOP_OR = 2'd2, LOP_XOR = 2'd3} lop_e;
  // Second adder input.
  typedef enum logic [1:0] {YS_B = 2'd0, YS_A = 2'd1, YS_ZERO = 2'd2, YS_ZERO2 = 2'd3} ysel_e;
  // Adder operation on the 33-bit X and Y operands.
  typedef enum logic [1:0] {AOP_ADD = 2'd0, AOP_SUB = 2'd1, AOP_RSUB = 2'd2, AOP_NEGX = 2'd3} aop_e;
  // Condition tested on the adder result.
  typedef enum logic [2:0] {C_ALWAYS = 3'd0, C_EQ = 3'd1, C_NE = 3'd2, C_LT = 3'd3,
                            C_LE = 3'd4, C_GT = 3'd5, C_GE = 3'd6, C_NEVER = 3'd7} cond_e;
  // Rounding mode of the right shifter.
  typedef enum logic [1:0] {RND_FLOOR = 2'd0, RND_ZERO = 2'd1, RND_HALFUP = 2'd2, RND_EVEN = 2'd3} rnd_e;
  // Source of the value handed to the clipper.
  typedef enum logic [1:0] {OS_RSH = 2'd0, OS_Y = 2'd1, OS_SEL = 2'd2, OS_BOOL = 2'd3} osel_e;
  // Clipper saturation width.
  typedef enum logic [1:0] {CL_NONE = 2'd0, CL_8 = 2'd1, CL_16 = 2'd2, CL_32 = 2'd3} clip_e;

  // 32-bit pipeline configuration word, held in a scalar register.
  typedef struct packed {
    lop_e       lop;       // [31:30] logic unit operation
    logic       lsh_srcb;  // [29]    left shift amount from B[4:0] instead of lsh_amt
    logic [4:0] lsh_amt;   // [28:24]
    logic       use_mul;   // [23]    X = 16x16 product (VP0 only) instead of shifted value
    logic       sgn;       // [22]    signed arithmetic (extension, multiply, right shift)
    ysel_e      ysel;      // [21:20]
    aop_e       aop;       // [19:18]
    cond_e      cond;      // [17:15]
    logic       rsh_srcb;  // [14]    right shift amount from B[4:0] instead of rsh_amt
    logic [4:0] rsh_amt;   // [13:9]
    rnd_e       rnd;       // [8:7]
    osel_e      osel;      // [6:5]
    clip_e      clip;      // [4:3]
    logic       clip_uns;  // [2]     saturate to the unsigned range
    logic       cmov;      // [1]     write back only where the condition holds
    logic       mac;       // [0]     with use_mul: X = product + left-shift output (carry-save adder)
  } vpcfg_t;

  typedef enum logic [1:0] {U_VMP = 2'd0, U_VP0 = 2'd1, U_VP1 = 2'd2, U_NONE = 2'd3} unit_e;

  // Vector memory unit operations.
  typedef enum logic [3:0] {
    M_LD   = 4'd0,  // unit-stride load, rs = base byte address
    M_ST   = 4'd1,  // unit-stride store
    M_LDS  = 4'd2,  // strided load, rt = stride in bytes
    M_STS  = 4'd3,  // strided store
    M_LDX  = 4'd4,  // indexed load, vs2 holds byte offsets
    M_STX  = 4'd5,  // indexed store
    M_INS  = 4'd6,  // scalar insert: vd[rt] = rs
    M_EXT  = 4'd7,  // scalar extract: scalar result = vs1[rt]
    M_VEXT = 4'd8,  // vector extract: vd[i] = vs1[rt + i], i < vl
    M_SLD  = 4'd9,  // scalar load from address rs, result on the scalar return
    M_SST  = 4'd10  // scalar store of rt to address rs
  } mop_e;

  typedef enum logic [1:0] {ES_8 = 2'd0, ES_16 = 2'd1, ES_32 = 2'd2} esz_e;

  // Decoded vector instruction as handed over by the scalar core.
  typedef struct packed {
    unit_e       unit;
    mop_e        mop;
    esz_e        esz;
    logic        sext;     // sign-extend loaded 8/16-bit elements
    logic [3:0]  vd;
    logic [3:0]  vs1;      // VP: operand A; VMP: store data / extract source
    logic [3:0]  vs2;      // VP: operand B; VMP: index vector
    logic [5:0]  vl;       // vector length, 0..32
    logic        bscalar;  // VP: operand B is the scalar rs broadcast
    logic [31:0] rs;       // VP: scalar operand; VMP: base address / insert value
    logic [31:0] rt;       // VP: configuration word; VMP: stride / element index
  } vinst_t;

  function automatic logic [NVREG-1:0] regbit(input logic [3:0] r);
    return NVREG'(1) << r;
  endfunction

endpackage
