// ecc_pkg: types, curve constants and field helpers shared by the window-method
// scalar multiplier.
//
// The design works on a short Weierstrass curve y^2 = x^3 - 3x + b over GF(p).
// The default curve is NIST P-256 (the Solinas-prime curve family); any curve
// with a = -3 and a 256-bit prime can be used by overriding the P_MOD / B_COEF
// parameters of the modules. Points are held in homogeneous projective
// coordinates (X:Y:Z), x = X/Z, y = Y/Z; the point at infinity is (0:1:0).
//
// The point adder and doubler are small microcoded engines: each step is one
// field operation (add, subtract or multiply) between registers of a local
// register file. The micro-instruction format is defined here.
//
// The published error-detection scheme names no curve; P-256, projective
// coordinates and the microcoded engines are this design's choices.
package ecc_pkg;

  localparam int unsigned N = 256;   // field element width
  typedef logic [N-1:0] fe_t;        // field element

  // NIST P-256 domain parameters
  localparam fe_t P256_P  = 256'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;
  localparam fe_t P256_B  = 256'h5AC635D8_AA3A93E7_B3EBBD55_769886BC_651D06B0_CC53B0F6_3BCE3C3E_27D2604B;
  localparam fe_t P256_GX = 256'h6B17D1F2_E12C4247_F8BCE6E5_63A440F2_77037D81_2DEB33A0_F4A13945_D898C296;
  localparam fe_t P256_GY = 256'h4FE342E2_FE1A7F9B_8EE7EB4A_7C0F9E16_2BCE3357_6B315ECE_CBB64068_37BF51F5;
  localparam fe_t P256_N  = 256'hFFFFFFFF_00000000_FFFFFFFF_FFFFFFFF_BCE6FAAD_A7179E84_F3B9CAC2_FC632551;

  // projective point (X:Y:Z)
  typedef struct packed {
    fe_t x;
    fe_t y;
    fe_t z;
  } point_t;

  localparam point_t POINT_INF = '{x: '0, y: fe_t'(1), z: '0};

  // micro-instruction of the point engines
  typedef enum logic [1:0] {
    FOP_ADD = 2'd0,
    FOP_SUB = 2'd1,
    FOP_MUL = 2'd2
  } fop_e;

  // register file of a point engine: operands 1 and 2, temporaries, result, b
  typedef enum logic [3:0] {
    R_X1 = 4'd0,  R_Y1 = 4'd1,  R_Z1 = 4'd2,
    R_X2 = 4'd3,  R_Y2 = 4'd4,  R_Z2 = 4'd5,
    R_T0 = 4'd6,  R_T1 = 4'd7,  R_T2 = 4'd8,  R_T3 = 4'd9, R_T4 = 4'd10,
    R_X3 = 4'd11, R_Y3 = 4'd12, R_Z3 = 4'd13,
    R_B  = 4'd14
  } freg_e;

  localparam int unsigned NREG = 15;

  typedef struct packed {
    fop_e  op;
    freg_e d;
    freg_e a;
    freg_e b;
  } uop_t;

  function automatic uop_t uop(fop_e op, freg_e d, freg_e a, freg_e b);
    uop_t u;
    u.op = op; u.d = d; u.a = a; u.b = b;
    return u;
  endfunction

  // (a + b) mod p, inputs already reduced
  function automatic fe_t fadd(fe_t a, fe_t b, fe_t p);
    logic [N:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, p}) s = s - {1'b0, p};
    return s[N-1:0];
  endfunction

  // (a - b) mod p, inputs already reduced
  function automatic fe_t fsub(fe_t a, fe_t b, fe_t p);
    logic [N:0] d;
    d = {1'b0, a} - {1'b0, b};
    if (d[N]) d = d + {1'b0, p};
    return d[N-1:0];
  endfunction

endpackage
