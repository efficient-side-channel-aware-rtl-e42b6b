// ecc_pkg: types and constants shared by the elliptic curve processor.
//
// The processor is built as a micro-coded machine. Every point operation is a
// short program of modular micro-operations (uop_t) that a control unit issues
// to one shared datapath: a modular arithmetic unit (mau) fed by an operand
// multiplexer from a small register file. This package defines the operation
// codes of the arithmetic unit, the register-file address map, the micro-op
// format and the eight point multiplication configurations.
//
// The register map follows the idea of the Weierstrass Jacobian datapath, the
// largest of the four point units, which every configuration shares: two point
// registers R0/R1 with three coordinates each, the curve constant, the
// Montgomery constants and temporaries. The number of temporaries (7) is this
// design's choice: it lets every program keep its result in temporaries until
// the final copy into the destination point.
package ecc_pkg;

  // ---------------------------------------------------------------- mau ops
  typedef enum logic [2:0] {
    MAU_ADD  = 3'd0,   // Z = X + Y mod M
    MAU_SUB  = 3'd1,   // Z = X - Y mod M
    MAU_HALF = 3'd2,   // Z = X / 2 mod M
    MAU_MUL  = 3'd3,   // Z = X * Y * 2^-(n+2) mod M   (Montgomery product)
    MAU_DIV  = 3'd4    // Z = (X / Y) * 2^(n+2) mod M  (division + Montgomery restore)
  } mau_op_e;

  // --------------------------------------------------------- register space
  // 5-bit operand address. 0..15 are physical registers, 16..23 are constants
  // and the virtual operand points P1/P2 that the point multiplication
  // controller maps onto R0 or R1.
  typedef logic [4:0] raddr_t;

  localparam raddr_t R0X = 5'd0,  R0Y = 5'd1,  R0Z = 5'd2;
  localparam raddr_t R1X = 5'd3,  R1Y = 5'd4,  R1Z = 5'd5;
  localparam raddr_t RCA = 5'd6;   // curve constant a (Weierstrass) or d (Edwards)
  localparam raddr_t RONE = 5'd7;  // Montgomery one: 2^(n+2) mod M
  localparam raddr_t RR2 = 5'd8;   // Montgomery constant Rsquare: 2^(2n+4) mod M
  localparam raddr_t T0 = 5'd9,  T1 = 5'd10, T2 = 5'd11, T3 = 5'd12;
  localparam raddr_t T4 = 5'd13, T5 = 5'd14, T6 = 5'd15;
  localparam raddr_t KZERO = 5'd16; // constant 0
  localparam raddr_t KONE  = 5'd17; // constant 1 (plain, not Montgomery form)
  localparam raddr_t P1X = 5'd18, P1Y = 5'd19, P1Z = 5'd20;
  localparam raddr_t P2X = 5'd21, P2Y = 5'd22, P2Z = 5'd23;

  localparam int NREGS = 16;

  // ------------------------------------------------------------ micro-op
  // fin marks the copy of a program's result into P1: the datapath may then
  // suppress the write or take the value from P2 (point at infinity handling).
  typedef struct packed {
    mau_op_e op;
    raddr_t  dst;
    raddr_t  a;
    raddr_t  b;
    logic    fin;
  } uop_t;

  // ------------------------------------------------------- point unit ops
  typedef enum logic [1:0] {
    PAD_ADD     = 2'd0,  // P1 := P1 + P2 (unified for Edwards)
    PAD_DBL     = 2'd1   // P1 := 2 P1 (dedicated / optimized doubling)
  } pad_op_e;

  // Which point addition & doubling control unit is active.
  typedef enum logic [1:0] {
    UNIT_WA = 2'd0,   // Weierstrass affine
    UNIT_WJ = 2'd1,   // Weierstrass Jacobian
    UNIT_EA = 2'd2,   // Edwards affine
    UNIT_EP = 2'd3    // Edwards projective
  } unit_e;

  // Final-copy handling requested by the point multiplication controller.
  typedef enum logic [1:0] {
    FIN_WRITE = 2'd0,  // write the computed result into P1
    FIN_KEEP  = 2'd1,  // leave P1 unchanged (P2 was the point at infinity)
    FIN_COPY  = 2'd2   // write P2 into P1 (P1 was the point at infinity)
  } fin_e;

  // ------------------------------------------------- the eight configurations
  typedef enum logic [2:0] {
    CFG_WA_AA  = 3'd0,  // Weierstrass affine, add-always
    CFG_WJ_AA  = 3'd1,  // Weierstrass Jacobian, add-always
    CFG_EA_AAU = 3'd2,  // Edwards affine, add-always, unified doublings
    CFG_EA_AAO = 3'd3,  // Edwards affine, add-always, optimized doublings
    CFG_EA_NAF = 3'd4,  // Edwards affine, secure NAF
    CFG_EP_AAU = 3'd5,  // Edwards projective, add-always, unified doublings
    CFG_EP_AAO = 3'd6,  // Edwards projective, add-always, optimized doublings
    CFG_EP_NAF = 3'd7   // Edwards projective, secure NAF
  } cfg_e;

  function automatic unit_e cfg_unit(cfg_e c);
    case (c)
      CFG_WA_AA:                         return UNIT_WA;
      CFG_WJ_AA:                         return UNIT_WJ;
      CFG_EA_AAU, CFG_EA_AAO, CFG_EA_NAF: return UNIT_EA;
      default:                           return UNIT_EP;
    endcase
  endfunction

  function automatic uop_t mk(mau_op_e op, raddr_t dst, raddr_t a, raddr_t b);
    uop_t u;
    u.op = op; u.dst = dst; u.a = a; u.b = b; u.fin = 1'b0;
    return u;
  endfunction

  // final copy of a result temporary into a P1 coordinate (x + 0)
  function automatic uop_t mkfin(raddr_t dst, raddr_t src);
    uop_t u;
    u.op = MAU_ADD; u.dst = dst; u.a = src; u.b = KZERO; u.fin = 1'b1;
    return u;
  endfunction

endpackage
