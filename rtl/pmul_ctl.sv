// pmul_ctl: point multiplication and IO control unit.
//
// Computes Q = kP on the shared datapath by sequencing point additions and
// doublings on the selected point addition & doubling control unit, plus its
// own micro-ops for loading, the initial and final transforms and the output.
//
//   load     the affine point P, the curve constant and Rsquare are written
//            from the input shift registers into R1X, R1Y, RCA and RR2.
//   init     RONE := Rsquare * 1 (Montgomery one), RCA and P are brought into
//            Montgomery form by multiplying with Rsquare; R1 := (x, y, 1) and
//            R0 := (0, 1, 1), which is the neutral point of the Edwards curve.
//            For the Weierstrass curves R0 starts as the point at infinity,
//            kept as a flag.
//   loop     add-always (right to left, after Joye): for j = 0 .. n-1,
//            b = 1 - k_j; R_b := 2 R_b; R_b := R_b + R_kj. Every bit costs one
//            doubling and one addition whatever its value. With unified
//            doublings (Edwards) the doubling is the unified addition R_b + R_b.
//            secure NAF (Edwards, unified operations only): the scalar is
//            recoded on the fly into non-adjacent form, least significant digit
//            first; a non-zero digit adds (or subtracts) R1 into R0 and every
//            digit doubles R1. Then R0 := R0 + R1, r := n/2 + 1 - a (a = number
//            of non-zero digits), floor(r/2) times {R0 := R0 + R1; R1 := 2 R1},
//            R0 := R0 - R1, and, if r is odd, R1 := 2 R1. The extra operations
//            keep R0 - R1 equal to the result, so they are not dummies, and the
//            total is always 3n/2 + 4 unified operations.
//   final    affine units: each coordinate is multiplied by plain 1 to leave
//            Montgomery form. Projective units: Z^-1 is computed by Fermat's
//            theorem, Z^(M-2), with left-to-right square-and-multiply over the
//            bits of M - 2, then x = X Z^-1 (Edwards) or x = X Z^-2, y = Y Z^-3
//            (Jacobian), then the Montgomery form is left.
//   output   R0X and R0Y are loaded into the output shift register.
//
// The point at infinity of the Weierstrass curves: the datapath's final-copy
// control keeps or copies operands when one of them is at infinity, and the
// T5 zero check marks a sum at infinity; each point operation still runs its
// full program, so the run time does not depend on this.
//
// Document versus this design: the algorithms and the final inversion are the
// document's. The NAF loop here runs over n + 1 digits, because the NAF of an
// n-bit scalar can have n + 1 digits, and r is n/2 + 1 - a so that it cannot
// go negative; the document's listing runs over n digits with r = n/2 - a
// (3n/2 + 2 operations). Edwards projective points are also put in Montgomery
// form, where the document skips the transform; the result is the same.
//
// Interface: start (one cycle) with cfg selects the configuration; done is
// high for one cycle, the cycle in which the output shift register presents
// the first result word; inf (valid from done until the next start) marks a
// result at the point at infinity (Weierstrass only). k and m
// must stay stable from start to done.
module pmul_ctl
  import ecc_pkg::*;
#(
  parameter int N = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  cfg_e         cfg,
  input  logic [N-1:0] k,
  input  logic [N-1:0] m,
  input  logic [N-1:0] px,
  input  logic [N-1:0] py,
  input  logic [N-1:0] ca,
  input  logic [N-1:0] r2,
  // own micro-ops on the datapath
  output logic         own,         // this unit drives the datapath
  output logic         uop_valid,
  output uop_t         uop,
  input  logic         uop_done,
  // point mapping for the point units
  output logic         p1_sel,
  output logic         p2_sel,
  output logic         p2_neg,
  output fin_e         fin_mode,
  input  logic         chk_zero,
  // point addition & doubling control units
  output unit_e        unit,
  output logic         pad_start,
  output pad_op_e      pad_op,
  input  logic         pad_done,
  // register file load / read
  output logic         ext_we,
  output logic [3:0]   ext_addr,
  output logic [N-1:0] ext_wdata,
  output raddr_t       ext_raddr,
  input  logic [N-1:0] ext_rdata,
  // output shift register load: the register takes ext_rdata, which reads
  // R0X during out_ld_x and R0Y during out_ld_y
  output logic         out_ld_x,
  output logic         out_ld_y,
  // status
  output logic         busy,
  output logic         done,
  output logic         inf,
  // event counters for observation: point additions, doublings and
  // subtractions issued, and exponentiation multiplications
  output logic [15:0]  n_add,
  output logic [15:0]  n_dbl,
  output logic [15:0]  n_sub,
  output logic [15:0]  n_expmul
);
  typedef enum logic [4:0] {
    S_IDLE, S_LOAD, S_INIT,
    S_AA_DBL, S_AA_ADD,
    S_NAF_DIG, S_NAF_ADD, S_NAF_DBL, S_NAF_L8, S_NAF_XADD, S_NAF_XDBL,
    S_NAF_L12, S_NAF_L13,
    S_FIN_PRE, S_EXP_SQ, S_EXP_MUL, S_FIN_POST,
    S_OUTX, S_OUTY, S_DONE
  } state_e;

  localparam int JW = $clog2(N + 2);
  localparam int INIT_LEN = 8;

  state_e      st;
  cfg_e        cfg_q;
  logic [JW-1:0] j;          // scalar digit index
  logic [JW-1:0] ei;         // exponent bit index
  logic [3:0]  pc;           // own micro-program counter
  logic        launched;     // point operation started in this state
  logic        inf0, inf1;   // R0 / R1 at infinity (Weierstrass)
  logic        carry;        // NAF recoder carry
  logic        dneg;         // current NAF digit is -1
  logic [JW-1:0] a_cnt;      // non-zero NAF digits
  logic [JW-1:0] r_val;      // number of extra operations r
  logic [JW-1:0] xr;         // remaining extra iterations

  logic weier, proj, unified_dbl;
  assign weier       = (cfg_q == CFG_WA_AA) || (cfg_q == CFG_WJ_AA);
  assign proj        = (cfg_unit(cfg_q) == UNIT_WJ) || (cfg_unit(cfg_q) == UNIT_EP);
  assign unified_dbl = (cfg_q == CFG_EA_AAU) || (cfg_q == CFG_EP_AAU);
  assign unit        = cfg_unit(cfg_q);

  // scalar bit j, with zeros above bit n-1
  logic kj, kj1, b;
  assign kj  = (int'(j) < N) ? k[j] : 1'b0;
  assign kj1 = (int'(j) + 1 < N) ? k[j + 1] : 1'b0;
  assign b   = ~kj;

  logic [N-1:0] e;   // Fermat exponent M - 2
  assign e = m - N'(2);

  logic infb, infk;
  assign infb = b  ? inf1 : inf0;
  assign infk = kj ? inf1 : inf0;

  logic pad_state;
  assign pad_state = st inside {S_AA_DBL, S_AA_ADD, S_NAF_ADD, S_NAF_DBL, S_NAF_L8,
                                S_NAF_XADD, S_NAF_XDBL, S_NAF_L12, S_NAF_L13};

  // ---------------------------------------------------- point operation setup
  always_comb begin
    p1_sel   = 1'b0;
    p2_sel   = 1'b1;
    p2_neg   = 1'b0;
    fin_mode = FIN_WRITE;
    pad_op   = PAD_ADD;
    case (st)
      S_AA_DBL: begin
        p1_sel = b; p2_sel = b;
        pad_op = unified_dbl ? PAD_ADD : PAD_DBL;
        if (weier && infb) fin_mode = FIN_KEEP;
      end
      S_AA_ADD: begin
        p1_sel = b; p2_sel = kj;
        if (weier) begin
          if (infb && infk)  fin_mode = FIN_KEEP;
          else if (infb)     fin_mode = FIN_COPY;
          else if (infk)     fin_mode = FIN_KEEP;
        end
      end
      S_NAF_ADD:  begin p1_sel = 1'b0; p2_sel = 1'b1; p2_neg = dneg; end
      S_NAF_L8, S_NAF_XADD: begin p1_sel = 1'b0; p2_sel = 1'b1; end
      S_NAF_L12:  begin p1_sel = 1'b0; p2_sel = 1'b1; p2_neg = 1'b1; end
      S_NAF_DBL, S_NAF_XDBL, S_NAF_L13: begin p1_sel = 1'b1; p2_sel = 1'b1; end
      default: ;
    endcase
  end

  assign pad_start = pad_state && !launched;

  // ---------------------------------------------------------- own micro-ops
  always_comb begin
    uop = mk(MAU_ADD, T6, KZERO, KZERO);
    case (st)
      S_INIT: case (pc)
        4'd0: uop = mk(MAU_MUL, RONE, RR2, KONE);
        4'd1: uop = mk(MAU_MUL, RCA, RCA, RR2);
        4'd2: uop = mk(MAU_MUL, R1X, R1X, RR2);
        4'd3: uop = mk(MAU_MUL, R1Y, R1Y, RR2);
        4'd4: uop = mk(MAU_ADD, R1Z, RONE, KZERO);
        4'd5: uop = mk(MAU_ADD, R0X, KZERO, KZERO);
        4'd6: uop = mk(MAU_ADD, R0Y, RONE, KZERO);
        default: uop = mk(MAU_ADD, R0Z, RONE, KZERO);
      endcase
      S_FIN_PRE: uop = mk(MAU_ADD, T6, RONE, KZERO);
      S_EXP_SQ:  uop = mk(MAU_MUL, T6, T6, T6);
      S_EXP_MUL: uop = mk(MAU_MUL, T6, T6, R0Z);
      S_FIN_POST:
        if (proj) case (pc)
          4'd0: uop = (unit == UNIT_WJ) ? mk(MAU_MUL, T5, T6, T6) : mk(MAU_ADD, T5, T6, KZERO);
          4'd1: uop = mk(MAU_MUL, R0X, R0X, T5);
          4'd2: uop = mk(MAU_MUL, R0X, R0X, KONE);
          4'd3: uop = (unit == UNIT_WJ) ? mk(MAU_MUL, T5, T5, T6) : mk(MAU_ADD, T5, T5, KZERO);
          4'd4: uop = mk(MAU_MUL, R0Y, R0Y, T5);
          default: uop = mk(MAU_MUL, R0Y, R0Y, KONE);
        endcase else case (pc)
          4'd0: uop = mk(MAU_MUL, R0X, R0X, KONE);
          default: uop = mk(MAU_MUL, R0Y, R0Y, KONE);
        endcase
      default: ;
    endcase
  end

  assign own       = !pad_state;
  assign uop_valid = (st inside {S_INIT, S_EXP_SQ, S_EXP_MUL, S_FIN_POST}) ||
                     (st == S_FIN_PRE && proj);

  logic fin_post_last;
  assign fin_post_last = proj ? (pc == 4'd5) : (pc == 4'd1);

  // ------------------------------------------------------------- load/output
  always_comb begin
    ext_we    = (st == S_LOAD);
    ext_addr  = 4'(R1X);
    ext_wdata = px;
    case (pc)
      4'd0: begin ext_addr = 4'(R1X); ext_wdata = px; end
      4'd1: begin ext_addr = 4'(R1Y); ext_wdata = py; end
      4'd2: begin ext_addr = 4'(RCA); ext_wdata = ca; end
      default: begin ext_addr = 4'(RR2); ext_wdata = r2; end
    endcase
    ext_raddr = (st == S_OUTY) ? R0Y : R0X;
  end
  assign out_ld_x = (st == S_OUTX);
  assign out_ld_y = (st == S_OUTY);

  // NAF digit of the current position (Reitwiesner, right to left)
  logic dnz, dng, carry_n;
  always_comb begin
    dnz = 1'b0; dng = 1'b0; carry_n = carry;
    if (kj ^ carry) begin          // kj + carry == 1
      dnz = 1'b1;
      dng = kj1;
      carry_n = kj1;
    end else begin
      carry_n = kj & carry;        // kj + carry == 2 -> 0, carry 1
    end
  end

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cfg_q <= CFG_WA_AA; j <= '0; ei <= '0; pc <= '0;
      launched <= 1'b0; inf0 <= 1'b0; inf1 <= 1'b0; carry <= 1'b0; dneg <= 1'b0;
      a_cnt <= '0; r_val <= '0; xr <= '0; inf <= 1'b0;
      n_add <= '0; n_dbl <= '0; n_sub <= '0; n_expmul <= '0;
    end else begin
      if (pad_start) begin
        launched <= 1'b1;
        if (st == S_AA_DBL && !unified_dbl) n_dbl <= n_dbl + 1'b1;
        else if (p2_neg)                    n_sub <= n_sub + 1'b1;
        else if (p1_sel == p2_sel)          n_dbl <= n_dbl + 1'b1;
        else                                n_add <= n_add + 1'b1;
      end
      if (pad_done) launched <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_LOAD; pc <= '0; cfg_q <= cfg;
          n_add <= '0; n_dbl <= '0; n_sub <= '0; n_expmul <= '0;
        end
        S_LOAD: begin
          pc <= pc + 1'b1;
          if (pc == 4'd3) begin st <= S_INIT; pc <= '0; end
        end
        S_INIT: if (uop_done) begin
          pc <= pc + 1'b1;
          if (pc == 4'(INIT_LEN - 1)) begin
            pc <= '0; j <= '0; carry <= 1'b0; a_cnt <= '0;
            inf0 <= weier; inf1 <= 1'b0;
            st <= (cfg_q == CFG_EA_NAF || cfg_q == CFG_EP_NAF) ? S_NAF_DIG : S_AA_DBL;
          end
        end
        // ---------------------------------------------- add-always
        S_AA_DBL: if (pad_done) st <= S_AA_ADD;
        S_AA_ADD: if (pad_done) begin
          if (weier) begin
            if (infb && !infk) begin
              if (b) inf1 <= 1'b0; else inf0 <= 1'b0;
            end else if (!infb && !infk) begin
              if (b) inf1 <= chk_zero; else inf0 <= chk_zero;
            end
          end
          if (int'(j) == N - 1) st <= S_FIN_PRE;
          else begin j <= j + 1'b1; st <= S_AA_DBL; end
        end
        // ---------------------------------------------- secure NAF
        S_NAF_DIG: begin
          carry <= carry_n;
          dneg  <= dng;
          if (dnz) begin a_cnt <= a_cnt + 1'b1; st <= S_NAF_ADD; end
          else st <= S_NAF_DBL;
        end
        S_NAF_ADD: if (pad_done) st <= S_NAF_DBL;
        S_NAF_DBL: if (pad_done) begin
          if (int'(j) == N) begin
            st <= S_NAF_L8;
            r_val <= JW'(N / 2 + 1) - a_cnt;
          end else begin
            j <= j + 1'b1; st <= S_NAF_DIG;
          end
        end
        S_NAF_L8: if (pad_done) begin
          xr <= r_val >> 1;
          st <= (r_val >= JW'(2)) ? S_NAF_XADD : S_NAF_L12;
        end
        S_NAF_XADD: if (pad_done) st <= S_NAF_XDBL;
        S_NAF_XDBL: if (pad_done) begin
          xr <= xr - 1'b1;
          st <= (xr == JW'(1)) ? S_NAF_L12 : S_NAF_XADD;
        end
        S_NAF_L12: if (pad_done) st <= r_val[0] ? S_NAF_L13 : S_FIN_PRE;
        S_NAF_L13: if (pad_done) st <= S_FIN_PRE;
        // ---------------------------------------------- final transform
        S_FIN_PRE: begin
          if (!proj) begin
            pc <= '0; st <= S_FIN_POST;
          end else if (uop_done) begin
            ei <= JW'(N - 1); st <= S_EXP_SQ;
          end
        end
        S_EXP_SQ: if (uop_done) begin
          n_expmul <= n_expmul + 1'b1;
          if (e[ei]) st <= S_EXP_MUL;
          else if (ei == '0) begin pc <= '0; st <= S_FIN_POST; end
          else ei <= ei - 1'b1;
        end
        S_EXP_MUL: if (uop_done) begin
          n_expmul <= n_expmul + 1'b1;
          if (ei == '0) begin pc <= '0; st <= S_FIN_POST; end
          else begin ei <= ei - 1'b1; st <= S_EXP_SQ; end
        end
        S_FIN_POST: if (uop_done) begin
          pc <= pc + 1'b1;
          if (fin_post_last) st <= S_OUTX;
        end
        S_OUTX: st <= S_OUTY;
        S_OUTY: begin
          st  <= S_DONE;
          inf <= weier && inf0;
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
  assign done = (st == S_DONE);
endmodule
