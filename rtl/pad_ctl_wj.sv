// pad_ctl_wj: Weierstrass Jacobian point addition & doubling control unit.
//
// A micro-programmed finite state machine: each state issues one modular
// operation to the shared datapath (pad_datapath) and waits for it to finish,
// so every state is one register-to-register transfer through the mau.
// The two programs below are fixed sequences; no branch depends on the data,
// so the run time of each operation is constant. Operands are Montgomery
// residues; P1 and P2 are the virtual operand points, RCA the curve constant,
// RONE the Montgomery one. Results are built in temporaries and copied into
// P1 at the end, so P1 and P2 may be the same point register.
// Addition (P1 := P1 + P2, Jacobian, Eq. 2.7 in the order of Table 4.4):
//   U1 = X1 Z2^2, U2 = X2 Z1^2, S1 = Y1 Z2^3, S2 = Y2 Z1^3, H = U2 - U1, r = S2 - S1
//   X3 = r^2 - H^2 (U2 + U1)
//   Y3 = ( r (H^2 (U2 + U1) - 2 X3) - H^3 (S2 + S1) ) / 2
//   Z3 = H Z1 Z2                                   (16 MUL, as in the document)
// Doubling (P1 := 2 P1, Eq. 2.8 in the order of Table 4.6):
//   X3 = (3X^2 + aZ^4)^2 - 8XY^2, Y3 = (3X^2 + aZ^4)(4XY^2 - X3) - 8Y^4, Z3 = 2YZ
//                                                  (10 MUL, as in the document)
// H is left in T5 for the point-at-infinity check.
// The schedule follows the document's operation order where it gives one;
// the final copies into P1 (marked fin) are this design's addition.
//   addition: 28 micro-ops (16 MUL, 0 DIV, 9 ADD/SUB, 3 result copies)
//   doubling: 26 micro-ops (10 MUL, 0 DIV, 13 ADD/SUB, 3 result copies)
//
// Interface: start (one cycle, with op) begins a program; uop/uop_valid are
// held until the datapath pulses uop_done; done pulses for one cycle after the
// last micro-op has completed. start is ignored while busy.
module pad_ctl_wj
  import ecc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  pad_op_e op,
  output logic    uop_valid,
  output uop_t    uop,
  input  logic    uop_done,
  output logic    done,
  output logic    busy
);
  localparam int NADD = 28;
  localparam int NDBL = 26;

  pad_op_e    op_q;
  logic [4:0] pc;

  function automatic uop_t prog_add(logic [4:0] i);
    uop_t u;
    u = mk(MAU_ADD, T6, KZERO, KZERO);
    case (i)
       0: u = mk(MAU_MUL, T0, P1Z, P1Z);
       1: u = mk(MAU_MUL, T1, P2Y, P1Z);
       2: u = mk(MAU_MUL, T1, T1, T0);
       3: u = mk(MAU_MUL, T0, P2X, T0);
       4: u = mk(MAU_MUL, T2, P2Z, P2Z);
       5: u = mk(MAU_MUL, T3, P1Y, P2Z);
       6: u = mk(MAU_MUL, T3, T3, T2);
       7: u = mk(MAU_MUL, T2, P1X, T2);
       8: u = mk(MAU_MUL, T4, P1Z, P2Z);
       9: u = mk(MAU_SUB, T5, T0, T2);
      10: u = mk(MAU_ADD, T0, T0, T2);
      11: u = mk(MAU_SUB, T2, T1, T3);
      12: u = mk(MAU_ADD, T1, T1, T3);
      13: u = mk(MAU_MUL, T4, T4, T5);
      14: u = mk(MAU_MUL, T3, T5, T5);
      15: u = mk(MAU_MUL, T0, T3, T0);
      16: u = mk(MAU_MUL, T3, T3, T5);
      17: u = mk(MAU_MUL, T1, T3, T1);
      18: u = mk(MAU_MUL, T3, T2, T2);
      19: u = mk(MAU_SUB, T3, T3, T0);
      20: u = mk(MAU_SUB, T0, T0, T3);
      21: u = mk(MAU_SUB, T0, T0, T3);
      22: u = mk(MAU_MUL, T0, T2, T0);
      23: u = mk(MAU_SUB, T0, T0, T1);
      24: u = mk(MAU_HALF, T0, T0, KZERO);
      25: u = mkfin(P1X, T3);
      26: u = mkfin(P1Y, T0);
      27: u = mkfin(P1Z, T4);
      default: ;
    endcase
    return u;
  endfunction

  function automatic uop_t prog_dbl(logic [4:0] i);
    uop_t u;
    u = mk(MAU_ADD, T6, KZERO, KZERO);
    case (i)
       0: u = mk(MAU_MUL, T0, P1Y, P1Y);
       1: u = mk(MAU_MUL, T1, P1Z, P1Z);
       2: u = mk(MAU_MUL, T1, T1, T1);
       3: u = mk(MAU_MUL, T1, RCA, T1);
       4: u = mk(MAU_MUL, T2, P1X, P1X);
       5: u = mk(MAU_ADD, T3, T2, T2);
       6: u = mk(MAU_ADD, T3, T3, T2);
       7: u = mk(MAU_ADD, T1, T3, T1);
       8: u = mk(MAU_MUL, T2, T1, T1);
       9: u = mk(MAU_MUL, T3, P1Y, P1Z);
      10: u = mk(MAU_ADD, T3, T3, T3);
      11: u = mk(MAU_MUL, T4, P1X, T0);
      12: u = mk(MAU_ADD, T4, T4, T4);
      13: u = mk(MAU_ADD, T4, T4, T4);
      14: u = mk(MAU_ADD, T6, T4, T4);
      15: u = mk(MAU_SUB, T2, T2, T6);
      16: u = mk(MAU_SUB, T4, T4, T2);
      17: u = mk(MAU_MUL, T4, T1, T4);
      18: u = mk(MAU_MUL, T0, T0, T0);
      19: u = mk(MAU_ADD, T0, T0, T0);
      20: u = mk(MAU_ADD, T0, T0, T0);
      21: u = mk(MAU_ADD, T0, T0, T0);
      22: u = mk(MAU_SUB, T4, T4, T0);
      23: u = mkfin(P1X, T2);
      24: u = mkfin(P1Y, T4);
      25: u = mkfin(P1Z, T3);
      default: ;
    endcase
    return u;
  endfunction

  logic last;
  assign last = (op_q == PAD_ADD) ? (pc == 5'(NADD - 1)) : (pc == 5'(NDBL - 1));
  assign uop  = (op_q == PAD_ADD) ? prog_add(pc) : prog_dbl(pc);
  assign uop_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      pc   <= '0;
      op_q <= PAD_ADD;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          pc   <= '0;
          op_q <= op;
        end
      end else if (uop_done) begin
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          pc <= pc + 1'b1;
        end
      end
    end
  end
endmodule
