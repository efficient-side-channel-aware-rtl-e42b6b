// pad_ctl_ep: Edwards projective point addition & doubling control unit.
//
// A micro-programmed finite state machine: each state issues one modular
// operation to the shared datapath (pad_datapath) and waits for it to finish,
// so every state is one register-to-register transfer through the mau.
// The two programs below are fixed sequences; no branch depends on the data,
// so the run time of each operation is constant. Operands are Montgomery
// residues; P1 and P2 are the virtual operand points, RCA the curve constant,
// RONE the Montgomery one. Results are built in temporaries and copied into
// P1 at the end, so P1 and P2 may be the same point register.
// Unified addition (P1 := P1 + P2, also used for doubling with P2 = P1),
// Eq. 2.9 in the order of Table 4.9 (12 MUL, as in the document):
//   A = Z1 Z2, E = X1 X2 Y1 Y2
//   X3 = A (X1 Y2 + Y1 X2)(A^2 - d E), Y3 = A (Y1 Y2 - X1 X2)(A^2 + d E)
//   Z3 = (A^2 - d E)(A^2 + d E)
// Optimized doubling (P1 := 2 P1), Eq. 2.10 in the order of Table 4.10 (7 MUL):
//   X3 = 2 X Y (X^2 + Y^2 - 2 Z^2), Y3 = (X^2 - Y^2)(X^2 + Y^2)
//   Z3 = (X^2 + Y^2)(X^2 + Y^2 - 2 Z^2)
// The formulas are homogeneous, so the extra 2^-(n+2) factor of every
// Montgomery product scales X, Y and Z alike and leaves X/Z and Y/Z intact.
// The schedule follows the document's operation order where it gives one;
// the final copies into P1 (marked fin) are this design's addition.
//   addition: 22 micro-ops (12 MUL, 0 DIV, 7 ADD/SUB, 3 result copies)
//   doubling: 15 micro-ops (7 MUL, 0 DIV, 5 ADD/SUB, 3 result copies)
//
// Interface: start (one cycle, with op) begins a program; uop/uop_valid are
// held until the datapath pulses uop_done; done pulses for one cycle after the
// last micro-op has completed. start is ignored while busy.
module pad_ctl_ep
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
  localparam int NADD = 22;
  localparam int NDBL = 15;

  pad_op_e    op_q;
  logic [4:0] pc;

  function automatic uop_t prog_add(logic [4:0] i);
    uop_t u;
    u = mk(MAU_ADD, T6, KZERO, KZERO);
    case (i)
       0: u = mk(MAU_MUL, T0, P1Z, P2Z);
       1: u = mk(MAU_MUL, T1, P1Y, P2Y);
       2: u = mk(MAU_MUL, T2, P1X, P2X);
       3: u = mk(MAU_ADD, T3, P1X, P1Y);
       4: u = mk(MAU_ADD, T4, P2X, P2Y);
       5: u = mk(MAU_MUL, T3, T3, T4);
       6: u = mk(MAU_SUB, T3, T3, T2);
       7: u = mk(MAU_SUB, T3, T3, T1);
       8: u = mk(MAU_MUL, T3, T0, T3);
       9: u = mk(MAU_SUB, T4, T1, T2);
      10: u = mk(MAU_MUL, T4, T0, T4);
      11: u = mk(MAU_MUL, T1, T2, T1);
      12: u = mk(MAU_MUL, T1, RCA, T1);
      13: u = mk(MAU_MUL, T0, T0, T0);
      14: u = mk(MAU_ADD, T2, T0, T1);
      15: u = mk(MAU_SUB, T0, T0, T1);
      16: u = mk(MAU_MUL, T1, T4, T2);
      17: u = mk(MAU_MUL, T2, T0, T2);
      18: u = mk(MAU_MUL, T0, T3, T0);
      19: u = mkfin(P1X, T0);
      20: u = mkfin(P1Y, T1);
      21: u = mkfin(P1Z, T2);
      default: ;
    endcase
    return u;
  endfunction

  function automatic uop_t prog_dbl(logic [4:0] i);
    uop_t u;
    u = mk(MAU_ADD, T6, KZERO, KZERO);
    case (i)
       0: u = mk(MAU_MUL, T0, P1Z, P1Z);
       1: u = mk(MAU_ADD, T0, T0, T0);
       2: u = mk(MAU_MUL, T1, P1Y, P1Y);
       3: u = mk(MAU_MUL, T2, P1X, P1X);
       4: u = mk(MAU_MUL, T3, P1X, P1Y);
       5: u = mk(MAU_ADD, T3, T3, T3);
       6: u = mk(MAU_SUB, T4, T2, T1);
       7: u = mk(MAU_ADD, T2, T2, T1);
       8: u = mk(MAU_SUB, T0, T2, T0);
       9: u = mk(MAU_MUL, T1, T2, T0);
      10: u = mk(MAU_MUL, T2, T4, T2);
      11: u = mk(MAU_MUL, T0, T3, T0);
      12: u = mkfin(P1X, T0);
      13: u = mkfin(P1Y, T2);
      14: u = mkfin(P1Z, T1);
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
