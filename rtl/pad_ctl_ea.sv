// pad_ctl_ea: Edwards affine point addition & doubling control unit.
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
// Eq. 2.5 in the order of Table 4.7:
//   x3 = (x1 y2 + y1 x2) / (1 + d x1 x2 y1 y2), y3 = (y1 y2 - x1 x2) / (1 - d x1 x2 y1 y2)
//   with x1 y2 + y1 x2 = (x1 + y1)(x2 + y2) - x1 x2 - y1 y2
// Optimized doubling (P1 := 2 P1), Eq. 2.6 in the order of Table 4.8:
//   x3 = 2 x1 y1 / (x1^2 + y1^2), y3 = (x1^2 - y1^2) / (x1^2 + y1^2 - 2)
// The schedule follows the document's operation order where it gives one;
// the final copies into P1 (marked fin) are this design's addition.
//   addition: 16 micro-ops (5 MUL, 2 DIV, 7 ADD/SUB, 2 result copies)
//   doubling: 12 micro-ops (3 MUL, 2 DIV, 5 ADD/SUB, 2 result copies)
//
// Interface: start (one cycle, with op) begins a program; uop/uop_valid are
// held until the datapath pulses uop_done; done pulses for one cycle after the
// last micro-op has completed. start is ignored while busy.
module pad_ctl_ea
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
  localparam int NADD = 16;
  localparam int NDBL = 12;

  pad_op_e    op_q;
  logic [4:0] pc;

  function automatic uop_t prog_add(logic [4:0] i);
    uop_t u;
    u = mk(MAU_ADD, T6, KZERO, KZERO);
    case (i)
       0: u = mk(MAU_MUL, T0, P1Y, P2Y);
       1: u = mk(MAU_MUL, T1, P1X, P2X);
       2: u = mk(MAU_ADD, T2, P1X, P1Y);
       3: u = mk(MAU_ADD, T3, P2X, P2Y);
       4: u = mk(MAU_MUL, T2, T2, T3);
       5: u = mk(MAU_SUB, T2, T2, T1);
       6: u = mk(MAU_SUB, T2, T2, T0);
       7: u = mk(MAU_MUL, T3, T1, T0);
       8: u = mk(MAU_MUL, T3, RCA, T3);
       9: u = mk(MAU_SUB, T0, T0, T1);
      10: u = mk(MAU_SUB, T1, RONE, T3);
      11: u = mk(MAU_ADD, T3, RONE, T3);
      12: u = mk(MAU_DIV, T0, T0, T1);
      13: u = mk(MAU_DIV, T2, T2, T3);
      14: u = mkfin(P1X, T2);
      15: u = mkfin(P1Y, T0);
      default: ;
    endcase
    return u;
  endfunction

  function automatic uop_t prog_dbl(logic [4:0] i);
    uop_t u;
    u = mk(MAU_ADD, T6, KZERO, KZERO);
    case (i)
       0: u = mk(MAU_MUL, T0, P1Y, P1Y);
       1: u = mk(MAU_MUL, T1, P1X, P1X);
       2: u = mk(MAU_MUL, T2, P1X, P1Y);
       3: u = mk(MAU_ADD, T2, T2, T2);
       4: u = mk(MAU_SUB, T3, T1, T0);
       5: u = mk(MAU_ADD, T1, T1, T0);
       6: u = mk(MAU_SUB, T0, T1, RONE);
       7: u = mk(MAU_SUB, T0, T0, RONE);
       8: u = mk(MAU_DIV, T3, T3, T0);
       9: u = mk(MAU_DIV, T2, T2, T1);
      10: u = mkfin(P1X, T2);
      11: u = mkfin(P1Y, T3);
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
