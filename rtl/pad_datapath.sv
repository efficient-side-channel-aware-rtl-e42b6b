// pad_datapath: the shared point addition & doubling datapath.
//
// A register file, an operand multiplexer and one modular arithmetic unit
// (mau), as in the point addition & doubling datapath of the document. A
// control unit presents one micro-op {op, dst, a, b, fin} with uop_valid and
// holds it until uop_done. On acceptance the multiplexer selects the two
// operands, the mau runs, and when it finishes its result is written to dst
// and uop_done pulses for one cycle. The next micro-op can be accepted in the
// following cycle, so each micro-op costs the mau latency plus one cycle.
//
// Operand addresses (ecc_pkg): physical registers R0X..T6, the constants 0
// and 1, and the virtual points P1 and P2, which p1_sel / p2_sel map onto the
// point registers R0 or R1 (0 = R0, 1 = R1). With p2_neg the X coordinate of
// P2 is read negated (M - x), which turns an Edwards point addition into a
// subtraction: the document does this by swapping the SD2 wires of the
// operand. A micro-op marked fin (the final copy of a result into P1) obeys
// fin_mode: write the result, keep P1 (P2 was the point at infinity), or copy
// P2's coordinate (P1 was the point at infinity). This lets the Weierstrass
// units handle the point at infinity without changing their run time.
// chk_zero reports whether T5 is zero: the programs of the Weierstrass
// additions leave x2 - x1 (affine) or H = X2 Z1^2 - X1 Z2^2 (Jacobian) there,
// and a zero means P1 = -P2, a sum at infinity. The document checks this with
// an n/4-bit comparator; this design compares the whole register with zero.
// An external port writes and reads the registers while no micro-op runs.
//
// Lint note: the assertion at the end is disabled during reset with
// "disable iff (!rst_n)", so a linter reports rst_n as used both
// asynchronously (the flip-flop resets) and synchronously (the assertion). The
// assertion is not part of the synthesized logic, so the warning stands.
module pad_datapath
  import ecc_pkg::*;
#(
  parameter int N = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] m,
  // micro-op interface
  input  logic         uop_valid,
  input  uop_t         uop,
  output logic         uop_done,
  output logic         busy,
  // point mapping and final-copy control
  input  logic         p1_sel,
  input  logic         p2_sel,
  input  logic         p2_neg,
  input  fin_e         fin_mode,
  output logic         chk_zero,
  // external register access
  input  logic         ext_we,
  input  logic [3:0]   ext_addr,
  input  logic [N-1:0] ext_wdata,
  input  raddr_t       ext_raddr,
  output logic [N-1:0] ext_rdata
);
  logic [N-1:0] regs [NREGS];

  logic         run;          // a micro-op is in the mau
  mau_op_e      cur_op;       // operation, destination and final-copy flag
  raddr_t       cur_dst;      // of the micro-op in the mau
  logic         cur_fin;
  logic [N-1:0] opa_q, opb_q, opa_c, opb_c;
  logic         accept;
  logic         mau_done, mau_busy;
  logic [N-1:0] mau_z;

  // virtual to physical register address
  function automatic logic [3:0] phys(raddr_t ra, logic s1, logic s2);
    case (ra)
      P1X: return s1 ? 4'(R1X) : 4'(R0X);
      P1Y: return s1 ? 4'(R1Y) : 4'(R0Y);
      P1Z: return s1 ? 4'(R1Z) : 4'(R0Z);
      P2X: return s2 ? 4'(R1X) : 4'(R0X);
      P2Y: return s2 ? 4'(R1Y) : 4'(R0Y);
      P2Z: return s2 ? 4'(R1Z) : 4'(R0Z);
      default: return ra[3:0];
    endcase
  endfunction

  function automatic logic [N-1:0] rd(raddr_t ra, logic s1, logic s2, logic neg,
                                      logic [N-1:0] mv,
                                      logic [N-1:0] rf [NREGS]);
    logic [N-1:0] v;
    if (ra == KZERO)     v = '0;
    else if (ra == KONE) v = N'(1);
    else                 v = rf[phys(ra, s1, s2)];
    if (ra == P2X && neg && v != '0) v = mv - v;
    return v;
  endfunction

  assign accept = uop_valid && !run;
  assign opa_c  = rd(uop.a, p1_sel, p2_sel, p2_neg, m, regs);
  assign opb_c  = rd(uop.b, p1_sel, p2_sel, p2_neg, m, regs);

  mau #(.N(N)) u_mau (
    .clk, .rst_n,
    .start(accept), .op(accept ? uop.op : cur_op),
    .x(accept ? opa_c : opa_q), .y(accept ? opb_c : opb_q),
    .m, .r2(regs[RR2[3:0]]),
    .z(mau_z), .done(mau_done), .busy(mau_busy)
  );

  // value written at the end of the micro-op
  logic [3:0]   wa;
  logic [N-1:0] wd;
  logic         we;
  always_comb begin
    wa = phys(cur_dst, p1_sel, p2_sel);
    wd = mau_z;
    we = mau_done;
    if (cur_fin) begin
      if (fin_mode == FIN_KEEP) we = 1'b0;
      else if (fin_mode == FIN_COPY)
        wd = regs[phys(raddr_t'(cur_dst + (P2X - P1X)), p1_sel, p2_sel)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      cur_op  <= MAU_ADD;
      cur_dst <= '0;
      cur_fin <= 1'b0;
      opa_q <= '0;
      opb_q <= '0;
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (accept) begin
        run   <= 1'b1;
        cur_op  <= uop.op;
        cur_dst <= uop.dst;
        cur_fin <= uop.fin;
        opa_q <= opa_c;
        opb_q <= opb_c;
      end else if (mau_done) begin
        run <= 1'b0;
      end
      if (we) regs[wa] <= wd;
      else if (ext_we && !run) regs[ext_addr] <= ext_wdata;
    end
  end

  assign uop_done  = mau_done;
  assign busy      = run;
  assign chk_zero  = (regs[T5[3:0]] == '0);
  assign ext_rdata = rd(ext_raddr, p1_sel, p2_sel, 1'b0, m, regs);

  // the mau is never started twice
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !mau_busy);
endmodule
