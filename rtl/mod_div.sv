// mod_div: constant-time modular divider based on the extended binary GCD.
//
// Computes Z = X / Y mod M for an odd modulus M and Y coprime to M, operands
// fully reduced in [0, M). The GCD of the divisor and the modulus is computed
// by halving and by quarter steps; the same operations are applied in
// parallel, modulo M, to the dividend, so when the GCD reaches 1 the dividend
// side holds the quotient. The algorithm is the document's (a binary GCD in
// which, when both numbers are odd, their sum or their difference is a
// multiple of 4). Starting from A = Y, B = M, U = X, V = 0, d = 0, each
// iteration does one step:
//   A even : A := A/2,               U := U/2 mod M,          d := d - 1
//   A odd  : if d < 0 swap (A,U) with (B,V) and d := -d;
//            A := (A + kB)/4,        U := (U + kV)/4 mod M,   d := d - 1
//            with k = +1 or -1, whichever makes A + kB a multiple of 4.
// d estimates the difference of the bit lengths of A and B, so no magnitude
// comparison is needed. A and B are signed; B ends at +1 or -1 and V at
// +X/Y or -X/Y, which the last cycle corrects. The invariants
// U = X*A/Y and V = X*B/Y (mod M) hold throughout; once A is zero, U is zero
// and further steps change nothing. At most 2n steps are needed; the unit
// always runs 2n + 3 iterations, so that, as in the document, the run time is
// constant and a division takes 2n + 4 cycles.
//
// Document versus this design: the document runs this recurrence on SD2
// operands with three redundant adders; here A, B, U, V are two's complement
// and binary, with carry-propagating adders. The document counts the
// remaining length in a register p; here a fixed iteration counter does that.
// The output is in plain (not Montgomery) form; the arithmetic unit follows
// the division with a multiplication to restore Montgomery form, as the
// document does.
//
// Timing: start sampled on a rising edge; x, y, m must stay stable while busy.
// done is high for one cycle 2n + 4 cycles after the start cycle.
module mod_div #(
  parameter int N = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] m,
  output logic [N-1:0] z,
  output logic         done,
  output logic         busy
);
  localparam int ITER = 2 * N + 3;
  localparam int CW = $clog2(ITER + 1);
  localparam int DW = CW + 2;           // signed length difference

  logic signed [N+1:0]   a, b;          // GCD side, signed
  logic [N-1:0]          u, v;          // dividend side, residues in [0, M)
  logic signed [DW-1:0]  d;
  logic [CW-1:0]         cnt;

  logic                  swp;
  logic signed [N+1:0]   aa, bb, a_n;
  logic signed [N+2:0]   sum;
  logic [N-1:0]          uu, vv, u_n, z_n;
  logic signed [DW-1:0]  dd;
  logic [N:0]            t;
  logic [N-1:0]          tr;

  // (t / 2) mod M for t in [0, M)
  function automatic logic [N-1:0] half_mod(logic [N-1:0] tv, logic [N-1:0] mv);
    logic [N:0] s;
    s = tv[0] ? {1'b0, tv} + {1'b0, mv} : {1'b0, tv};
    return s[N:1];
  endfunction

  // (t / 4) mod M for t in [0, M): add j*M, j = -t * M^-1 mod 4 (M^-1 = M mod 4)
  function automatic logic [N-1:0] quarter_mod(logic [N-1:0] tv, logic [N-1:0] mv);
    logic [1:0]   j;
    logic [N+1:0] s;
    j = 2'(-(tv[1:0] * mv[1:0]));
    s = {2'b00, tv} + (N + 2)'(j) * {2'b00, mv};
    return s[N+1:2];
  endfunction

  always_comb begin
    swp = a[0] && (d < 0);
    aa  = swp ? b : a;
    bb  = swp ? a : b;
    uu  = swp ? v : u;
    vv  = swp ? u : v;
    dd  = swp ? -d : d;
    sum = '0; t = '0; tr = '0;
    if (!a[0]) begin
      a_n = a >>> 1;
      u_n = half_mod(u, m);
    end else begin
      // k = +1 if A + B is a multiple of 4, else k = -1
      if (aa[1] ^ bb[1]) begin
        sum = (N + 3)'(aa) + (N + 3)'(bb);
        t   = {1'b0, uu} + {1'b0, vv};
        tr  = (t >= {1'b0, m}) ? N'(t - {1'b0, m}) : N'(t);
      end else begin
        sum = (N + 3)'(aa) - (N + 3)'(bb);
        t   = {1'b0, uu} - {1'b0, vv};
        tr  = t[N] ? N'(t + {1'b0, m}) : N'(t);
      end
      a_n = (N + 2)'(sum >>> 2);
      u_n = quarter_mod(tr, m);
    end
    // B ends at +1 or -1: V is then +X/Y or -X/Y
    z_n = (bb < 0 && vv != '0) ? m - vv : vv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0; b <= '0; u <= '0; v <= '0; d <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; z <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a <= (N + 2)'(y); b <= (N + 2)'(m); u <= x; v <= '0; d <= '0;
        cnt <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        a <= a_n;
        b <= bb;
        u <= u_n;
        v <= vv;
        d <= dd - 1'b1;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(ITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          z    <= z_n;
        end
      end
    end
  end
endmodule
