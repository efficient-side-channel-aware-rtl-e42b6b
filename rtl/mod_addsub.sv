// mod_addsub: single-cycle modular adder / subtractor / halver.
//
// Computes Z = X + Y, X - Y or X / 2 modulo an odd modulus M. Operands and the
// result are fully reduced n-bit binary numbers in [0, M).
// The sum or difference is formed by the carry-free SD2 adder (rba): X and Y
// enter as signed-digit operands with an empty negative part, and subtraction
// only swaps the two wires of Y's digits, so addition and subtraction use the
// same hardware and take the same time. A modular correction then adds or
// subtracts the modulus once, chosen from the sign and size of the intermediate
// result, which is in (-M, 2M). Halving adds M to an odd operand before the
// shift.
//
// The document corrects an intermediate result in (-4M, 4M) by 0, +-2M or +-3M
// looked up from its three most significant digits, because its operands stay
// in (-2M, 2M). This design keeps every operand fully reduced instead, so one
// correction by +-M suffices; the halving operation is this design's, used for
// the Y3 = 2Y3 / 2 step of Jacobian addition.
//
// Timing: start is sampled on a rising clock edge; z is valid and done is high
// for one cycle on the next cycle (latency 1).
module mod_addsub
  import ecc_pkg::*;
#(
  parameter int N = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  mau_op_e      op,      // MAU_ADD, MAU_SUB or MAU_HALF
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] m,
  output logic [N-1:0] z,
  output logic         done
);
  logic [N:0]   t_h, t_l;
  logic [N-1:0] y_h, y_l;
  logic signed [N+2:0] t, tc, th;

  // subtraction = swapped wiring of the second operand's SD2 digits
  always_comb begin
    if (op == MAU_SUB) begin
      y_h = '0; y_l = y;
    end else begin
      y_h = y;  y_l = '0;
    end
  end

  rba #(.W(N)) u_rba (.x_h(x), .x_l('0), .y_h(y_h), .y_l(y_l), .z_h(t_h), .z_l(t_l));

  always_comb begin
    // SD2 to two's complement: value = h - l
    t = $signed({2'b00, t_h}) - $signed({2'b00, t_l});
    if (t < 0)
      tc = t + $signed({3'b000, m});
    else if (t >= $signed({3'b000, m}))
      tc = t - $signed({3'b000, m});
    else
      tc = t;
    th = x[0] ? ($signed({3'b000, x}) + $signed({3'b000, m})) >>> 1
              : $signed({3'b000, x}) >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z    <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) z <= (op == MAU_HALF) ? th[N-1:0] : tc[N-1:0];
    end
  end
endmodule
