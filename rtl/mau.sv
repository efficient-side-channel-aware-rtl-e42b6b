// mau: modular arithmetic unit with multiplication, addition, subtraction,
// halving and division, the single arithmetic unit of the processor.
//
// One op is started at a time with start/op; the operands x, y, the modulus m
// and the Montgomery constant r2 = 2^(2n+4) mod M must stay stable until done.
// All values are n-bit binary numbers in [0, M).
//   MAU_ADD/SUB/HALF  mod_addsub, 1 cycle
//   MAU_MUL           mont_mul, X*Y*2^-(n+2) mod M, n/2 + 2 cycles
//   MAU_DIV           mod_div gives X/Y; mont_mul then multiplies by r2 so the
//                     quotient of two Montgomery residues is again a Montgomery
//                     residue: 2n + 4 + n/2 + 2 = 5n/2 + 6 cycles
// These cycle counts are the document's (Table 4.1, mau row). The document
// merges the three units into three shared SD2 adder stages; here the three
// sub-units are separate instances sharing the operand inputs, which keeps the
// interface and timing but not the adder sharing.
// done pulses for one cycle with z valid; z holds until the next done.
//
// Lint note: the assertion at the end is disabled during reset with
// "disable iff (!rst_n)", so a linter reports rst_n as used both
// asynchronously (the flip-flop resets) and synchronously (the assertion). The
// assertion is not part of the synthesized logic, so the warning stands.
module mau
  import ecc_pkg::*;
#(
  parameter int N = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  mau_op_e      op,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] m,
  input  logic [N-1:0] r2,
  output logic [N-1:0] z,
  output logic         done,
  output logic         busy
);
  logic         as_start, as_done;
  logic [N-1:0] as_z;
  logic         mm_start, mm_done, mm_busy;
  logic [N-1:0] mm_z, mm_x, mm_y;
  logic         dv_start, dv_done, dv_busy;
  logic [N-1:0] dv_z;
  logic         div_phase2;   // division finished, Montgomery restore running
  logic         as_busy;

  assign as_start = start && (op == MAU_ADD || op == MAU_SUB || op == MAU_HALF);
  assign dv_start = start && (op == MAU_DIV);
  assign mm_start = (start && op == MAU_MUL) || dv_done;
  assign mm_x     = (div_phase2 || dv_done) ? dv_z : x;
  assign mm_y     = (div_phase2 || dv_done) ? r2   : y;

  mod_addsub #(.N(N)) u_as (
    .clk, .rst_n, .start(as_start), .op, .x, .y, .m, .z(as_z), .done(as_done)
  );
  mont_mul #(.N(N)) u_mm (
    .clk, .rst_n, .start(mm_start), .x(mm_x), .y(mm_y), .m, .z(mm_z),
    .done(mm_done), .busy(mm_busy)
  );
  mod_div #(.N(N)) u_dv (
    .clk, .rst_n, .start(dv_start), .x, .y, .m, .z(dv_z),
    .done(dv_done), .busy(dv_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_phase2 <= 1'b0;
      as_busy    <= 1'b0;
    end else begin
      as_busy <= as_start;
      if (dv_done)      div_phase2 <= 1'b1;
      else if (mm_done) div_phase2 <= 1'b0;
    end
  end

  assign done = as_done || mm_done;
  assign z    = as_done ? as_z : mm_z;
  assign busy = as_busy || mm_busy || dv_busy || dv_done || div_phase2;

  // one operation at a time
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
