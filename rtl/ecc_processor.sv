// ecc_processor: elliptic curve scalar point multiplier over GF(p) that runs
// eight side-channel aware configurations on one datapath.
//
// Configurations (cfg, see ecc_pkg::cfg_e): Weierstrass affine and Weierstrass
// Jacobian with the add-always algorithm; Edwards affine and Edwards projective
// with add-always using unified or optimized doublings, or with the secure NAF
// algorithm on unified operations.
//
// Structure: the input/output shift registers hold the operands; the point
// multiplication and IO control unit (pmul_ctl) runs the scalar loop and the
// transforms; four point addition & doubling control units (pad_ctl_wa/wj/ea/
// ep) hold the micro-programs of the point operations; a multiplexer passes the
// micro-ops of the active unit (or of pmul_ctl) to the one shared datapath
// (pad_datapath: register file, operand multiplexer, modular arithmetic unit).
// This follows the processor block diagram of the document. All arithmetic is
// modulo the odd prime M < 2^N with Montgomery factor R = 2^(N+2); the caller
// supplies Rsquare = R^2 mod M.
//
// Use: shift in Px, Py, M, a or d, Rsquare, k (6N/IO_W words, see
// io_shift_regs), pulse start with cfg; done pulses when the affine result
// starts to shift out on sout_data (2N/IO_W words: x then y); inf marks the
// point at infinity (Weierstrass). Weierstrass curves are y^2 = x^3 + ax + b
// (b is not needed); Edwards curves are x^2 + y^2 = 1 + d x^2 y^2.
// The counters n_add, n_dbl, n_sub and n_expmul report how many point
// additions, doublings and subtractions and exponentiation multiplications the
// last run issued.
//
// Lint note: the assertions at the end are disabled during reset with
// "disable iff (!rst_n)", so a linter reports rst_n as used both
// asynchronously (the flip-flop resets) and synchronously (the assertion). The
// assertion is not part of the synthesized logic, so the warning stands.
module ecc_processor
  import ecc_pkg::*;
#(
  parameter int N    = 192,
  parameter int IO_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sin_valid,
  input  logic [IO_W-1:0] sin_data,
  input  logic            start,
  input  cfg_e            cfg,
  output logic            sout_valid,
  output logic [IO_W-1:0] sout_data,
  output logic            busy,
  output logic            done,
  output logic            inf,
  output logic [15:0]     n_add,
  output logic [15:0]     n_dbl,
  output logic [15:0]     n_sub,
  output logic [15:0]     n_expmul
);
  logic [N-1:0] px, py, m, ca, r2, k;

  // pmul_ctl <-> datapath / units
  logic         own, pm_uop_valid, uop_done, p1_sel, p2_sel, p2_neg, chk_zero;
  uop_t         pm_uop;
  fin_e         fin_mode;
  unit_e        unit;
  logic         pad_start, pad_done;
  pad_op_e      pad_op;
  logic         ext_we, out_ld_x, out_ld_y;
  logic [3:0]   ext_addr;
  logic [N-1:0] ext_wdata, ext_rdata;
  raddr_t       ext_raddr;

  // point addition & doubling control units
  logic [3:0]   u_start, u_valid, u_done, u_busy;
  uop_t         u_uop [4];

  // selected micro-op stream
  logic         dp_valid;
  uop_t         dp_uop;

  io_shift_regs #(.N(N), .IO_W(IO_W)) u_io (
    .clk, .rst_n, .sin_valid, .sin_data,
    .px, .py, .m, .ca, .r2, .k,
    .ld_x(out_ld_x), .ld_y(out_ld_y), .res(ext_rdata),
    .sout_valid, .sout_data
  );

  pmul_ctl #(.N(N)) u_pmul (
    .clk, .rst_n, .start, .cfg, .k, .m, .px, .py, .ca, .r2,
    .own, .uop_valid(pm_uop_valid), .uop(pm_uop), .uop_done,
    .p1_sel, .p2_sel, .p2_neg, .fin_mode, .chk_zero,
    .unit, .pad_start, .pad_op, .pad_done,
    .ext_we, .ext_addr, .ext_wdata, .ext_raddr, .ext_rdata,
    .out_ld_x, .out_ld_y,
    .busy, .done, .inf, .n_add, .n_dbl, .n_sub, .n_expmul
  );

  always_comb begin
    for (int i = 0; i < 4; i++) u_start[i] = pad_start && (unit == unit_e'(i));
  end

  pad_ctl_wa u_wa (.clk, .rst_n, .start(u_start[0]), .op(pad_op), .uop_valid(u_valid[0]),
                   .uop(u_uop[0]), .uop_done(uop_done && !own), .done(u_done[0]), .busy(u_busy[0]));
  pad_ctl_wj u_wj (.clk, .rst_n, .start(u_start[1]), .op(pad_op), .uop_valid(u_valid[1]),
                   .uop(u_uop[1]), .uop_done(uop_done && !own), .done(u_done[1]), .busy(u_busy[1]));
  pad_ctl_ea u_ea (.clk, .rst_n, .start(u_start[2]), .op(pad_op), .uop_valid(u_valid[2]),
                   .uop(u_uop[2]), .uop_done(uop_done && !own), .done(u_done[2]), .busy(u_busy[2]));
  pad_ctl_ep u_ep (.clk, .rst_n, .start(u_start[3]), .op(pad_op), .uop_valid(u_valid[3]),
                   .uop(u_uop[3]), .uop_done(uop_done && !own), .done(u_done[3]), .busy(u_busy[3]));

  // micro-op multiplexer: the controller's own micro-ops or the active unit's
  assign pad_done = u_done[unit];
  assign dp_valid = own ? pm_uop_valid : u_valid[unit];
  assign dp_uop   = own ? pm_uop : u_uop[unit];

  logic dp_busy;
  pad_datapath #(.N(N)) u_dp (
    .clk, .rst_n, .m,
    .uop_valid(dp_valid), .uop(dp_uop), .uop_done, .busy(dp_busy),
    .p1_sel, .p2_sel, .p2_neg, .fin_mode, .chk_zero,
    .ext_we, .ext_addr, .ext_wdata, .ext_raddr, .ext_rdata
  );

  // only the selected point unit may be active, and a point operation starts
  // only on an idle datapath
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(u_busy));
  assert property (@(posedge clk) disable iff (!rst_n) pad_start |-> !dp_busy);
endmodule
