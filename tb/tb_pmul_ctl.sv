// tb_pmul_ctl: self-checking testbench of the point multiplication and IO
// control unit.
//
// The controller is surrounded by the blocks it drives: the four point
// addition & doubling control units, the micro-op multiplexer and the shared
// datapath (n = 32, M = 2^32 - 5). Its operand inputs are driven directly, so
// the serial port is not involved. For every configuration and random
// curves, points and scalars (plus k = 0 and k with the top bit set) the
// testbench captures the two result words at out_ld_x / out_ld_y and compares
// them with a reference scalar multiple, checks the inf flag, the operation
// counters (add-always: n additions and n doublings; secure NAF: 3n/2 + 4
// operations), and that the run time of a configuration never depends on the
// scalar or the point.
module tb_pmul_ctl;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int N  = 32;
  localparam int NT = 3;
  localparam big_t MOD = big_t'(32'hFFFF_FFFB);

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cfg_e         cfg = CFG_WA_AA;
  logic [N-1:0] k = '0, m, px = '0, py = '0, ca = '0, r2 = '0;
  logic         own, pm_valid, uop_done, p1_sel, p2_sel, p2_neg, chk_zero;
  uop_t         pm_uop;
  fin_e         fin_mode;
  unit_e        unit;
  logic         pad_start, pad_done;
  pad_op_e      pad_op;
  logic         ext_we;
  logic [3:0]   ext_addr;
  logic [N-1:0] ext_wdata, ext_rdata;
  raddr_t       ext_raddr;
  logic         out_ld_x, out_ld_y, busy, done, inf;
  logic [15:0]  n_add, n_dbl, n_sub, n_expmul;
  logic [3:0]   u_start, u_valid, u_done, u_busy;
  uop_t         u_uop [4];
  logic         dp_valid, dp_busy;
  uop_t         dp_uop;

  pmul_ctl #(.N(N)) dut (
    .clk, .rst_n, .start, .cfg, .k, .m, .px, .py, .ca, .r2,
    .own, .uop_valid(pm_valid), .uop(pm_uop), .uop_done,
    .p1_sel, .p2_sel, .p2_neg, .fin_mode, .chk_zero,
    .unit, .pad_start, .pad_op, .pad_done,
    .ext_we, .ext_addr, .ext_wdata, .ext_raddr, .ext_rdata,
    .out_ld_x, .out_ld_y,
    .busy, .done, .inf, .n_add, .n_dbl, .n_sub, .n_expmul
  );

  always_comb for (int i = 0; i < 4; i++) u_start[i] = pad_start && (unit == unit_e'(i));

  pad_ctl_wa u_wa (.clk, .rst_n, .start(u_start[0]), .op(pad_op), .uop_valid(u_valid[0]),
                   .uop(u_uop[0]), .uop_done(uop_done && !own), .done(u_done[0]), .busy(u_busy[0]));
  pad_ctl_wj u_wj (.clk, .rst_n, .start(u_start[1]), .op(pad_op), .uop_valid(u_valid[1]),
                   .uop(u_uop[1]), .uop_done(uop_done && !own), .done(u_done[1]), .busy(u_busy[1]));
  pad_ctl_ea u_ea (.clk, .rst_n, .start(u_start[2]), .op(pad_op), .uop_valid(u_valid[2]),
                   .uop(u_uop[2]), .uop_done(uop_done && !own), .done(u_done[2]), .busy(u_busy[2]));
  pad_ctl_ep u_ep (.clk, .rst_n, .start(u_start[3]), .op(pad_op), .uop_valid(u_valid[3]),
                   .uop(u_uop[3]), .uop_done(uop_done && !own), .done(u_done[3]), .busy(u_busy[3]));

  assign pad_done = u_done[unit];
  assign dp_valid = own ? pm_valid : u_valid[unit];
  assign dp_uop   = own ? pm_uop : u_uop[unit];

  pad_datapath #(.N(N)) u_dp (
    .clk, .rst_n, .m, .uop_valid(dp_valid), .uop(dp_uop), .uop_done, .busy(dp_busy),
    .p1_sel, .p2_sel, .p2_neg, .fin_mode, .chk_zero,
    .ext_we, .ext_addr, .ext_wdata, .ext_raddr, .ext_rdata
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int first_cyc [8];
  logic [N-1:0] rx, ry;
  always @(posedge clk) begin
    if (out_ld_x) rx <= ext_rdata;
    if (out_ld_y) ry <= ext_rdata;
  end

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin : main
    pt_t  p, e;
    big_t c, kk;
    cfg_e cc;
    bit   weier, naf;
    int   cyc;
    m = MOD[N-1:0];
    for (int i = 0; i < 8; i++) first_cyc[i] = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int ci = 0; ci < 8; ci++) begin
      cc    = cfg_e'(ci);
      weier = (cc == CFG_WA_AA || cc == CFG_WJ_AA);
      naf   = (cc == CFG_EA_NAF || cc == CFG_EP_NAF);
      for (int t = 0; t <= NT; t++) begin
        if (weier) w_curve(MOD, p, c); else e_curve(MOD, p, c);
        kk = rnd(big_t'(64'h1_0000_0000));
        if (t == 1) kk[N-1] = 1'b1;
        if (t == NT) kk = weier ? 0 : 1;
        e = weier ? w_mul(kk, p, c, MOD) : e_mul(kk, p, c, MOD);
        @(negedge clk);
        px = p.x[N-1:0]; py = p.y[N-1:0]; ca = c[N-1:0]; k = kk[N-1:0];
        r2 = pow2m(2 * N + 4, MOD)[N-1:0];
        cfg = cc; start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        checks++;
        if (weier && e.inf) begin
          if (!inf) fail($sformatf("cfg %s k=%0h: expected infinity", cc.name(), kk));
        end else if (inf || big_t'(rx) != e.x || big_t'(ry) != e.y)
          fail($sformatf("cfg %s k=%0h: got (%h,%h) exp (%h,%h)", cc.name(), kk, rx, ry, e.x, e.y));
        checks++;
        if (naf) begin
          if (int'(n_add) + int'(n_dbl) + int'(n_sub) != 3 * N / 2 + 4)
            fail($sformatf("cfg %s: NAF ops add=%0d dbl=%0d sub=%0d", cc.name(), n_add, n_dbl, n_sub));
        end else if (n_add != 16'(N) || n_dbl != 16'(N) || n_sub != 0)
          fail($sformatf("cfg %s: ops add=%0d dbl=%0d", cc.name(), n_add, n_dbl));
        checks++;
        if (first_cyc[ci] < 0) first_cyc[ci] = cyc;
        else if (cyc != first_cyc[ci])
          fail($sformatf("cfg %s: %0d cycles, first run %0d", cc.name(), cyc, first_cyc[ci]));
      end
      $display("cfg %s: %0d cycles", cc.name(), first_cyc[ci]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
