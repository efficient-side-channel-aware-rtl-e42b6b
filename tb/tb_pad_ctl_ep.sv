// tb_pad_ctl_ep: self-checking testbench of the Edwards projective point addition &
// doubling control unit.
//
// The control unit drives a real pad_datapath (n = 32, M = 2^32 - 5). For
// random points of a random curve the testbench loads P1 into R0 and P2 into
// R1 in Montgomery form and projective (x = X/Z, y = Y/Z) coordinates, with random
// Z where the coordinates are projective, runs PAD_ADD (also with P2 negated, P1 - P2) and PAD_DBL, reads
// R0 back and compares it, converted to affine, with a reference point
// computed by textbook affine formulas in the testbench. The run time of each
// operation must not depend on the data: every addition must take as many
// cycles as the first, and likewise every doubling.
module tb_pad_ctl_ep;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int N  = 32;
  localparam int NT = 60;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  pad_op_e      op = PAD_ADD;
  logic         uop_valid, uop_done, done, busy, dp_busy;
  uop_t         uop;
  logic [N-1:0] m;
  logic         p2_neg = 1'b0;
  logic         chk_zero;
  logic         ext_we = 1'b0;
  logic [3:0]   ext_addr = '0;
  logic [N-1:0] ext_wdata = '0;
  raddr_t       ext_raddr = '0;
  logic [N-1:0] ext_rdata;
  int           checks = 0, failures = 0;
  int           cyc_add = -1, cyc_dbl = -1;
  big_t         mm, rr, rinv;

  pad_ctl_ep dut (.clk, .rst_n, .start, .op, .uop_valid, .uop, .uop_done, .done, .busy);
  pad_datapath #(.N(N)) u_dp (
    .clk, .rst_n, .m, .uop_valid, .uop, .uop_done, .busy(dp_busy),
    .p1_sel(1'b0), .p2_sel(1'b1), .p2_neg, .fin_mode(FIN_WRITE), .chk_zero,
    .ext_we, .ext_addr, .ext_wdata, .ext_raddr, .ext_rdata
  );

  always #50 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic big_t to_m(big_t v);  return mulm(v, rr, mm);   endfunction
  function automatic big_t from_m(big_t v); return mulm(v, rinv, mm); endfunction

  task automatic wr(raddr_t a, big_t v);
    @(negedge clk);
    ext_we = 1'b1; ext_addr = a[3:0]; ext_wdata = v[N-1:0];
    @(negedge clk);
    ext_we = 1'b0;
  endtask

  task automatic rdv(raddr_t a, output big_t v);
    ext_raddr = a;
    #1;
    v = big_t'(ext_rdata);
  endtask

  // write a point into R0 (base 0) or R1 (base 3)
  task automatic put(int base, pt_t p);
    big_t z;
    z = 1'b1 ? rnd(mm - 1) + 1 : 1;
    if (1'b0) begin
      wr(raddr_t'(base),     to_m(mulm(p.x, mulm(z, z, mm), mm)));
      wr(raddr_t'(base + 1), to_m(mulm(p.y, mulm(z, mulm(z, z, mm), mm), mm)));
    end else begin
      wr(raddr_t'(base),     to_m(mulm(p.x, z, mm)));
      wr(raddr_t'(base + 1), to_m(mulm(p.y, z, mm)));
    end
    wr(raddr_t'(base + 2), to_m(z));
  endtask

  task automatic get(output pt_t r);
    big_t  x, y, z;
    rdv(R0X, x); rdv(R0Y, y); rdv(R0Z, z);
    x = from_m(x); y = from_m(y); z = from_m(z);
    r.inf = 0;
    if (1'b0) begin
      r.x = divm(x, mulm(z, z, mm), mm);
      r.y = divm(y, mulm(z, mulm(z, z, mm), mm), mm);
    end else if (1'b1) begin
      r.x = divm(x, z, mm);
      r.y = divm(y, z, mm);
    end else begin
      r.x = x; r.y = y;
    end
  endtask

  task automatic run(pad_op_e o, pt_t exp_p, string what);
    int   cyc;
    pt_t  got;
    @(negedge clk);
    start = 1'b1; op = o;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    get(got);
    checks++;
    if (got.x !== exp_p.x || got.y !== exp_p.y) begin
      failures++;
      $display("FAIL %s got (%h,%h) exp (%h,%h)", what, got.x, got.y, exp_p.x, exp_p.y);
    end
    checks++;
    if (o == PAD_ADD) begin
      if (cyc_add < 0) cyc_add = cyc;
      if (cyc != cyc_add) begin failures++; $display("FAIL add took %0d cycles, first %0d", cyc, cyc_add); end
    end else begin
      if (cyc_dbl < 0) cyc_dbl = cyc;
      if (cyc != cyc_dbl) begin failures++; $display("FAIL dbl took %0d cycles, first %0d", cyc, cyc_dbl); end
    end
  endtask

  initial begin : main
    pt_t  p1, p2, e;
    big_t c;
    mm   = (big_t'(1) << 32) - 5;
    rr   = pow2m(N + 2, mm);
    rinv = invm(rr, mm);
    m    = mm[N-1:0];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NT; t++) begin
      if (1'b1) begin
        e_curve(mm, p1, c);
        p2 = e_mul(rnd(mm) | 2, p1, c, mm);
      end else begin
        w_curve(mm, p1, c);
        p2 = w_mul(rnd(mm) | 2, p1, c, mm);
      end
      wr(RCA, to_m(c));
      wr(RONE, rr);
      wr(RR2, mulm(rr, rr, mm));
      // addition P1 + P2
      put(0, p1); put(3, p2);
      p2_neg = 1'b0;
      if (1'b1) e = e_add(p1, p2, c, mm); else e = w_add(p1, p2, c, mm);
      if (!e.inf) run(PAD_ADD, e, "add");
      // subtraction P1 - P2: the datapath negates x of P2
      put(0, p1); put(3, p2);
      p2_neg = 1'b1;
      p2.x = subm(0, p2.x, mm);
      e = e_add(p1, p2, c, mm);
      run(PAD_ADD, e, "sub");
      p2_neg = 1'b0;
      // doubling 2 P1
      put(0, p1);
      if (1'b1) e = e_add(p1, p1, c, mm); else e = w_add(p1, p1, c, mm);
      if (!e.inf) run(PAD_DBL, e, "dbl");
    end
    $display("cycles: addition %0d, doubling %0d", cyc_add, cyc_dbl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
