// tb_ecc_processor_full: the processor at its full size, n = 192 bits and
// 8-bit serial words (default parameters), over the prime field of
// M = 2^192 - 2^64 - 1.
//
// One point multiplication per configuration, all eight: a random curve and
// point, a random 192-bit scalar with the top bit set, operands shifted in
// through the serial port, the result shifted out and compared with a
// reference scalar multiple computed by textbook affine formulas in the
// testbench. The operation counts of the algorithm are checked as in the
// reduced-size test, and the cycle count of each configuration is printed.
// Two more runs (Weierstrass affine and Edwards projective with secure NAF)
// use the 160-bit prime 2^160 - 2^31 - 1 with a 160-bit scalar on the same
// 192-bit processor: operands shorter than n are zero-extended.
module tb_ecc_processor_full;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int N    = 192;
  localparam int IO_W = 8;

  logic            clk = 0, rst_n = 0;
  logic            sin_valid = 0, start = 0;
  logic [IO_W-1:0] sin_data = '0;
  cfg_e            cfg = CFG_WA_AA;
  logic            sout_valid, busy, done, inf;
  logic [IO_W-1:0] sout_data;
  logic [15:0]     n_add, n_dbl, n_sub, n_expmul;
  big_t            mod_p;

  ecc_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (50_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(big_t v);
    for (int i = N / IO_W - 1; i >= 0; i--) begin
      sin_valid <= 1; sin_data <= v[i*IO_W +: IO_W];
      @(posedge clk);
    end
    sin_valid <= 0;
  endtask

  logic [IO_W-1:0] outq [$];
  bit done_seen = 0;
  always @(posedge clk) begin
    if (sout_valid) outq.push_back(sout_data);
    if (done) done_seen <= 1;
  end

  task automatic run(cfg_e c, pt_t p, big_t ca, big_t k, output pt_t q, output longint ncyc);
    longint t0;
    send(p.x); send(p.y); send(mod_p); send(ca); send(pow2m(2 * N + 4, mod_p)); send(k);
    outq.delete();
    done_seen = 0;
    cfg <= c; start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = cycles;
    wait (done_seen);
    ncyc = cycles - t0;
    wait (outq.size() == 2 * N / IO_W);
    @(negedge clk);
    q.x = 0; q.y = 0; q.inf = inf;
    for (int i = 0; i < 2 * N / IO_W; i++) begin
      if (i < N / IO_W) q.x = (q.x << IO_W) | big_t'(outq[i]);
      else              q.y = (q.y << IO_W) | big_t'(outq[i]);
    end
  endtask

  initial begin
    pt_t p, q, ref_q;
    big_t ca, k;
    bit weier;
    cfg_e c;
    longint ncyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int ri = 0; ri < 10; ri++) begin
      int ci, kbits;
      ci    = (ri < 8) ? ri : (ri == 8 ? int'(CFG_WA_AA) : int'(CFG_EP_NAF));
      kbits = (ri < 8) ? N : 160;
      mod_p = (ri < 8) ? (big_t'(1) << 192) - (big_t'(1) << 64) - 1
                       : (big_t'(1) << 160) - (big_t'(1) << 31) - 1;
      c = cfg_e'(ci);
      weier = (c == CFG_WA_AA || c == CFG_WJ_AA);
      if (weier) w_curve(mod_p, p, ca); else e_curve(mod_p, p, ca);
      k = rnd(big_t'(1) << kbits);
      k[kbits-1] = 1'b1;
      run(c, p, ca, k, q, ncyc);
      ref_q = weier ? w_mul(k, p, ca, mod_p) : e_mul(k, p, ca, mod_p);
      checks++;
      if (q.inf != ref_q.inf || (!ref_q.inf && (q.x != ref_q.x || q.y != ref_q.y))) begin
        failures++;
        $display("FAIL %s: got (%h,%h,inf=%0d) expected (%h,%h)", c.name(), q.x, q.y, q.inf,
                 ref_q.x, ref_q.y);
      end
      checks++;
      if (c == CFG_EA_NAF || c == CFG_EP_NAF) begin
        if (int'(n_add) + int'(n_dbl) + int'(n_sub) != 3 * N / 2 + 4) begin
          failures++;
          $display("FAIL %s: NAF ops add=%0d dbl=%0d sub=%0d", c.name(), n_add, n_dbl, n_sub);
        end
      end else if (n_add != 16'(N) || n_dbl != 16'(N) || n_sub != 0) begin
        failures++;
        $display("FAIL %s: add-always ops add=%0d dbl=%0d", c.name(), n_add, n_dbl);
      end
      $display("%s, %0d-bit prime: %0d cycles, add=%0d dbl=%0d sub=%0d expmul=%0d", c.name(), kbits, ncyc,
               n_add, n_dbl, n_sub, n_expmul);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
