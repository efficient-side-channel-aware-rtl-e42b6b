// tb_ecc_processor: end-to-end test of the processor in all eight
// configurations at a reduced field size (N = 32, M = 2^32 - 5).
//
// For each configuration it picks random curves, points and scalars, shifts
// the operands in through the serial port, runs the point multiplication,
// shifts the result out and compares it with the reference scalar multiple
// computed by ecc_ref_pkg. It also checks the operation counts of the
// algorithms (add-always: n additions and n doublings; secure NAF: always
// 3n/2 + 4 unified operations), that the run time of a configuration does not
// depend on the scalar or the point, and that every mechanism happened at least
// once: each configuration, point subtraction, the point at infinity as a
// result, the exponentiation of the final inversion.
module tb_ecc_processor;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int N    = 32;
  localparam int IO_W = 8;
  localparam int NT   = 3;     // random scalars per configuration
  localparam big_t MOD = big_t'(32'hFFFF_FFFB);

  logic            clk = 0, rst_n = 0;
  logic            sin_valid = 0, start = 0;
  logic [IO_W-1:0] sin_data = '0;
  cfg_e            cfg = CFG_WA_AA;
  logic            sout_valid, busy, done, inf;
  logic [IO_W-1:0] sout_data;
  logic [15:0]     n_add, n_dbl, n_sub, n_expmul;

  ecc_processor #(.N(N), .IO_W(IO_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cfg_runs [8];
  longint cfg_cyc [8];
  int seen_inf = 0, seen_sub = 0, seen_exp = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20_000_000) @(posedge clk);
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

  // result words as they leave the serial port
  logic [IO_W-1:0] outq [$];
  bit done_seen = 0;
  always @(posedge clk) begin
    if (sout_valid) outq.push_back(sout_data);
    if (done) done_seen <= 1;
  end

  task automatic run(cfg_e c, pt_t p, big_t ca, big_t k, output pt_t q,
                     output bit qinf, output longint ncyc);
    longint t0;
    send(p.x); send(p.y); send(MOD); send(ca); send(pow2m(2 * N + 4, MOD)); send(k);
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
    qinf = inf;
    q.x = 0; q.y = 0; q.inf = inf;
    for (int i = 0; i < 2 * N / IO_W; i++) begin
      if (i < N / IO_W) q.x = (q.x << IO_W) | big_t'(outq[i]);
      else              q.y = (q.y << IO_W) | big_t'(outq[i]);
    end
  endtask

  initial begin
    pt_t p, q, ref_q;
    big_t ca, k;
    bit qinf, weier;
    cfg_e c;
    longint ncyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int ci = 0; ci < 8; ci++) begin
      c = cfg_e'(ci);
      weier = (c == CFG_WA_AA || c == CFG_WJ_AA);
      for (int t = 0; t < NT + (weier ? 1 : 0); t++) begin
        if (weier) w_curve(MOD, p, ca); else e_curve(MOD, p, ca);
        k = rnd(big_t'(64'h1_0000_0000));
        if (t == NT) k = 0;                     // result at infinity
        if (t == 1) k[N-1] = 1'b1;
        run(c, p, ca, k, q, qinf, ncyc);
        ref_q = weier ? w_mul(k, p, ca, MOD) : e_mul(k, p, ca, MOD);
        checks++;
        if (weier && ref_q.inf) begin
          if (!qinf) begin failures++; $display("FAIL cfg %0d k=%0h: expected infinity", ci, k); end
          else seen_inf++;
        end else if (qinf || q.x != ref_q.x || q.y != ref_q.y) begin
          failures++;
          $display("FAIL cfg %0d k=%0h: got (%0h,%0h,inf=%0d) expected (%0h,%0h)",
                   ci, k, q.x, q.y, qinf, ref_q.x, ref_q.y);
        end
        // operation counts of the scalar multiplication algorithm
        checks++;
        if (c == CFG_EA_NAF || c == CFG_EP_NAF) begin
          if (int'(n_add) + int'(n_dbl) + int'(n_sub) != 3 * N / 2 + 4 || n_dbl < 16'(N + 1)) begin
            failures++;
            $display("FAIL cfg %0d: NAF ops add=%0d dbl=%0d sub=%0d", ci, n_add, n_dbl, n_sub);
          end
        end else if (n_add != 16'(N) || n_dbl != 16'(N) || n_sub != 0) begin
          failures++;
          $display("FAIL cfg %0d: add-always ops add=%0d dbl=%0d", ci, n_add, n_dbl);
        end
        // constant run time: every run of a configuration takes as long as the first
        checks++;
        if (cfg_runs[ci] == 0) cfg_cyc[ci] = ncyc;
        else if (ncyc != cfg_cyc[ci]) begin
          failures++;
          $display("FAIL cfg %0d: %0d cycles, first run %0d", ci, ncyc, cfg_cyc[ci]);
        end
        if (n_sub != 0) seen_sub++;
        if (n_expmul != 0) seen_exp++;
        cfg_runs[ci]++;
        $display("cfg %0d k=%0h cycles=%0d add=%0d dbl=%0d sub=%0d expmul=%0d %s", ci, k, ncyc,
                 n_add, n_dbl, n_sub, n_expmul, qinf ? "inf" : "");
      end
    end
    // every mechanism must have happened
    for (int ci = 0; ci < 8; ci++) begin
      checks++;
      if (cfg_runs[ci] == 0) failures++;
    end
    checks += 3;
    if (seen_inf == 0) begin failures++; $display("FAIL: no result at infinity"); end
    if (seen_sub == 0) begin failures++; $display("FAIL: no point subtraction"); end
    if (seen_exp == 0) begin failures++; $display("FAIL: no final exponentiation"); end
    $display("mechanisms: inf=%0d sub=%0d exp=%0d", seen_inf, seen_sub, seen_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
