// tb_pad_datapath: self-checking testbench of the shared point datapath.
//
// At the default operand length (192 bits) and the prime 2^192 - 2^64 - 1 the
// testbench fills the register file through the external port, then issues
// random micro-ops: every mau operation, every source address (registers,
// constants, virtual points P1/P2 under random p1_sel/p2_sel/p2_neg) and
// random destinations, including final copies into P1 under all three
// fin_mode values. A register-file model in the testbench predicts every
// write; after each micro-op the whole register file is read back through the
// external port and compared, chk_zero is compared with the model's T5, and
// the time from acceptance to uop_done is compared with the mau latency
// (1, n/2 + 2 or 5n/2 + 6 cycles).
module tb_pad_datapath;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int N  = 192;
  localparam int NT = 1500;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] m;
  logic         uop_valid = 1'b0;
  uop_t         uop = '0;
  logic         uop_done, busy;
  logic         p1_sel = 1'b0, p2_sel = 1'b1, p2_neg = 1'b0;
  fin_e         fin_mode = FIN_WRITE;
  logic         chk_zero;
  logic         ext_we = 1'b0;
  logic [3:0]   ext_addr = '0;
  logic [N-1:0] ext_wdata = '0;
  raddr_t       ext_raddr = '0;
  logic [N-1:0] ext_rdata;
  int           checks = 0, failures = 0;
  big_t         mm, rr;
  big_t         model [NREGS];

  pad_datapath #(.N(N)) dut (.*);

  always #50 clk = ~clk;   // long period: register read-back uses #1 steps

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pidx(raddr_t a, logic s1, logic s2);
    if (a >= P1X && a <= P1Z) return (s1 ? int'(R1X) : int'(R0X)) + int'(a - P1X);
    if (a >= P2X && a <= P2Z) return (s2 ? int'(R1X) : int'(R0X)) + int'(a - P2X);
    return int'(a);
  endfunction

  function automatic big_t mval(raddr_t a);
    big_t v;
    if (a == KZERO) return 0;
    if (a == KONE) return 1;
    v = model[pidx(a, p1_sel, p2_sel)];
    if (a == P2X && p2_neg) v = subm(0, v, mm);
    return v;
  endfunction

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  task automatic check_regs();
    for (int i = 0; i < NREGS; i++) begin
      ext_raddr <= raddr_t'(i);
      #1;
      checks++;
      if (big_t'(ext_rdata) !== model[i]) fail($sformatf("reg %0d = %h, exp %h", i, ext_rdata, model[i]));
    end
    checks++;
    if (chk_zero !== (model[T5] == 0)) fail("chk_zero");
  endtask

  task automatic issue(uop_t u);
    big_t a, b, e;
    int   cyc, lat, d;
    bit   wr;
    a = mval(u.a); b = mval(u.b);
    case (u.op)
      MAU_ADD: begin e = addm(a, b, mm); lat = 1; end
      MAU_SUB: begin e = subm(a, b, mm); lat = 1; end
      MAU_HALF: begin e = mulm(a, invm(2, mm), mm); lat = 1; end
      MAU_MUL: begin e = mulm(mulm(a, b, mm), invm(rr, mm), mm); lat = N / 2 + 2; end
      default: begin e = mulm(divm(a, b, mm), rr, mm); lat = 5 * N / 2 + 6; end
    endcase
    d  = pidx(u.dst, p1_sel, p2_sel);
    wr = 1'b1;
    if (u.fin && fin_mode == FIN_KEEP) wr = 1'b0;
    if (u.fin && fin_mode == FIN_COPY) e = model[pidx(raddr_t'(u.dst + (P2X - P1X)), p1_sel, p2_sel)];
    @(negedge clk);
    uop_valid = 1'b1; uop = u;
    @(posedge clk);                       // accepted on this edge
    cyc = 0;
    do begin
      @(negedge clk); cyc++;
    end while (!uop_done && cyc < 1000);
    uop_valid = 1'b0;                     // done is seen before the next edge
    @(posedge clk);                       // result written on this edge
    @(negedge clk);
    checks++;
    if (cyc != lat) fail($sformatf("op %s latency %0d exp %0d", u.op.name(), cyc, lat));
    if (wr) model[d] = e;
    check_regs();
  endtask

  initial begin : main
    uop_t u;
    mm = (big_t'(1) << 192) - (big_t'(1) << 64) - 1;
    rr = pow2m(N + 2, mm);
    m  = mm[N-1:0];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < NREGS; i++) begin
      model[i] = (i == RR2) ? mulm(rr, rr, mm) : rnd(mm);
      ext_we = 1'b1; ext_addr = 4'(i); ext_wdata = model[i][N-1:0];
      @(negedge clk);
    end
    ext_we = 1'b0;
    check_regs();
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      p1_sel = 1'($urandom); p2_sel = 1'($urandom); p2_neg = 1'($urandom);
      fin_mode = fin_e'($urandom_range(0, 2));
      if (t % 40 == 0) begin
        // write zero into T5 now and then so chk_zero is seen both ways
        ext_we = 1'b1; ext_addr = T5[3:0]; ext_wdata = '0; model[T5] = 0;
        @(negedge clk);
        ext_we = 1'b0;
      end
      u.op  = mau_op_e'($urandom_range(0, (t % 4 == 0) ? 4 : 3));
      u.a   = raddr_t'($urandom_range(0, 23));
      u.b   = raddr_t'($urandom_range(0, 23));
      u.fin = (t % 3 == 0);
      if (u.fin) u.dst = raddr_t'($urandom_range(P1X, P1Z));
      else if (t % 5 == 0) u.dst = raddr_t'($urandom_range(P1X, P1Z));
      else u.dst = raddr_t'($urandom_range(0, 15));
      if (u.dst == RR2) u.dst = T0;
      if (u.op == MAU_DIV && mval(u.b) == 0) u.b = KONE;
      issue(u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
