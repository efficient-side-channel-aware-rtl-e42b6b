// tb_mau: self-checking testbench of the modular arithmetic unit.
//
// At the default operand length (192 bits) and the prime 2^192 - 2^64 - 1,
// every operation code is issued with random operands in Montgomery form:
// ADD, SUB and HALF (1 cycle), MUL (n/2 + 2 cycles) and DIV (division followed
// by a Montgomery multiplication with 2^(2n+4) mod M, 5n/2 + 6 cycles). The
// results are compared with wide integer arithmetic and the latency of each
// operation with the figures above. The busy output must be high while a
// multi-cycle operation runs.
module tb_mau;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int N  = 192;
  localparam int NT = 300;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  mau_op_e      op = MAU_ADD;
  logic [N-1:0] x = '0, y = '0, m = '0, r2 = '0;
  logic [N-1:0] z;
  logic         done, busy;
  int           checks = 0, failures = 0;

  mau #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lat(mau_op_e o);
    case (o)
      MAU_MUL: return N / 2 + 2;
      MAU_DIV: return 5 * N / 2 + 6;
      default: return 1;
    endcase
  endfunction

  task automatic run(mau_op_e o, big_t mm, big_t a, big_t b);
    big_t e, rr, rinv;
    int   cyc;
    bit   busy_ok;
    rr   = pow2m(N + 2, mm);
    rinv = invm(rr, mm);
    case (o)
      MAU_ADD: e = addm(a, b, mm);
      MAU_SUB: e = subm(a, b, mm);
      MAU_HALF: e = mulm(a, invm(2, mm), mm);
      MAU_MUL: e = mulm(mulm(a, b, mm), rinv, mm);
      default: e = mulm(divm(a, b, mm), rr, mm);
    endcase
    op <= o; m <= mm[N-1:0]; x <= a[N-1:0]; y <= b[N-1:0]; start <= 1'b1;
    r2 <= mulm(rr, rr, mm);
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    busy_ok = 1'b1;
    do begin
      @(posedge clk); cyc++;
      if (!done && !busy) busy_ok = 1'b0;
    end while (!done && cyc < 1000);
    checks++;
    if (big_t'(z) !== e) begin
      failures++;
      $display("FAIL op=%s x=%h y=%h z=%h exp=%h", o.name(), a, b, z, e);
    end
    checks++;
    if (cyc != lat(o) || !busy_ok) begin
      failures++;
      $display("FAIL op=%s latency %0d expected %0d busy_ok=%b", o.name(), cyc, lat(o), busy_ok);
    end
  endtask

  initial begin : main
    big_t mm, b;
    mm = (big_t'(1) << 192) - (big_t'(1) << 64) - 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      b = rnd(mm - 1) + 1;
      run(mau_op_e'(t % 5), mm, rnd(mm), b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
