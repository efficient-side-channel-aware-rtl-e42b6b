// tb_mont_mul: self-checking testbench of the radix-4 Montgomery multiplier.
//
// Runs the multiplier at its default operand length (192 bits) over the
// prime 2^192 - 2^64 - 1 and over random odd moduli, with random operands in
// [0, M) plus the corner values 0, 1 and M-1. Each product is checked by
// z * 2^(n+2) = X*Y (mod M) using wide integer arithmetic in the testbench, a
// range check z < M, and the latency from the start cycle to the done pulse is checked against
// n/2 + 2 cycles.
module tb_mont_mul;
  import ecc_ref_pkg::*;

  localparam int N   = 192;
  localparam int LAT = N / 2 + 2;
  localparam int NT  = 300;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] x = '0, y = '0, m = '0;
  logic [N-1:0] z;
  logic         done, busy;
  int           checks = 0, failures = 0;

  mont_mul #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(big_t mm, big_t a, big_t b);
    big_t lhs, rhs;
    int   cyc;
    m <= mm[N-1:0]; x <= a[N-1:0]; y <= b[N-1:0]; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done && cyc < 4 * LAT);
    // z is the unique value in [0, M) with z * 2^(n+2) = x * y (mod M)
    lhs = mulm(big_t'(z), pow2m(N + 2, mm), mm);
    rhs = mulm(a, b, mm);
    checks++;
    if (lhs !== rhs || big_t'(z) >= mm) begin
      failures++;
      $display("FAIL mul m=%h x=%h y=%h z=%h", mm, a, b, z);
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, LAT);
    end
  endtask

  initial begin : main
    big_t p192, mm;
    p192 = (big_t'(1) << 192) - (big_t'(1) << 64) - 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      mm = p192;
      if (t % 2 == 1) begin
        mm = rnd(big_t'(1) << N) | 1;
        mm[N-1] = 1'b1;
      end
      case (t % 10)
        0: run(mm, 0, rnd(mm));
        1: run(mm, mm - 1, mm - 1);
        2: run(mm, 1, rnd(mm));
        default: run(mm, rnd(mm), rnd(mm));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
