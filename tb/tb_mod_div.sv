// tb_mod_div: self-checking testbench of the binary extended-GCD divider.
//
// At the default operand length (192 bits) and the prime 2^192 - 2^64 - 1,
// random X and nonzero Y in [0, M) (plus X = 0, X = Y, Y = 1 and Y = M-1)
// are divided. A quotient is correct when z < M and z * Y = X (mod M). The
// latency from the start cycle to the done pulse must be 2n + 4 cycles.
module tb_mod_div;
  import ecc_ref_pkg::*;

  localparam int N   = 192;
  localparam int LAT = 2 * N + 4;
  localparam int NT  = 200;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] x = '0, y = '0, m = '0;
  logic [N-1:0] z;
  logic         done, busy;
  int           checks = 0, failures = 0;

  mod_div #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(big_t mm, big_t a, big_t b);
    int cyc;
    m <= mm[N-1:0]; x <= a[N-1:0]; y <= b[N-1:0]; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done && cyc < 4 * LAT);
    checks++;
    if (mulm(big_t'(z), b, mm) !== a % mm || big_t'(z) >= mm) begin
      failures++;
      $display("FAIL div x=%h y=%h z=%h", a, b, z);
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, LAT);
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
      case (t % 10)
        0: run(mm, 0, b);
        1: run(mm, b, b);
        2: run(mm, rnd(mm), 1);
        3: run(mm, rnd(mm), mm - 1);
        default: run(mm, rnd(mm), b);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
