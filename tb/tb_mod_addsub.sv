// tb_mod_addsub: self-checking testbench of the one-cycle modular adder /
// subtracter / halver.
//
// At the default operand length (192 bits), over the prime
// 2^192 - 2^64 - 1 and random odd moduli with the top bit set, random and
// corner operands in [0, M) are added, subtracted and halved. Results are
// compared with wide integer arithmetic; the result must be ready one clock
// after the start cycle.
module tb_mod_addsub;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int N  = 192;
  localparam int NT = 3000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  mau_op_e      op = MAU_ADD;
  logic [N-1:0] x = '0, y = '0, m = '0;
  logic [N-1:0] z;
  logic         done;
  int           checks = 0, failures = 0;

  mod_addsub #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(mau_op_e o, big_t mm, big_t a, big_t b);
    big_t e;
    case (o)
      MAU_ADD: e = addm(a, b, mm);
      MAU_SUB: e = subm(a, b, mm);
      default: e = a[0] ? (a + mm) >> 1 : a >> 1;
    endcase
    op <= o; m <= mm[N-1:0]; x <= a[N-1:0]; y <= b[N-1:0]; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    checks++;
    if (!done || big_t'(z) !== e) begin
      failures++;
      $display("FAIL op=%s x=%h y=%h z=%h exp=%h done=%b", o.name(), a, b, z, e, done);
    end
  endtask

  initial begin : main
    big_t mm, a, b;
    mau_op_e o;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      mm = (big_t'(1) << 192) - (big_t'(1) << 64) - 1;
      if (t % 2 == 1) begin
        mm = rnd(big_t'(1) << N) | 1;
        mm[N-1] = 1'b1;
      end
      a = rnd(mm); b = rnd(mm);
      case (t % 7)
        0: a = 0;
        1: b = mm - 1;
        2: begin a = mm - 1; b = mm - 1; end
        3: b = a;
        default: ;
      endcase
      o = mau_op_e'(t % 3);
      run(o, mm, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
