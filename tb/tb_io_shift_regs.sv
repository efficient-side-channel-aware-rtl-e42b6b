// tb_io_shift_regs: self-checking testbench of the serial IO shift registers.
//
// At the default sizes (n = 192, 8-bit words) random values for the six
// operand fields are shifted in, most significant word first, with random
// idle cycles between words; every field must then hold its value. Then two
// random result coordinates are loaded with ld_x/ld_y and the testbench
// collects the output words: exactly 2n/8 words, x then y, most significant
// word first, on consecutive cycles starting the cycle after ld_y.
module tb_io_shift_regs;
  import ecc_ref_pkg::*;

  localparam int N    = 192;
  localparam int IO_W = 8;
  localparam int NW   = N / IO_W;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            sin_valid = 1'b0;
  logic [IO_W-1:0] sin_data = '0;
  logic [N-1:0]    px, py, m, ca, r2, k;
  logic            ld_x = 1'b0, ld_y = 1'b0;
  logic [N-1:0]    res = '0;
  logic            sout_valid;
  logic [IO_W-1:0] sout_data;
  int              checks = 0, failures = 0;

  io_shift_regs #(.N(N), .IO_W(IO_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin : main
    logic [N-1:0] v [6];
    logic [N-1:0] rx, ry, gx, gy;
    int           nout, first, cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      for (int f = 0; f < 6; f++) v[f] = N'(rnd('1));
      for (int f = 0; f < 6; f++)
        for (int w = NW - 1; w >= 0; w--) begin
          sin_valid <= 1'b1;
          sin_data  <= v[f][w*IO_W +: IO_W];
          @(posedge clk);
          if ($urandom_range(0, 3) == 0) begin
            sin_valid <= 1'b0;
            sin_data  <= IO_W'($urandom);
            repeat ($urandom_range(1, 3)) @(posedge clk);
          end
        end
      sin_valid <= 1'b0;
      @(posedge clk);
      check("px", px, v[0]); check("py", py, v[1]); check("m", m, v[2]);
      check("ca", ca, v[3]); check("r2", r2, v[4]); check("k", k, v[5]);

      rx = N'(rnd('1)); ry = N'(rnd('1));
      ld_x <= 1'b1; res <= rx;
      @(posedge clk);
      ld_x <= 1'b0; ld_y <= 1'b1; res <= ry;
      @(posedge clk);
      ld_y <= 1'b0; res <= '0;
      nout = 0; first = -1; cyc = 0;
      gx = '0; gy = '0;
      repeat (2 * NW + 10) begin
        @(negedge clk);
        if (sout_valid) begin
          if (first < 0) first = cyc;
          if (nout < NW) gx = {gx[N-IO_W-1:0], sout_data};
          else           gy = {gy[N-IO_W-1:0], sout_data};
          nout++;
          checks++;
          if (cyc != first + nout - 1) begin
            failures++;
            $display("FAIL output word %0d not on consecutive cycles", nout);
          end
        end
        @(posedge clk);
        cyc++;
      end
      check("out x", gx, rx); check("out y", gy, ry);
      checks++;
      if (nout != 2 * NW || first != 0) begin
        failures++;
        $display("FAIL %0d output words (exp %0d), first at %0d", nout, 2 * NW, first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
