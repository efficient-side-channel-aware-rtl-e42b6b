// tb_rba: self-checking testbench of the redundant binary (SD2) adder.
//
// Drives random signed-digit operands at the default width (192 digits) and
// at 8 digits, where the digits of each operand are drawn with different
// densities of -1, 0 and 1 (including all-ones and all-minus-ones patterns,
// and the binary encodings used for plain addition and subtraction). The
// value of the (W+1)-digit result, sum of h bits minus sum of l bits, must
// equal the sum of the operand values. The adder is combinational.
module tb_rba;
  localparam int W  = 192;
  localparam int WS = 8;
  localparam int NT = 5000;

  typedef logic signed [W+3:0] val_t;

  logic [W-1:0]  x_h, x_l, y_h, y_l;
  logic [W:0]    z_h, z_l;
  logic [WS-1:0] sx_h, sx_l, sy_h, sy_l;
  logic [WS:0]   sz_h, sz_l;
  int            checks = 0, failures = 0;
  logic          clk = 1'b0;

  rba #(.W(W))  dut   (.x_h, .x_l, .y_h, .y_l, .z_h, .z_l);
  rba #(.W(WS)) dut_s (.x_h(sx_h), .x_l(sx_l), .y_h(sy_h), .y_l(sy_l), .z_h(sz_h), .z_l(sz_l));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rndw();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  // one random SD2 operand; mode selects the digit statistics
  task automatic rnd_sd(int mode, output logic [W-1:0] h, output logic [W-1:0] l);
    case (mode)
      0: begin h = rndw(); l = rndw(); end          // both bits random (1,1 = 0)
      1: begin h = rndw(); l = rndw() & ~h; end     // canonical digits
      2: begin h = rndw(); l = '0; end              // plain binary, positive
      3: begin h = '0; l = rndw(); end              // negated binary
      4: begin h = '1; l = '0; end
      5: begin h = '0; l = '1; end
      default: begin h = rndw() & rndw(); l = rndw() & rndw(); end
    endcase
  endtask

  initial begin : main
    val_t vx, vy, vz;
    logic signed [WS+3:0] svx, svy, svz;
    for (int t = 0; t < NT; t++) begin
      rnd_sd($urandom_range(0, 6), x_h, x_l);
      rnd_sd($urandom_range(0, 6), y_h, y_l);
      sx_h = x_h[WS-1:0]; sx_l = x_l[WS-1:0];
      sy_h = y_h[WS-1:0]; sy_l = y_l[WS-1:0];
      #1;
      vx = val_t'(x_h) - val_t'(x_l);
      vy = val_t'(y_h) - val_t'(y_l);
      vz = val_t'(z_h) - val_t'(z_l);
      checks++;
      if (vz !== vx + vy) begin
        failures++;
        if (failures < 5) $display("FAIL W=%0d x=%0d y=%0d z=%0d", W, vx, vy, vz);
      end
      svx = (WS+4)'(sx_h) - (WS+4)'(sx_l);
      svy = (WS+4)'(sy_h) - (WS+4)'(sy_l);
      svz = (WS+4)'(sz_h) - (WS+4)'(sz_l);
      checks++;
      if (svz !== svx + svy) begin
        failures++;
        if (failures < 5) $display("FAIL W=%0d x=%0d y=%0d z=%0d", WS, svx, svy, svz);
      end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
