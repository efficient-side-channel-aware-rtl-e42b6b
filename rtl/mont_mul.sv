// mont_mul: constant-time radix-4 Montgomery modular multiplier.
//
// Computes Z = X * Y * 2^-(n+2) mod M for an odd modulus M < 2^n and fully
// reduced operands X, Y in [0, M). Each iteration consumes one radix-4 digit
// a in {-2,-1,0,1,2} of Y, taken least significant first by on-the-fly Booth
// recoding of the shifting Y register (recoder REC1), adds a*X to the partial
// result with a first redundant adder, then adds q*M with q in {-1,0,1,2},
// chosen by the second recoder (REC2) from the two low digits so that the sum
// is a multiple of 4, with a second redundant adder, and drops the two low
// digits (which are then both zero in value). n/2 + 1 iterations cover all
// digits of Y, so the Montgomery factor is 2^(n+2), as in the document. The
// iteration count never depends on the data.
//
// As in the document the partial result is kept in radix-2 signed-digit
// (SD2) form and each iteration is two carry-free rba additions, so the
// iteration delay does not grow with n. Each addition adds one digit and the
// shift removes two, so the partial result keeps n + 4 digits. This design's
// choices: the operands X, Y and the result are plain binary numbers, and the
// last iteration converts the SD2 result to binary (one subtraction H - L) and
// corrects it from (-4M/3, 4M/3) into [0, M); the document leaves the result
// redundant in (-2M, 2M).
//
// Timing: start is sampled on a rising edge (X, Y and M must be held stable
// while busy). done is high for one cycle, n/2 + 2 cycles after the start
// cycle: one cycle to load the operands and n/2 + 1 iterations, the last of
// which also converts and corrects the result; z holds until the next start.
module mont_mul #(
  parameter int N = 192   // operand length n, even
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] m,
  output logic [N-1:0] z,
  output logic         done,
  output logic         busy
);
  localparam int ZW = N + 4;
  localparam int ITER = N / 2 + 1;
  localparam int CW = $clog2(ITER + 1);

  logic [N+1:0]   ys;           // remaining multiplier digits
  logic           yprev;        // bit below the current digit (Booth)
  logic [ZW-1:0]  zh, zl;       // partial result, SD2: value zh - zl
  logic [CW-1:0]  cnt;

  logic [ZW-1:0]  xs, ph, pl;   // a * X as SD2 operand
  logic [ZW:0]    ms, qh, ql;   // q * M as SD2 operand
  logic [ZW:0]    s1h, s1l;     // after the first adder
  logic [ZW+1:0]  s2h, s2l;     // after the second adder
  logic [2:0]     booth;
  logic [1:0]     s1mod4, qsel;
  logic signed [ZW:0] zs, zc;   // binary result of the last iteration

  assign xs = ZW'(x);
  assign ms = (ZW + 1)'(m);

  always_comb begin
    // REC1: radix-4 Booth digit from ys[1:0] and the previous bit
    booth = {ys[1], ys[0], yprev};
    ph = '0; pl = '0;
    case (booth)
      3'b001, 3'b010: ph = xs;
      3'b011:         ph = xs << 1;
      3'b100:         pl = xs << 1;
      3'b101, 3'b110: pl = xs;
      default: ;
    endcase
  end

  rba #(.W(ZW)) u_rba1 (.x_h(zh), .x_l(zl), .y_h(ph), .y_l(pl), .z_h(s1h), .z_l(s1l));

  always_comb begin
    // REC2: q = -s1 * M^-1 mod 4, with M^-1 = M mod 4 for odd M; s1 mod 4
    // follows from the two low digits
    s1mod4 = s1h[1:0] - s1l[1:0];
    qsel   = 2'(-(s1mod4 * m[1:0]));
    qh = '0; ql = '0;
    case (qsel)
      2'd1:    qh = ms;
      2'd2:    qh = ms << 1;
      2'd3:    ql = ms;
      default: ;
    endcase
  end

  rba #(.W(ZW + 1)) u_rba2 (.x_h(s1h), .x_l(s1l), .y_h(qh), .y_l(ql), .z_h(s2h), .z_l(s2l));

  always_comb begin
    // conversion to binary and final correction into [0, M), used in the
    // last iteration only
    zs = $signed({1'b0, s2h[ZW+1:2]}) - $signed({1'b0, s2l[ZW+1:2]});
    if (zs < 0) zc = (zs + $signed(ms) < 0) ? zs + $signed(ms << 1) : zs + $signed(ms);
    else        zc = (zs >= $signed(ms)) ? zs - $signed(ms) : zs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ys <= '0; yprev <= 1'b0; zh <= '0; zl <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; z <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        ys    <= {2'b00, y};
        yprev <= 1'b0;
        zh    <= '0;
        zl    <= '0;
        cnt   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        // the two low digits of s2 are zero in value: drop them
        zh    <= s2h[ZW+1:2];
        zl    <= s2l[ZW+1:2];
        ys    <= ys >> 2;
        yprev <= ys[1];
        cnt   <= cnt + 1'b1;
        if (cnt == CW'(ITER - 1)) begin
          z    <= zc[N-1:0];
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
