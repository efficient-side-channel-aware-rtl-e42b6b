// io_shift_regs: serial input and output shift registers of the processor.
//
// The processor talks to the outside through a narrow port so that it fits a
// small number of pads. Input: every cycle with sin_valid one IO_W-bit word
// enters at the bottom of a 6n-bit shift register. The operands are sent in the
// order Px, Py, M, curve constant (a or d), Rsquare, k, each most significant
// word first; after 6n/IO_W words they sit in their fields and stay there for
// the whole point multiplication (the shift register is the operand store).
// Output: ld_x and then ld_y (consecutive cycles) load the result coordinates;
// the register then shifts out 2n/IO_W words, x first, most significant word
// first, one per cycle with sout_valid.
// The document names the shift registers and the serial reading and writing;
// the word width, the order of the operands and the handshake are this
// design's choices.
module io_shift_regs #(
  parameter int N    = 192,
  parameter int IO_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sin_valid,
  input  logic [IO_W-1:0] sin_data,
  output logic [N-1:0]    px,
  output logic [N-1:0]    py,
  output logic [N-1:0]    m,
  output logic [N-1:0]    ca,
  output logic [N-1:0]    r2,
  output logic [N-1:0]    k,
  input  logic            ld_x,
  input  logic            ld_y,
  input  logic [N-1:0]    res,
  output logic            sout_valid,
  output logic [IO_W-1:0] sout_data
);
  localparam int NOUT = 2 * N / IO_W;
  localparam int CW   = $clog2(NOUT + 1);

  logic [6*N-1:0] in_sr;
  logic [2*N-1:0] out_sr;
  logic [CW-1:0]  ocnt;

  assign {px, py, m, ca, r2, k} = in_sr;
  assign sout_valid = (ocnt != '0);
  assign sout_data  = out_sr[2*N-1 -: IO_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr  <= '0;
      out_sr <= '0;
      ocnt   <= '0;
    end else begin
      if (sin_valid) in_sr <= {in_sr[6*N-IO_W-1:0], sin_data};
      if (ld_x) begin
        out_sr[2*N-1:N] <= res;
      end else if (ld_y) begin
        out_sr[N-1:0] <= res;
        ocnt <= CW'(NOUT);
      end else if (ocnt != '0) begin
        out_sr <= {out_sr[2*N-IO_W-1:0], IO_W'(0)};
        ocnt   <= ocnt - 1'b1;
      end
    end
  end

  initial assert (N % IO_W == 0) else $error("N must be a multiple of IO_W");
endmodule
