// cab: Cumulative Adder Block, one output element of the IDFT.
//
// x(n) = sum_k X(k) * W^{-nk}.  Each symbol X(k) has real and imaginary
// parts in {-3,-1,0,+1,+3}, so X(k)*(a+ib) is formed by selecting signed
// copies of a, b (and 3a, 3b for 16-QAM) under control of the one-hot
// decoder line, never by multiplying.  Two adders, one for the real and one
// for the imaginary part, add the selected term to two P-bit accumulator
// registers.  For QPSK the four cases are
//   +1: a + ib    +i: -b + ia    -i: b - ia    -1: -a - ib.
//
// Interface: en strobes one symbol (op one-hot, a/b/a3/b3 the twiddle
// factors of that symbol's column).  When first is set together with en,
// the accumulators restart from zero for a new IDFT frame; this replaces a
// separate clearing cycle and is this design's choice, as are the reset and
// the wrap-around on overflow (register width = twiddle precision P).
// Timing: acc_re/acc_im are registered and include the symbol strobed in
// the previous cycle.
module cab #(
  parameter int M = 4,
  parameter int P = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                first,
  input  logic [M-1:0]        op,
  input  logic signed [P-1:0] a,
  input  logic signed [P-1:0] b,
  input  logic signed [P-1:0] a3,
  input  logic signed [P-1:0] b3,
  output logic signed [P-1:0] acc_re,
  output logic signed [P-1:0] acc_im
);
  import ofdm_pkg::*;

  typedef logic signed [P-1:0] word_t;

  // Signed copy of v (or of its scaled version v3) for level lv; lv is a
  // constant in every use, so this is a selection, not a multiplication.
  function automatic word_t pick(input int lv, input word_t v, input word_t v3);
    case (lv)
      1:       return v;
      -1:      return -v;
      3:       return v3;
      -3:      return -v3;
      default: return '0;
    endcase
  endfunction

  word_t t_re, t_im;

  always_comb begin
    t_re = '0;
    t_im = '0;
    for (int c = 0; c < M; c++) begin
      if (op[c]) begin
        t_re = pick(point_re(M, c), a, a3) - pick(point_im(M, c), b, b3);
        t_im = pick(point_re(M, c), b, b3) + pick(point_im(M, c), a, a3);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (en) begin
      acc_re <= (first ? word_t'(0) : acc_re) + t_re;
      acc_im <= (first ? word_t'(0) : acc_im) + t_im;
    end
  end

endmodule
