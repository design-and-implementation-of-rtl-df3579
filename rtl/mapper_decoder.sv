// mapper_decoder: the mapper of the transmitter, built as a log2(M):M decoder.
//
// Instead of producing complex numbers, the mapper drives one of M one-hot
// lines.  Line c selects constellation case c inside every cumulative adder
// block, where it picks which signed copies of the twiddle factors are
// added (see ofdm_pkg for the case-to-point table).  For QPSK this is the
// published 2:4 truth table: {In2,In1} = 00 -> Op1 (+1), 01 -> Op2 (+i),
// 10 -> Op3 (-i), 11 -> Op4 (-1); op[0] is Op1.
//
// Interface: idx is the symbol from sp_dff, en its valid strobe; with en low
// every output is 0.  Purely combinational.
module mapper_decoder #(
  parameter int M = 4,
  localparam int K = (M > 2) ? $clog2(M) : 1
) (
  input  logic [K-1:0] idx,
  input  logic         en,
  output logic [M-1:0] op
);

  always_comb begin
    op = '0;
    for (int c = 0; c < M; c++)
      if (en && int'(idx) == c) op[c] = 1'b1;
  end

endmodule
