// idft_cab_array: the multiplier-free IDFT, N cumulative adder blocks in
// parallel.
//
// Block n owns the ROMs of row n of the IDFT matrix and accumulates x(n).
// All blocks see the same one-hot decoder output and the same ROM address
// k (the index of the symbol being added), so one symbol updates all N
// outputs in one clock cycle; after the N-th symbol of a frame the
// accumulators hold x(0) .. x(N-1) (unnormalised: no 1/N factor, as in the
// published results).
//
// Interface: en/first/op/addr come from the decoder and the control unit
// (see cab); x_re/x_im are the N registered accumulator pairs.
module idft_cab_array #(
  parameter int N = 16,
  parameter int M = 4,
  parameter int P = 15,
  localparam int AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                first,
  input  logic [M-1:0]        op,
  input  logic [AW-1:0]       addr,
  output logic signed [P-1:0] x_re [N],
  output logic signed [P-1:0] x_im [N]
);

  for (genvar n = 0; n < N; n++) begin : g_row
    logic signed [P-1:0] a, b, a3, b3;

    twiddle_rom #(.N(N), .ROW(n), .P(P), .M(M)) u_rom (
      .addr(addr), .a(a), .b(b), .a3(a3), .b3(b3)
    );

    cab #(.M(M), .P(P)) u_cab (
      .clk(clk), .rst_n(rst_n), .en(en), .first(first), .op(op),
      .a(a), .b(b), .a3(a3), .b3(b3),
      .acc_re(x_re[n]), .acc_im(x_im[n])
    );
  end

endmodule
