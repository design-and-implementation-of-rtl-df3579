// twiddle_rom: the twiddle-factor memories of one cumulative adder block.
//
// Block ROW of the IDFT array needs row ROW of the IDFT matrix:
//   a[k] = round(1000*cos(2*pi*ROW*k/N)),  b[k] = round(1000*sin(2*pi*ROW*k/N))
// (conventional twiddle factors, one ROM for the real part and one for the
// imaginary part).  For 16-QAM the scaled twiddle factors 3a[k] and 3b[k]
// are stored as well, so that a symbol level of +-3 needs no multiplier.
// For BPSK and QPSK the scaled ROMs are not built and a3/b3 read as zero.
//
// The tables are computed at elaboration from the formula above.  The read
// is asynchronous (the ROMs are logic, not block RAM), so the factors for
// address addr are available in the same cycle.  The decimal scale of 1000
// reproduces the published fixed-point results exactly; the ROM layout and
// the asynchronous read are this design's choices.
module twiddle_rom #(
  parameter int N   = 16,   // IDFT length
  parameter int ROW = 1,    // IDFT matrix row held by this ROM
  parameter int P   = 15,   // word width (twiddle precision)
  parameter int M   = 4,    // constellation size (2, 4, 16)
  localparam int AW = $clog2(N)
) (
  input  logic [AW-1:0]       addr,  // column k of the row
  output logic signed [P-1:0] a,     // real part
  output logic signed [P-1:0] b,     // imaginary part
  output logic signed [P-1:0] a3,    // 3 * real part (16-QAM only)
  output logic signed [P-1:0] b3     // 3 * imaginary part (16-QAM only)
);
  import ofdm_pkg::*;

  typedef logic signed [P-1:0] word_t;

  function automatic word_t [N-1:0] fill(input bit imag, input int mult);
    word_t [N-1:0] t;
    for (int k = 0; k < N; k++)
      t[k] = word_t'(mult * (imag ? tw_sin(N, ROW, k) : tw_cos(N, ROW, k)));
    return t;
  endfunction

  localparam word_t [N-1:0] ROM_A = fill(1'b0, 1);
  localparam word_t [N-1:0] ROM_B = fill(1'b1, 1);

  assign a = ROM_A[addr];
  assign b = ROM_B[addr];

  generate
    if (M == 16) begin : g_scaled
      localparam word_t [N-1:0] ROM_A3 = fill(1'b0, 3);
      localparam word_t [N-1:0] ROM_B3 = fill(1'b1, 3);
      assign a3 = ROM_A3[addr];
      assign b3 = ROM_B3[addr];
    end else begin : g_plain
      assign a3 = '0;
      assign b3 = '0;
    end
  endgenerate

endmodule
