// ofdm_pkg: types, constants and elaboration-time functions shared by the
// multiplier-free OFDM transmitter.
//
// The transmitter computes an N-point IDFT without multipliers.  Every
// constellation point of BPSK, QPSK and 16-QAM has real and imaginary parts in
// {-3,-1,0,+1,+3}, so the product of a symbol and a twiddle factor a+ib is a
// sum of signed copies of a, b, 3a and 3b.  This package holds the
// constellation tables used to turn a decoder output into those signs, and
// the twiddle-factor generator used to fill the ROMs.
//
// Fixed point: twiddle factors are stored as round(SCALE*cos) and
// round(SCALE*sin) with SCALE = 1000 (three decimal digits), which is the
// format of the published 15-bit results (e.g. -2.000 = 111100000110000).
// The QPSK table follows the published decoder truth table; the BPSK and
// 16-QAM bit-to-point assignments are this design's own choice.
package ofdm_pkg;

  // Decimal fixed-point scale of the stored twiddle factors.
  localparam int TW_SCALE = 1000;

  // Constellation coordinate of a mapper case, for modulation order m
  // (2, 4 or 16) and decoder output index idx.
  //   BPSK : idx 0 -> +1, idx 1 -> -1.
  //   QPSK : idx = {In2,In1}: 0 -> +1, 1 -> +i, 2 -> -i, 3 -> -1.
  //   16QAM: idx[1:0] gives the in-phase level, idx[3:2] the quadrature
  //          level, both Gray coded 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3.
  function automatic int gray_level(input int two_bits);
    case (two_bits & 3)
      0: return -3;
      1: return -1;
      3: return 1;
      default: return 3;
    endcase
  endfunction

  function automatic int point_re(input int m, input int idx);
    if (m == 2) return (idx == 0) ? 1 : -1;
    if (m == 4) begin
      case (idx)
        0: return 1;
        3: return -1;
        default: return 0;
      endcase
    end
    return gray_level(idx);
  endfunction

  function automatic int point_im(input int m, input int idx);
    if (m == 2) return 0;
    if (m == 4) begin
      case (idx)
        1: return 1;
        2: return -1;
        default: return 0;
      endcase
    end
    return gray_level(idx >> 2);
  endfunction

  // Rounded, scaled IDFT twiddle factor W_N^{-nk} = cos(2*pi*nk/N) + i sin(..).
  function automatic int tw_round(input real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  function automatic int tw_cos(input int n_total, input int row, input int col);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * real'((row * col) % n_total) / real'(n_total);
    return tw_round(real'(TW_SCALE) * $cos(ang));
  endfunction

  function automatic int tw_sin(input int n_total, input int row, input int col);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * real'((row * col) % n_total) / real'(n_total);
    return tw_round(real'(TW_SCALE) * $sin(ang));
  endfunction

endpackage
