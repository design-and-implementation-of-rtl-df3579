// tb_ref_pkg: reference models for the transmitter testbenches.
//
// Written separately from the RTL: constellation points are listed as
// literal tables, and the IDFT is computed term by term with integer
// multiplication of the symbol by round(1000*cos) / round(1000*sin).
// Also holds the published 16-point QPSK test frame and its published
// 15-bit results.
package tb_ref_pkg;

  // Constellation of bit pattern idx ({last bit, ..., first bit}).
  function automatic void ref_point(input int m, input int idx, output int re, output int im);
    int qam_lv[4] = '{-3, -1, 3, 1};   // Gray: 00 -> -3, 01 -> -1, 10 -> +3, 11 -> +1
    case (m)
      2: begin re = (idx == 0) ? 1 : -1; im = 0; end
      4: begin
        // published decoder table: {In2,In1} 00:+1 01:+i 10:-i 11:-1
        case (idx)
          0: begin re =  1; im =  0; end
          1: begin re =  0; im =  1; end
          2: begin re =  0; im = -1; end
          default: begin re = -1; im = 0; end
        endcase
      end
      default: begin re = qam_lv[idx & 3]; im = qam_lv[(idx >> 2) & 3]; end
    endcase
  endfunction

  function automatic int rnd1000(input real v);
    real s;
    s = v * 1000.0;
    if (s >= 0.0) return int'($floor(s + 0.5));
    return -int'($floor(-s + 0.5));
  endfunction

  // One output element x(n) of the unnormalised IDFT of symbols (re, im).
  function automatic void ref_idft(input int n_pts, input int n,
                                   input int sre[], input int sim[],
                                   output longint xr, output longint xi);
    real pi;
    pi = 3.14159265358979323846;
    xr = 0;
    xi = 0;
    for (int k = 0; k < n_pts; k++) begin
      int c, s;
      c = rnd1000($cos(2.0 * pi * real'((n * k) % n_pts) / real'(n_pts)));
      s = rnd1000($sin(2.0 * pi * real'((n * k) % n_pts) / real'(n_pts)));
      xr += longint'(sre[k] * c - sim[k] * s);
      xi += longint'(sre[k] * s + sim[k] * c);
    end
  endfunction

  // Symbols of the published 16-point QPSK test (obtained by a forward DFT
  // of the published results), and the published results as 15-bit words.
  function automatic void paper_frame(output int sre[16], output int sim[16]);
    // -i -i -i 1 i -1 -i -1 i i 1 -1 -1 i 1 -1
    sre = '{0, 0, 0, 1, 0, -1, 0, -1, 0, 0, 1, -1, -1, 0, 1, -1};
    sim = '{-1, -1, -1, 0, 1, 0, -1, 0, 1, 1, 0, 0, 0, 1, 0, 0};
  endfunction

  function automatic void paper_result(output logic [14:0] rre[16], output logic [14:0] rim[16]);
    rre = '{15'b111100000110000, 15'b000110010110101, 15'b000001111101000, 15'b000010001010011,
            15'b111000001100000, 15'b000011100011111, 15'b000100101101110, 15'b000000001111111,
            15'b000111110100000, 15'b111011010000111, 15'b000001111101000, 15'b000111010001001,
            15'b111100000110000, 15'b110011000000101, 15'b111111001100010, 15'b111110001000101};
    rim = '{15'b000000000000000, 15'b111010001110101, 15'b000000110011110, 15'b110011010101001,
            15'b000111110100000, 15'b000011010111001, 15'b000011100100100, 15'b000001100100011,
            15'b111100000110000, 15'b111100010101111, 15'b111011010010010, 15'b111011011011011,
            15'b000011111010000, 15'b111110010000011, 15'b111000100001100, 15'b111000001111001};
  endfunction

  // Bit pattern for a QPSK point under the published decoder table.
  function automatic int qpsk_bits(input int re, input int im);
    if (re == 1)  return 0;
    if (im == 1)  return 1;
    if (im == -1) return 2;
    return 3;
  endfunction

endpackage
