// tb_twiddle_rom: checks ROM contents.  Row 1 of the 16-point IDFT matrix
// against literal values (1000*cos/sin of multiples of 22.5 degrees), rows
// 0, 3 and 13 against the reference model, and the scaled 16-QAM words.
module tb_twiddle_rom;
  import tb_ref_pkg::*;
  logic [3:0] addr;
  logic signed [14:0] a1, b1, a13, b13, c1, d1;
  logic signed [14:0] a0, b0, a3r, b3r, u1, u2;
  logic signed [17:0] qa, qb, qa3, qb3;
  int checks = 0, failures = 0;

  twiddle_rom #(.N(16), .ROW(1))  r1  (.addr, .a(a1),  .b(b1),  .a3(c1),  .b3(d1));
  twiddle_rom #(.N(16), .ROW(0))  r0  (.addr, .a(a0),  .b(b0),  .a3(u1),  .b3(u2));
  twiddle_rom #(.N(16), .ROW(3))  r3  (.addr, .a(a3r), .b(b3r), .a3(),    .b3());
  twiddle_rom #(.N(16), .ROW(13)) r13 (.addr, .a(a13), .b(b13), .a3(),    .b3());
  twiddle_rom #(.N(16), .ROW(5), .P(18), .M(16)) rq (.addr, .a(qa), .b(qb), .a3(qa3), .b3(qb3));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%0d", what, addr); end
  endtask

  initial begin
    int cq[16] = '{1000, 924, 707, 383, 0, -383, -707, -924, -1000, -924, -707, -383, 0, 383, 707, 924};
    for (int k = 0; k < 16; k++) begin
      addr = 4'(k);
      #1;
      chk(a1 == 15'(cq[k]) && b1 == 15'(cq[(k + 12) % 16]), "row 1 literal");
      chk(c1 == 0 && d1 == 0, "no scaled words for qpsk");
      chk(a0 == 1000 && b0 == 0, "row 0");
      chk(int'(a3r) == rnd1000($cos(2.0 * 3.14159265358979 * real'(3 * k) / 16.0)), "row 3 re");
      chk(int'(b3r) == rnd1000($sin(2.0 * 3.14159265358979 * real'(3 * k) / 16.0)), "row 3 im");
      chk(int'(b13) == -int'(b3r) && a13 == a3r, "row 13 is conjugate of row 3");
      chk(int'(qa) == rnd1000($cos(2.0 * 3.14159265358979 * real'(5 * k) / 16.0)), "qam re");
      chk(int'(qa3) == 3 * int'(qa) && int'(qb3) == 3 * int'(qb), "qam scaled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
