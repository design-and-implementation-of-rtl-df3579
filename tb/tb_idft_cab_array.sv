// tb_idft_cab_array: the 16-point QPSK IDFT.  Feeds the published test
// frame (one symbol per cycle, ROM address = symbol index) and compares all
// 16 complex results bit for bit with the published 15-bit words; then runs
// random frames (with gaps) against the reference IDFT.  Checks that the
// results are present in the cycle after the last symbol.
module tb_idft_cab_array;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, first;
  logic [3:0] op, addr;
  logic signed [14:0] x_re [16];
  logic signed [14:0] x_im [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  idft_cab_array #(.N(16), .M(4), .P(15)) dut (.clk, .rst_n, .en, .first, .op, .addr, .x_re, .x_im);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_frame(input int sre[], input int sim[], input bit gaps);
    for (int k = 0; k < 16; k++) begin
      while (gaps && ($urandom % 3 == 0)) begin
        en = 0; op = $urandom; addr = $urandom;
        @(negedge clk);
      end
      en = 1; first = (k == 0); addr = 4'(k);
      op = 4'(1 << qpsk_bits(sre[k], sim[k]));
      @(negedge clk);
    end
    en = 0; op = 0;
  endtask

  initial begin
    int sre[16], sim[16];
    logic [14:0] rre[16], rim[16];
    en = 0; first = 0; op = 0; addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    paper_frame(sre, sim);
    paper_result(rre, rim);
    run_frame(sre, sim, 0);
    for (int n = 0; n < 16; n++)
      chk(x_re[n] == rre[n] && x_im[n] == rim[n],
          $sformatf("published x(%0d): got %0d %0di", n, x_re[n], x_im[n]));
    for (int f = 0; f < 6; f++) begin
      for (int k = 0; k < 16; k++) begin
        automatic int idx = $urandom_range(3);
        ref_point(4, idx, sre[k], sim[k]);
      end
      run_frame(sre, sim, 1);
      for (int n = 0; n < 16; n++) begin
        longint xr, xi;
        ref_idft(16, n, sre, sim, xr, xi);
        chk(x_re[n] == 15'(xr) && x_im[n] == 15'(xi), $sformatf("frame %0d x(%0d)", f, n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
