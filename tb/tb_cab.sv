// tb_cab: cumulative adder block.  First replays the published register
// trace of the first QPSK block (input pairs 11 11 11 00 10 01 ... with
// random a_k, b_k) and checks both registers after every symbol; then runs
// random 16-QAM symbols with random twiddle words against an integer
// complex-multiply model, including frame restarts through "first".
module tb_cab;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, first;
  logic [3:0] op4;
  logic [15:0] op16;
  logic signed [17:0] a, b, a3, b3;
  logic signed [17:0] r4, i4, r16, i16;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cab #(.M(4),  .P(18)) u4  (.clk, .rst_n, .en, .first, .op(op4),  .a, .b, .a3, .b3, .acc_re(r4),  .acc_im(i4));
  cab #(.M(16), .P(18)) u16 (.clk, .rst_n, .en, .first, .op(op16), .a, .b, .a3, .b3, .acc_re(r16), .acc_im(i16));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // Published trace input, written In1 In2 per symbol.
    string seq[16] = '{"11","11","11","00","10","01","11","01","10","10","00","01","01","10","00","01"};
    int er4 = 0, ei4 = 0, er16 = 0, ei16 = 0;
    en = 0; first = 0; op4 = 0; op16 = 0; a = 0; b = 0; a3 = 0; b3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(r4 == 0 && i4 == 0, "registers start at zero");
    for (int k = 0; k < 16; k++) begin
      int in1, in2, pr, pi;
      in1 = seq[k][0] - "0";
      in2 = seq[k][1] - "0";
      ref_point(4, in2 * 2 + in1, pr, pi);
      a = 18'($signed($urandom_range(2000)) - 1000);
      b = 18'($signed($urandom_range(2000)) - 1000);
      a3 = 3 * a; b3 = 3 * b;
      op4 = 4'(1 << (in2 * 2 + in1));
      op16 = 0;
      en = 1; first = (k == 0);
      er4 += pr * int'(a) - pi * int'(b);
      ei4 += pr * int'(b) + pi * int'(a);
      @(negedge clk);
      chk(int'(r4) == er4 && int'(i4) == ei4, $sformatf("trace step %0d", k + 1));
    end
    en = 0;
    @(negedge clk);
    chk(int'(r4) == er4 && int'(i4) == ei4, "hold without en");
    // worked 16-QAM example: W * (-3+3i) = (-3a - 3b) + i(3a - 3b);
    // -3+3i is in-phase code 00, quadrature code 10, i.e. decoder line 8
    a = 18'(383); b = 18'(-924); a3 = 3 * a; b3 = 3 * b;
    op16 = 16'(1 << 8); op4 = 0; en = 1; first = 1;
    @(negedge clk);
    chk(int'(r16) == -3 * 383 - 3 * (-924) && int'(i16) == 3 * 383 - 3 * (-924), "16-QAM example -3+3i");
    // random 16-QAM frames of 8 symbols
    for (int k = 0; k < 64; k++) begin
      int idx, pr, pi;
      idx = $urandom_range(15);
      ref_point(16, idx, pr, pi);
      a = 18'($signed($urandom_range(2000)) - 1000);
      b = 18'($signed($urandom_range(2000)) - 1000);
      a3 = 3 * a; b3 = 3 * b;
      op16 = 16'(1 << idx);
      op4 = 0;
      en = ($urandom % 4) != 0;
      first = (k % 8 == 0);
      if (en) begin
        if (first) begin er16 = 0; ei16 = 0; end
        er16 += pr * int'(a) - pi * int'(b);
        ei16 += pr * int'(b) + pi * int'(a);
      end
      @(negedge clk);
      chk(int'(r16) == er16 && int'(i16) == ei16, $sformatf("16qam step %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
