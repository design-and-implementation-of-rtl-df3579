// tb_sp_dff: checks the serial-to-parallel D-FF chain for BPSK, QPSK and
// 16-QAM.  Random bits are offered with random gaps; a software shift model
// predicts when a symbol is complete and which bits it holds (first bit in
// bit 0).  Also checks that symbols are only announced on the last bit.
module tb_sp_dff;
  logic clk = 0, rst_n = 0;
  logic bit_in, bit_fire;
  logic [0:0] idx2;  logic v2;
  logic [1:0] idx4;  logic v4;
  logic [3:0] idx16; logic v16;
  int checks = 0, failures = 0;
  int syms = 0;

  always #5 clk = ~clk;

  sp_dff #(.M(2))  u2  (.clk, .rst_n, .bit_in, .bit_fire, .sym_idx(idx2),  .sym_valid(v2));
  sp_dff #(.M(4))  u4  (.clk, .rst_n, .bit_in, .bit_fire, .sym_idx(idx4),  .sym_valid(v4));
  sp_dff #(.M(16)) u16 (.clk, .rst_n, .bit_in, .bit_fire, .sym_idx(idx16), .sym_valid(v16));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n4 = 0, n16 = 0;
    logic [3:0] h = '0;    // history, newest bit at the top
    bit_in = 0; bit_fire = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      bit_in   = 1'($urandom);
      bit_fire = ($urandom % 4) != 0;
      #1;
      if (bit_fire) begin
        logic [3:0] nh;
        nh = {bit_in, h[3:1]};
        chk(v2 == 1'b1 && idx2 == bit_in, "bpsk symbol");
        chk(v4 == (n4 == 1), "qpsk valid");
        if (n4 == 1) begin chk(idx4 == nh[3:2], "qpsk bits"); syms++; end
        chk(v16 == (n16 == 3), "16qam valid");
        if (n16 == 3) chk(idx16 == nh, "16qam bits");
        h   = nh;
        n4  = (n4 + 1) % 2;
        n16 = (n16 + 1) % 4;
      end else begin
        chk(!v2 && !v4 && !v16, "no symbol without a bit");
      end
    end
    chk(syms > 50, "enough symbols");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
