// tb_monitor: every switch setting selects the right element and part of
// the frame, shown on the LEDs one clock later.
module tb_monitor;
  logic clk = 0, rst_n = 0;
  logic [4:0] sw;
  logic signed [14:0] frame_re [16];
  logic signed [14:0] frame_im [16];
  logic [14:0] ledr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  monitor #(.N(16), .P(15)) dut (.clk, .rst_n, .sw, .frame_re, .frame_im, .ledr);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (frame_re[i]) begin frame_re[i] = 15'($urandom); frame_im[i] = 15'($urandom); end
    sw = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    chk(ledr == 0, "dark in reset");
    rst_n = 1;
    for (int r = 0; r < 3; r++)
      for (int s = 0; s < 32; s++) begin
        sw = 5'(s);
        @(negedge clk);
        chk(ledr == (s >= 16 ? frame_im[s % 16] : frame_re[s % 16]), $sformatf("sw=%0d", s));
        frame_re[$urandom_range(15)] = 15'($urandom);
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
