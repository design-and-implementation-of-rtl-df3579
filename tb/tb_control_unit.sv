// tb_control_unit: symbol counting and frame hand-over.  Symbols are
// strobed with random gaps while bit_ready allows; the testbench checks the
// ROM address sequence and the "first" strobe, frame_done in the cycle
// after a frame's 16th symbol, that the frame present in the accumulators
// at that point is what the serial output sends (prefix first), and that
// bit_ready drops (stall) while a finished frame waits for a blocked
// output.
module tb_control_unit;
  logic clk = 0, rst_n = 0;
  logic sym_valid, bit_ready, first, frame_done, stall;
  logic [3:0] addr;
  logic signed [14:0] x_re [16];
  logic signed [14:0] x_im [16];
  logic out_valid, out_ready, out_sof, out_cp;
  logic signed [14:0] out_re, out_im;
  logic signed [14:0] frame_re [16];
  logic signed [14:0] frame_im [16];
  logic sym_req;
  int checks = 0, failures = 0;

  // a symbol is only strobed while the control unit is ready, as in the top
  assign sym_valid = sym_req && bit_ready;
  int stalls = 0, frames_out = 0, done_seen = 0;

  always #5 clk = ~clk;

  control_unit #(.N(16), .CP(4), .P(15)) dut (.clk, .rst_n, .sym_valid, .bit_ready, .addr,
    .first, .x_re, .x_im, .frame_done, .out_valid, .out_ready, .out_re, .out_im, .out_sof,
    .out_cp, .frame_re, .frame_im, .stall);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected frames, queued when a frame completes
  logic signed [14:0] q_re [$][16];
  logic signed [14:0] q_im [$][16];
  int exp_addr = 0;
  bit pend = 0;      // a frame completed at the last edge

  // producer: symbols and accumulator contents
  initial begin
    sym_req = 0;
    foreach (x_re[i]) begin x_re[i] = 0; x_im[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // frame_done must follow the 16th symbol by one cycle
      if (pend) chk(frame_done, "frame_done the cycle after the 16th symbol");
      if (pend) begin
        // the accumulators now hold the finished frame
        logic signed [14:0] fr [16], fi [16];
        foreach (x_re[i]) begin x_re[i] = 15'($urandom); x_im[i] = 15'($urandom); end
        fr = x_re; fi = x_im;
        q_re.push_back(fr); q_im.push_back(fi);
        done_seen++;
      end
      pend = 0;
      chk(int'(addr) == exp_addr && first == (exp_addr == 0), $sformatf("address / first %0d %0d %0t", addr, exp_addr, $time));
      #2;  // after the consumer has set out_ready
      chk(stall == !bit_ready, "stall flag");
      if (!bit_ready) stalls++;
      sym_req = ($urandom % 4 != 0);
      #1;
      if (sym_valid) begin
        if (exp_addr == 15) pend = 1;
        exp_addr = (exp_addr + 1) % 16;
      end
    end
    chk(stalls > 0 && frames_out >= 10 && done_seen >= 10, "mechanisms exercised");
    $display("stalls=%0d frames=%0d", stalls, frames_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: random back-pressure, long blocks from time to time
  initial begin
    automatic int j = 0;
    out_ready = 0;
    forever begin
      @(negedge clk);
      #1;
      if (($urandom % 200) == 0) out_ready = 0;
      else if (($urandom % 10) == 0) out_ready = 1;
      else if (!out_ready && ($urandom % 40) == 0) out_ready = 1;
      #1;
      if (out_valid && out_ready) begin
        int src;
        src = (j < 4) ? 12 + j : j - 4;
        chk(q_re.size() > 0, "output without a finished frame");
        if (q_re.size() > 0)
          chk(out_re == q_re[0][src] && out_im == q_im[0][src] && out_sof == (j == 0)
              && out_cp == (j < 4), $sformatf("sample %0d", j));
        j++;
        if (j == 20) begin
          j = 0; frames_out++;
          void'(q_re.pop_front()); void'(q_im.pop_front());
        end
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
