// tb_cp_ps: cyclic prefix and parallel-to-serial output.  Loads random
// frames, drains them with random back-pressure and checks that each
// symbol is x(12..15) then x(0..15) with out_sof/out_cp marks, that the
// first sample is valid the cycle after the load, that a new frame can be
// loaded in the cycle the last sample leaves (no gap), and that can_load is
// low while a frame is being sent.
module tb_cp_ps;
  logic clk = 0, rst_n = 0;
  logic load, can_load, out_valid, out_ready, out_sof, out_cp;
  logic signed [14:0] x_re [16];
  logic signed [14:0] x_im [16];
  logic signed [14:0] out_re, out_im;
  logic signed [14:0] frame_re [16];
  logic signed [14:0] frame_im [16];
  int checks = 0, failures = 0;
  int backpressure = 0, back_to_back = 0;

  always #5 clk = ~clk;

  cp_ps #(.N(16), .CP(4), .P(15)) dut (.clk, .rst_n, .load, .x_re, .x_im, .can_load,
    .out_valid, .out_ready, .out_re, .out_im, .out_sof, .out_cp, .frame_re, .frame_im);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic signed [14:0] ref_re [16], ref_im [16];
    load = 0; out_ready = 0;
    foreach (x_re[i]) begin x_re[i] = 0; x_im[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!out_valid && can_load, "idle after reset");
    for (int f = 0; f < 8; f++) begin
      automatic int j = 0;
      foreach (x_re[i]) begin x_re[i] = 15'($urandom); x_im[i] = 15'($urandom); end
      ref_re = x_re; ref_im = x_im;
      // load (the previous frame has already left)
      load = 1;
      chk(can_load, "can_load before load");
      @(negedge clk);
      load = 0;
      foreach (x_re[i]) begin x_re[i] = 15'($urandom); x_im[i] = 15'($urandom); end
      chk(out_valid, "first sample the cycle after load");
      while (j < 20) begin
        int src;
        out_ready = ($urandom % 3) != 0 || f == 0;
        if (!out_ready) backpressure++;
        #1;
        src = (j < 4) ? 12 + j : j - 4;
        chk(out_valid && out_re == ref_re[src] && out_im == ref_im[src], $sformatf("frame %0d sample %0d", f, j));
        chk(out_sof == (j == 0) && out_cp == (j < 4), "sof/cp marks");
        if (j < 19) chk(!can_load, "busy");
        if (out_ready) begin
          if (j == 19) begin
            chk(can_load, "load allowed on last sample");
            if (f % 2 == 1) begin
              // try a back-to-back load of a new frame
              load = 1;
              back_to_back++;
            end
          end
          j++;
        end
        @(negedge clk);
        load = 0;
      end
      if (f % 2 == 1) begin
        chk(out_valid && out_sof, "back-to-back frame started");
        // drain it
        for (int s = 0; s < 20; s++) begin out_ready = 1; @(negedge clk); end
      end
      out_ready = 0;
      chk(!out_valid, "idle after frame");
      for (int n = 0; n < 16; n++)
        chk(frame_re[n] == ref_re[n] || f % 2 == 1, "frame kept for monitor");
    end
    chk(backpressure > 0 && back_to_back > 0, "mechanisms exercised");
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
