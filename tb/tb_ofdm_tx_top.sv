// tb_ofdm_tx_top: end-to-end test of the transmitter at its default size
// (QPSK, N = 16, cyclic prefix 4, 15-bit words).
//
// A bit source sends frames of 32 bits with random idle cycles; the first
// frame is the published test frame, whose 16 results must match the
// published 15-bit words exactly.  Every later frame is random and checked
// against the reference IDFT.  The sample sink applies random back-pressure
// with occasional long blocks, which forces the input stall.  Each OFDM
// symbol must arrive as x(12..15), x(0..15) with the start and prefix
// marks.  When the output is idle, the first sample of a frame must be
// valid in the cycle after the frame's last bit.  The LED monitor is read
// for real and imaginary parts of the last frame.  Counts of every
// mechanism (stall, back-pressure, prefix samples, each decoder case,
// monitor reads, minimum latency) must be non-zero.
module tb_ofdm_tx_top;
  import tb_ref_pkg::*;
  localparam int N = 16, CP = 4, FRAMES = 40;

  logic clk = 0, rst_n = 0;
  logic bit_in, bit_valid, bit_ready;
  logic out_valid, out_ready, out_sof, out_cp, frame_done, stall;
  logic signed [14:0] out_re, out_im;
  logic [4:0] sw;
  logic [14:0] ledr;
  int checks = 0, failures = 0;
  int n_stall = 0, n_bp = 0, n_cp = 0, n_lat = 0, n_mon_re = 0, n_mon_im = 0;
  int n_case [4] = '{0, 0, 0, 0};
  int frames_out = 0;

  always #5 clk = ~clk;

  ofdm_tx_top dut (.clk, .rst_n, .bit_in, .bit_valid, .bit_ready, .out_valid, .out_ready,
    .out_re, .out_im, .out_sof, .out_cp, .frame_done, .stall, .sw, .ledr);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected frames in transmission order, N words per frame
  longint q_re [$];
  longint q_im [$];
  longint last_re [N], last_im [N];
  int last_bit_cycle = -10;  // cycle in which the last bit of a frame was accepted
  bit out_idle_at_last = 0;
  int cycle = 0;
  bit src_done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // bit source
  initial begin
    int sre[N], sim[N];
    logic [14:0] rre[16], rim[16];
    bit_in = 0; bit_valid = 0;
    paper_result(rre, rim);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      longint fr [N], fi [N];
      if (f == 0) paper_frame(sre, sim);
      else for (int k = 0; k < N; k++) ref_point(4, $urandom_range(3), sre[k], sim[k]);
      for (int n = 0; n < N; n++) ref_idft(N, n, sre, sim, fr[n], fi[n]);
      if (f == 0)
        for (int n = 0; n < N; n++)
          chk(15'(fr[n]) == rre[n] && 15'(fi[n]) == rim[n], "reference reproduces published frame");
      for (int n = 0; n < N; n++) begin q_re.push_back(fr[n]); q_im.push_back(fi[n]); end
      for (int k = 0; k < N; k++) begin
        int bits;
        bits = qpsk_bits(sre[k], sim[k]);
        n_case[bits]++;
        for (int i = 0; i < 2; i++) begin
          // first bit is In1 (bit 0 of the decoder input), second In2
          @(negedge clk);
          while (f > 2 && ($urandom % 5) == 0) begin bit_valid = 0; @(negedge clk); end
          bit_valid = 1; bit_in = bits[i];
          #2;
          while (!bit_ready) begin
            n_stall++;
            @(negedge clk); #2;
          end
          @(posedge clk);
          #1;
          if (k == N - 1 && i == 1) begin
            last_bit_cycle = cycle;
            out_idle_at_last = !out_valid;
          end
        end
      end
      @(negedge clk);
      bit_valid = 0;
    end
    src_done = 1;
  end

  // sample sink
  initial begin
    automatic int j = 0;
    out_ready = 0; sw = 0;
    forever begin
      @(negedge clk);
      #1;
      if (($urandom % 150) == 0) out_ready = 0;
      else if (!out_ready) out_ready = ($urandom % 30) == 0;
      else out_ready = ($urandom % 6) != 0;
      if (out_valid && !out_ready) n_bp++;
      #1;
      if (out_idle_at_last && cycle == last_bit_cycle + 1) begin
        chk(out_valid && out_sof, "first sample one cycle after last bit");
        n_lat++;
      end
      if (out_valid && out_ready) begin
        int src;
        src = (j < CP) ? N - CP + j : j - CP;
        if (out_cp) n_cp++;
        chk(q_re.size() > 0, "sample without a frame");
        if (q_re.size() > 0)
          chk(out_re == 15'(q_re[src]) && out_im == 15'(q_im[src]) && out_sof == (j == 0)
              && out_cp == (j < CP), $sformatf("frame %0d sample %0d", frames_out, j));
        j++;
        if (j == N + CP) begin
          j = 0; frames_out++;
          for (int n = 0; n < N; n++) begin last_re[n] = q_re.pop_front(); last_im[n] = q_im.pop_front(); end
        end
      end
    end
  end

  initial begin
    wait (src_done && frames_out == FRAMES);
    // monitor: every element, real and imaginary
    for (int s = 0; s < 32; s++) begin
      @(negedge clk); sw = 5'(s);
      @(negedge clk);
      chk(ledr == (s >= 16 ? 15'(last_im[s % 16]) : 15'(last_re[s % 16])), $sformatf("monitor sw=%0d", s));
      if (s >= 16) n_mon_im++; else n_mon_re++;
    end
    $display("stalls=%0d backpressure=%0d prefix=%0d min_latency=%0d cases=%0d/%0d/%0d/%0d frames=%0d",
             n_stall, n_bp, n_cp, n_lat, n_case[0], n_case[1], n_case[2], n_case[3], frames_out);
    chk(n_stall > 0, "stall happened");
    chk(n_bp > 0, "back-pressure happened");
    chk(n_cp == FRAMES * CP, "prefix samples");
    chk(n_lat > 0, "one-cycle latency observed");
    chk(n_case[0] > 0 && n_case[1] > 0 && n_case[2] > 0 && n_case[3] > 0, "all decoder cases");
    chk(n_mon_re > 0 && n_mon_im > 0, "monitor read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
