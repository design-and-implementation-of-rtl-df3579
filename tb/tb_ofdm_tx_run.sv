// tb_ofdm_tx_run: configurable end-to-end check of ofdm_tx_top, used by
// the configuration testbenches (BPSK 256-point, 16-QAM).
//
// Random frames of N*log2(M) bits are sent with random idle cycles; every
// output symbol must be the reference IDFT (compared modulo 2^P, since the
// accumulators wrap) as x(N-CP..N-1), x(0..N-1).  The sink applies random
// back-pressure.  When all frames are out it checks the counts of stalls,
// back-pressure cycles and prefix samples and raises done; the wrapping
// testbench prints the result and ends the simulation.  It also raises
// done, with a failure, if the frames do not come out in time.
module tb_ofdm_tx_run #(
  parameter int N = 16,
  parameter int M = 4,
  parameter int CP = 4,
  parameter int P = 15,
  parameter int FRAMES = 4
) ();
  import tb_ref_pkg::*;
  localparam int K = (M > 2) ? $clog2(M) : 1;

  logic clk = 0, rst_n = 0;
  logic bit_in, bit_valid, bit_ready;
  logic out_valid, out_ready, out_sof, out_cp, frame_done, stall;
  logic signed [P-1:0] out_re, out_im;
  logic [$clog2(N):0] sw;
  logic [P-1:0] ledr;
  int checks = 0, failures = 0;
  bit done = 0;
  int n_stall = 0, n_bp = 0, n_cp = 0, frames_out = 0;
  longint q_re [$];
  longint q_im [$];
  bit src_done = 0;

  always #5 clk = ~clk;

  ofdm_tx_top #(.N(N), .M(M), .CP(CP), .P(P)) dut (.clk, .rst_n, .bit_in, .bit_valid,
    .bit_ready, .out_valid, .out_ready, .out_re, .out_im, .out_sof, .out_cp, .frame_done,
    .stall, .sw, .ledr);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s", what);
    if (!ok) failures++;
  endtask

  initial begin
    int sre[], sim[], idx[];
    sre = new[N]; sim = new[N]; idx = new[N];
    bit_in = 0; bit_valid = 0; sw = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int k = 0; k < N; k++) begin
        idx[k] = $urandom_range(M - 1);
        ref_point(M, idx[k], sre[k], sim[k]);
      end
      for (int n = 0; n < N; n++) begin
        longint xr, xi;
        ref_idft(N, n, sre, sim, xr, xi);
        q_re.push_back(xr); q_im.push_back(xi);
      end
      for (int k = 0; k < N; k++)
        for (int i = 0; i < K; i++) begin
          @(negedge clk);
          while (($urandom % 6) == 0) begin bit_valid = 0; @(negedge clk); end
          bit_valid = 1; bit_in = 1'((idx[k] >> i) & 1);
          #2;
          while (!bit_ready) begin n_stall++; @(negedge clk); #2; end
          @(posedge clk);
        end
      @(negedge clk);
      bit_valid = 0;
    end
    src_done = 1;
  end

  initial begin
    automatic int j = 0;
    out_ready = 0;
    forever begin
      @(negedge clk);
      #1;
      out_ready = ($urandom % 4) != 0;
      if (out_valid && !out_ready) n_bp++;
      #1;
      if (out_valid && out_ready) begin
        int src;
        src = (j < CP) ? N - CP + j : j - CP;
        if (out_cp) n_cp++;
        if (q_re.size() < N) chk(0, "sample without a frame");
        else chk(out_re == P'(q_re[src]) && out_im == P'(q_im[src]) && out_sof == (j == 0)
                 && out_cp == (j < CP), $sformatf("frame %0d sample %0d", frames_out, j));
        j++;
        if (j == N + CP) begin
          j = 0; frames_out++;
          for (int n = 0; n < N; n++) begin void'(q_re.pop_front()); void'(q_im.pop_front()); end
        end
      end
    end
  end

  initial begin
    wait (src_done && frames_out == FRAMES);
    $display("N=%0d M=%0d P=%0d: frames=%0d stalls=%0d backpressure=%0d prefix=%0d",
             N, M, P, frames_out, n_stall, n_bp, n_cp);
    chk(n_cp == FRAMES * CP, "prefix samples");
    chk(n_bp > 0, "back-pressure happened");
    chk(n_stall > 0 || M > 2, "stall happened");
    done = 1;
  end

  initial begin
    repeat (FRAMES * (N * K * 4 + (N + CP) * 8) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    done = 1;
  end
endmodule
