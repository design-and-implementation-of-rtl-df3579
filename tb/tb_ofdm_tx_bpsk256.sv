// tb_ofdm_tx_bpsk256: the comparison configuration, a 256-point IDFT with
// a BPSK mapper and 16-bit words, run end to end for three frames.  With
// BPSK a frame takes 256 input bits but 260 output samples, so the input
// must stall whenever the output is busy.
module tb_ofdm_tx_bpsk256;
  tb_ofdm_tx_run #(.N(256), .M(2), .CP(4), .P(16), .FRAMES(3)) run ();

  initial begin
    wait (run.done);
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures);
    $finish;
  end
endmodule
