// tb_ofdm_tx_qam16: the 16-QAM mapper with the scaled twiddle ROMs (3a,
// 3b), 16-point IDFT, 18-bit words (|x| <= 16 * 3 * (1000 + 1000)), run
// end to end for eight frames.
module tb_ofdm_tx_qam16;
  tb_ofdm_tx_run #(.N(16), .M(16), .CP(4), .P(18), .FRAMES(8)) run ();

  initial begin
    wait (run.done);
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures);
    $finish;
  end
endmodule
