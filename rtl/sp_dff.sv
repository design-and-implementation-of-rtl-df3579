// sp_dff: serial-to-parallel converter in front of the mapper decoder.
//
// Serial data bits arrive one per accepted cycle (bit_fire).  A chain of
// log2(M)-1 D flip-flops keeps the earlier bits of the current symbol; when
// the last bit of a symbol arrives, the stored bits and the arriving bit are
// presented together on sym_idx and sym_valid is raised for that same cycle,
// so the decoder is enabled once every log2(M) bits (every second bit for
// QPSK, every bit for BPSK, where no flip-flop is needed).
//
// Bit order: the first bit of a symbol ends up in sym_idx[0] (decoder input
// In1, the D-FF output Q), the last in sym_idx[K-1] (In2, the bit still in
// front of the D-FF).  The number of flip-flops and the combinational decode
// of the arriving bit follow the described circuit; the small bit counter
// that marks symbol boundaries and the asynchronous active-low reset are
// this design's choices.
//
// Timing: sym_idx/sym_valid are combinational from bit_in/bit_fire; the
// flip-flop chain and the counter update on the rising clock edge.
module sp_dff #(
  parameter int M = 4,                      // constellation size (2, 4, 16)
  localparam int K = (M > 2) ? $clog2(M) : 1 // bits per symbol
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_in,    // serial data bit
  input  logic         bit_fire,  // bit_in is transferred this cycle
  output logic [K-1:0] sym_idx,   // {last bit, ..., first bit}
  output logic         sym_valid  // sym_idx is a complete symbol this cycle
);

  generate
    if (K == 1) begin : g_bpsk
      assign sym_idx   = bit_in;
      assign sym_valid = bit_fire;
    end else begin : g_chain
      logic [K-2:0]         q;    // D-FF chain, q[0] holds the oldest bit
      logic [$clog2(K)-1:0] pos;  // bit position inside the symbol

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          q   <= '0;
          pos <= '0;
        end else if (bit_fire) begin
          for (int i = 0; i < K - 2; i++) q[i] <= q[i+1];
          q[K-2] <= bit_in;
          pos <= (int'(pos) == K - 1) ? '0 : pos + 1'b1;
        end
      end

      assign sym_idx   = {bit_in, q};
      assign sym_valid = bit_fire && (int'(pos) == K - 1);
    end
  endgenerate

endmodule
