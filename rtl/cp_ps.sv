// cp_ps: cyclic prefix adder and parallel-to-serial converter.
//
// On load the N IDFT results are copied into a frame buffer, which frees
// the cumulative adder blocks for the next frame.  The buffer is then sent
// one complex sample per accepted cycle as N+CP samples: first the last CP
// samples x(N-CP) .. x(N-1) (the cyclic prefix), then x(0) .. x(N-1).
//
// Output stream: out_valid/out_ready handshake; out_sof marks the first
// sample of an OFDM symbol, out_cp the prefix samples.  can_load is high
// when a load in this cycle is allowed (buffer idle, or its last sample is
// leaving now).  The buffer keeps the last frame after it is sent; frame_re
// and frame_im expose it for the result monitor.  Transmission order and
// prefix content follow standard OFDM practice; the handshake and the
// buffering are this design's choices.
module cp_ps #(
  parameter int N  = 16,
  parameter int CP = 4,
  parameter int P  = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [P-1:0] x_re [N],
  input  logic signed [P-1:0] x_im [N],
  output logic                can_load,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [P-1:0] out_re,
  output logic signed [P-1:0] out_im,
  output logic                out_sof,
  output logic                out_cp,
  output logic signed [P-1:0] frame_re [N],
  output logic signed [P-1:0] frame_im [N]
);
  localparam int L  = N + CP;
  localparam int CW = $clog2(L);

  logic [CW-1:0]         j;      // position inside the N+CP sample symbol
  logic [$clog2(N)-1:0]  sel;    // buffer index of that position
  logic                  last;

  always_comb begin
    if (int'(j) < CP) sel = $clog2(N)'(int'(j) + N - CP);
    else              sel = $clog2(N)'(int'(j) - CP);
  end

  assign last     = (int'(j) == L - 1);
  assign can_load = !out_valid || (out_ready && last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      j         <= '0;
      for (int i = 0; i < N; i++) begin
        frame_re[i] <= '0;
        frame_im[i] <= '0;
      end
    end else if (load && can_load) begin
      frame_re  <= x_re;
      frame_im  <= x_im;
      out_valid <= 1'b1;
      j         <= '0;
    end else if (out_valid && out_ready) begin
      if (last) begin
        out_valid <= 1'b0;
        j         <= '0;
      end else begin
        j <= j + 1'b1;
      end
    end
  end

  assign out_re  = frame_re[sel];
  assign out_im  = frame_im[sel];
  assign out_sof = out_valid && (j == '0);
  assign out_cp  = out_valid && (int'(j) < CP);

endmodule
