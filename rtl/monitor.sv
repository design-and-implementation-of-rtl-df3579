// monitor: on-board display of IDFT results.
//
// The switch word selects one element of the last transmitted frame: the
// low log2(N) switches give the element index (SW0..SW3 for N = 16), the
// next switch chooses the imaginary (1) or the real (0) part.  The selected
// P-bit two's complement value is shown on the red LEDs (LEDR0..LEDR14 for
// P = 15), registered once per clock.  The switch and LED assignment
// follows the described board test; the use of the top switch for the
// real/imaginary choice is this design's own.
module monitor #(
  parameter int N = 16,
  parameter int P = 15,
  localparam int AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AW:0]         sw,
  input  logic signed [P-1:0] frame_re [N],
  input  logic signed [P-1:0] frame_im [N],
  output logic [P-1:0]        ledr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ledr <= '0;
    else if (sw[AW])  ledr <= frame_im[sw[AW-1:0]];
    else              ledr <= frame_re[sw[AW-1:0]];
  end

endmodule
