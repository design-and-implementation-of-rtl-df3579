// ofdm_tx_top: multiplier-free OFDM transmitter.
//
// Data path: serial bits -> sp_dff (serial-to-parallel D-FFs) ->
// mapper_decoder (one-hot constellation case) -> idft_cab_array (N
// cumulative adder blocks with their twiddle ROMs, together the IDFT) ->
// control_unit (symbol counting, addresses, cyclic prefix and
// parallel-to-serial output) -> serial complex samples.  A monitor shows
// any element of the last frame on the LEDs.
//
// Defaults are the implemented configuration: QPSK (M = 4), N = 16,
// cyclic prefix 4, 15-bit results in decimal fixed point (value * 1000).
//
// Interface: bit_in/bit_valid/bit_ready input handshake (one bit per
// cycle at most); out_* sample stream with out_ready back-pressure; sw/ledr
// for the monitor.  A frame of N*log2(M) bits yields N+CP samples, the
// first one valid in the cycle after the frame's last bit was accepted.
module ofdm_tx_top #(
  parameter int N  = 16,
  parameter int M  = 4,
  parameter int CP = 4,
  parameter int P  = 15,
  localparam int K  = (M > 2) ? $clog2(M) : 1,
  localparam int AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  // serial data input
  input  logic                bit_in,
  input  logic                bit_valid,
  output logic                bit_ready,
  // OFDM sample output (towards the DAC)
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [P-1:0] out_re,
  output logic signed [P-1:0] out_im,
  output logic                out_sof,
  output logic                out_cp,
  output logic                frame_done,
  output logic                stall,
  // board monitor
  input  logic [AW:0]         sw,
  output logic [P-1:0]        ledr
);

  logic                bit_fire;
  logic [K-1:0]        sym_idx;
  logic                sym_valid;
  logic [M-1:0]        op;
  logic [AW-1:0]       addr;
  logic                first;
  logic signed [P-1:0] x_re [N];
  logic signed [P-1:0] x_im [N];
  logic signed [P-1:0] frame_re [N];
  logic signed [P-1:0] frame_im [N];

  assign bit_fire = bit_valid && bit_ready;

  sp_dff #(.M(M)) u_sp (
    .clk(clk), .rst_n(rst_n), .bit_in(bit_in), .bit_fire(bit_fire),
    .sym_idx(sym_idx), .sym_valid(sym_valid)
  );

  mapper_decoder #(.M(M)) u_dec (
    .idx(sym_idx), .en(sym_valid), .op(op)
  );

  idft_cab_array #(.N(N), .M(M), .P(P)) u_idft (
    .clk(clk), .rst_n(rst_n), .en(sym_valid), .first(first), .op(op),
    .addr(addr), .x_re(x_re), .x_im(x_im)
  );

  control_unit #(.N(N), .CP(CP), .P(P)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .sym_valid(sym_valid), .bit_ready(bit_ready),
    .addr(addr), .first(first), .x_re(x_re), .x_im(x_im),
    .frame_done(frame_done), .out_valid(out_valid), .out_ready(out_ready),
    .out_re(out_re), .out_im(out_im), .out_sof(out_sof), .out_cp(out_cp),
    .frame_re(frame_re), .frame_im(frame_im), .stall(stall)
  );

  monitor #(.N(N), .P(P)) u_mon (
    .clk(clk), .rst_n(rst_n), .sw(sw), .frame_re(frame_re),
    .frame_im(frame_im), .ledr(ledr)
  );

endmodule
