// control_unit: sequencing of the transmitter.
//
// It counts the symbols of a frame and drives the common ROM address (the
// symbol index k) and the "first" strobe that restarts the cumulative adder
// blocks, detects the end of a frame, and hands the finished results to the
// cyclic prefix adder / parallel-to-serial converter (cp_ps), which it
// contains.  It also manages the start of transmission through the input
// handshake: bit_ready drops while a finished frame is still in the
// accumulators and the output buffer cannot take it yet, so no result is
// overwritten (a stall).
//
// Timing: the symbol completing a frame is accumulated at a clock edge;
// frame_done is high in the next cycle, and the frame is copied into cp_ps
// in that cycle when cp_ps can take it, so its first output sample is
// valid one cycle after the last input bit.  The described control unit
// also generates the clock; here a single clock comes from outside.  The
// handshake, the counter and the overlap of input and output are this
// design's choices.
module control_unit #(
  parameter int N  = 16,
  parameter int CP = 4,
  parameter int P  = 15,
  localparam int AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  // symbol strobe from the serial-to-parallel converter
  input  logic                sym_valid,
  output logic                bit_ready,
  // control of the cumulative adder blocks
  output logic [AW-1:0]       addr,
  output logic                first,
  input  logic signed [P-1:0] x_re [N],
  input  logic signed [P-1:0] x_im [N],
  output logic                frame_done,
  // serial output with cyclic prefix
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [P-1:0] out_re,
  output logic signed [P-1:0] out_im,
  output logic                out_sof,
  output logic                out_cp,
  output logic signed [P-1:0] frame_re [N],
  output logic signed [P-1:0] frame_im [N],
  output logic                stall
);

  logic acc_full;   // accumulators hold a finished, not yet copied frame
  logic can_load;
  logic load;

  assign load       = acc_full && can_load;
  assign bit_ready  = !acc_full || can_load;
  assign stall      = !bit_ready;
  assign first      = (addr == '0);
  assign frame_done = acc_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr     <= '0;
      acc_full <= 1'b0;
    end else begin
      if (sym_valid) addr <= (int'(addr) == N - 1) ? '0 : addr + 1'b1;
      if (sym_valid && int'(addr) == N - 1) acc_full <= 1'b1;
      else if (load)                        acc_full <= 1'b0;
    end
  end

  cp_ps #(.N(N), .CP(CP), .P(P)) u_cp_ps (
    .clk(clk), .rst_n(rst_n), .load(load), .x_re(x_re), .x_im(x_im),
    .can_load(can_load), .out_valid(out_valid), .out_ready(out_ready),
    .out_re(out_re), .out_im(out_im), .out_sof(out_sof), .out_cp(out_cp),
    .frame_re(frame_re), .frame_im(frame_im)
  );

  // A symbol may only complete a frame while the previous one is not
  // waiting in the accumulators.
  always_comb
    if (rst_n && sym_valid)
      assert final (bit_ready) else $error("symbol accepted while bit_ready was low");

endmodule
