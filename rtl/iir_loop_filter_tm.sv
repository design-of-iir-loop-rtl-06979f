// iir_loop_filter_tm: three-input first-order IIR loop filter on one shared,
// time-multiplexed datapath (flip-flop type).
//
// Each channel c runs the recursion
//     S_c <= X_c + S_c - k*S_c,   Y_c = k*S_c,   k = n/256 chosen by sel,
// once per sweep. A sweep is started by `start` and visits the channels in
// order, one per clock, through four parts:
//   input port     counter + multiplexer, registers X_c and the channel code
//   operation part adder, subtracter and two shift-add coefficient
//                  multipliers (feedback and output)
//   register area  per-channel 20-bit state flip-flops with demux/mux and
//                  a pipeline flip-flop that presents the next channel's state
//   output port    demux and per-channel output flip-flops
// Timing: if `start` is sampled at clock edge 0, the counter selects channel
// c (0-based) after edge c, its sample is registered at edge c+1, and at edge
// c+2 its new state is stored and y[c] loaded (y_upd[c] high): each input
// reaches its output two clocks after it is selected. With `start` held
// high, sweeps follow each other without a gap and the datapath takes one
// sample per clock. sel should be held stable during a sweep.
//
// The four-part structure, widths (12-bit samples, 20-bit state), three
// inputs and 16 coefficients follow the design description; the coefficient
// values between 1/256 and 240/256, the start protocol, the reset and the
// y_upd strobe are this design's choices.
module iir_loop_filter_tm
  import iir_pkg::*;
#(
  parameter int NUM_CH = iir_pkg::IIR_NUM_CH,
  parameter int W_IN   = iir_pkg::IIR_W_IN,
  parameter int W_ACC  = iir_pkg::IIR_W_ACC
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  sel_t                         sel,
  input  logic [NUM_CH-1:0][W_IN-1:0]  x,
  output logic [NUM_CH-1:0][W_IN-1:0]  y,
  output logic [NUM_CH-1:0]            y_upd
);

  logic [NUM_CH-1:0] cnt, ch_q;
  logic [W_IN-1:0]   x_q, y_pre;
  logic [W_ACC-1:0]  fb, s;

  iir_input_port #(.NUM_CH(NUM_CH), .W_IN(W_IN)) u_input (
    .clk, .rst_n, .start, .x, .cnt, .x_q, .ch_q
  );

  iir_operation #(.W_IN(W_IN), .W_ACC(W_ACC)) u_operation (
    .x_q, .fb, .sel, .s, .y_pre
  );

  iir_register_area #(.NUM_CH(NUM_CH), .W_ACC(W_ACC)) u_registers (
    .clk, .rst_n, .s, .wr_ch(ch_q), .rd_ch(cnt), .fb
  );

  iir_output_port #(.NUM_CH(NUM_CH), .W_IN(W_IN)) u_output (
    .clk, .rst_n, .y_pre, .ch_q, .y, .y_upd
  );

endmodule
