// iir_input_port: the input side of the time-multiplexed filter.
//
// A one-hot channel counter (Count) steps through the NUM_CH inputs, one per
// clock; its control (Count_ctrl) starts a sweep when `start` is high while
// the counter is idle or on its last channel, and otherwise returns it to
// idle (all zeros) after the last channel. Holding `start` high therefore
// gives back-to-back sweeps, one sample per clock. The counter drives the
// input multiplexer, and the picked sample and the counter value are
// registered (x_q, ch_q) for the operation part one clock later.
//
// The counter, its control, the multiplexer and the registers on the sample
// and on the 3-bit channel code follow the design description. The one-hot
// code with an idle state, the start rule and the reset are this design's
// choices.
//
// Interface: x packs the inputs, x[c] is channel c. cnt is the current
// counter value (it also selects which stored state the register area reads
// this clock); ch_q and x_q are cnt and x[cnt] delayed by one clock.
module iir_input_port #(
  parameter int NUM_CH = iir_pkg::IIR_NUM_CH,
  parameter int W_IN   = iir_pkg::IIR_W_IN
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [NUM_CH-1:0][W_IN-1:0]  x,
  output logic [NUM_CH-1:0]            cnt,
  output logic [W_IN-1:0]              x_q,
  output logic [NUM_CH-1:0]            ch_q
);

  logic [NUM_CH-1:0] cnt_next;
  logic [W_IN-1:0]   x_mux;

  // Count_ctrl
  always_comb begin
    if (cnt == '0 || cnt[NUM_CH-1]) cnt_next = start ? NUM_CH'(1) : '0;
    else                            cnt_next = cnt << 1;
  end

  // Count
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt_next;
  end

  // Input multiplexer, one-hot select
  always_comb begin
    x_mux = '0;
    for (int c = 0; c < NUM_CH; c++) begin
      if (cnt[c]) x_mux = x_mux | x[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q  <= '0;
      ch_q <= '0;
    end else begin
      x_q  <= x_mux;
      ch_q <= cnt;
    end
  end

  a_cnt_onehot0 : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cnt));

endmodule
