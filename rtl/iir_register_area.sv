// iir_register_area: per-channel state storage of the time-multiplexed loop.
//
// One W_ACC-bit flip-flop per channel holds that channel's state S. The new
// state from the operation part is demultiplexed into the flip-flop whose bit
// is set in wr_ch (the channel code delayed by one clock). In the same clock
// the multiplexer reads the flip-flop named by rd_ch (the current counter
// value) into the pipeline flip-flop fb, so the state of the next channel is
// ready when its sample reaches the operation part. A channel is written two
// clocks after it was read and read again NUM_CH clocks after that, so
// NUM_CH >= 2 is required.
//
// Demultiplexer, three flip-flops, multiplexer and output flip-flop follow
// the design description (flip-flop type). Reset to zero and reading zero
// while the counter is idle are this design's choices.
//
// Interface: s is the new state, wr_ch and rd_ch are one-hot (or zero), fb is
// the registered state, valid one clock after rd_ch.
module iir_register_area #(
  parameter int NUM_CH = iir_pkg::IIR_NUM_CH,
  parameter int W_ACC  = iir_pkg::IIR_W_ACC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [W_ACC-1:0]   s,
  input  logic [NUM_CH-1:0]  wr_ch,
  input  logic [NUM_CH-1:0]  rd_ch,
  output logic [W_ACC-1:0]   fb
);

  logic [NUM_CH-1:0][W_ACC-1:0] state;
  logic [W_ACC-1:0]             rd_mux;

  // Demultiplexer and per-channel flip-flops
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
    end else begin
      for (int c = 0; c < NUM_CH; c++) begin
        if (wr_ch[c]) state[c] <= s;
      end
    end
  end

  // Multiplexer and pipeline flip-flop
  always_comb begin
    rd_mux = '0;
    for (int c = 0; c < NUM_CH; c++) begin
      if (rd_ch[c]) rd_mux = rd_mux | state[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fb <= '0;
    else        fb <= rd_mux;
  end

  initial begin
    assert (NUM_CH >= 2) else $error("iir_register_area: NUM_CH must be at least 2");
  end

endmodule
