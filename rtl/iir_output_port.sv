// iir_output_port: the output side of the time-multiplexed filter.
//
// The output term k*S that the operation part forms for the channel now in
// the datapath is steered by the demultiplexer into that channel's output
// flip-flop, selected by the channel code (the counter value delayed one
// clock, i.e. the code that travels with the registered input sample). y[c]
// therefore changes at the clock edge after channel c's sample was
// registered at the input, two clocks after the counter selected channel c,
// and keeps its value until the channel is processed again. y_upd[c] is high
// for the one clock in which y[c] has just been loaded.
//
// Demultiplexer and three output flip-flops follow the design description
// (flip-flop type, where the output flip-flops take the place of a separate
// output register). The y_upd strobe and the reset to zero are this design's
// choices.
module iir_output_port #(
  parameter int NUM_CH = iir_pkg::IIR_NUM_CH,
  parameter int W_IN   = iir_pkg::IIR_W_IN
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [W_IN-1:0]              y_pre,
  input  logic [NUM_CH-1:0]            ch_q,
  output logic [NUM_CH-1:0][W_IN-1:0]  y,
  output logic [NUM_CH-1:0]            y_upd
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y     <= '0;
      y_upd <= '0;
    end else begin
      y_upd <= ch_q;
      for (int c = 0; c < NUM_CH; c++) begin
        if (ch_q[c]) y[c] <= y_pre;
      end
    end
  end

endmodule
