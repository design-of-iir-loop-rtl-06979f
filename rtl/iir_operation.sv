// iir_operation: the arithmetic of the loop, shared by all channels.
//
// From the stored state R of the channel now in the datapath and its new
// sample X it forms
//     fb_term = k*R            (feedback coefficient multiplier)
//     s       = X + (R - fb_term)
//     y_pre   = k*s            (output coefficient multiplier)
// so that s is the channel's next state and y_pre its next output. Both
// multipliers are iir_fil_coeff instances (shifts and adds) using the same
// select. The subtraction cannot go negative because k*R <= R, and s never
// exceeds W_ACC bits: R - k*R + X stays below 2**W_ACC for any R below it.
//
// Structure (adder, subtracter, two shift-add multipliers, 20-bit state,
// 12-bit feedback term) follows the design description. Purely
// combinational.
module iir_operation
  import iir_pkg::*;
#(
  parameter int W_IN  = iir_pkg::IIR_W_IN,
  parameter int W_ACC = iir_pkg::IIR_W_ACC
) (
  input  logic [W_IN-1:0]  x_q,
  input  logic [W_ACC-1:0] fb,
  input  sel_t             sel,
  output logic [W_ACC-1:0] s,
  output logic [W_IN-1:0]  y_pre
);

  logic [W_IN-1:0]  fb_term;
  logic [W_ACC-1:0] leak;  // R - k*R

  iir_fil_coeff #(.W_ACC(W_ACC), .W_OUT(W_IN)) u_coeff_fb (
    .acc(fb), .sel(sel), .y(fb_term)
  );

  assign leak = fb - W_ACC'(fb_term);
  assign s    = leak + W_ACC'(x_q);

  iir_fil_coeff #(.W_ACC(W_ACC), .W_OUT(W_IN)) u_coeff_out (
    .acc(s), .sel(sel), .y(y_pre)
  );

endmodule
