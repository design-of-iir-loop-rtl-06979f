// iir_fil_coeff: multiply a loop accumulator value by the selected
// coefficient k = n/256, without a multiplier.
//
// For each of the 16 table entries the product acc*n is formed as the sum of
// acc shifted left by the positions of the set bits of n (at most four terms
// with the table in iir_pkg). The select picks one product, the result is
// shifted right by 8 (divide by 256, rounding toward zero) and clipped to the
// largest W_OUT-bit value.
//
// The shift-and-add coefficient multiplexer follows the design description;
// the truncating division and the clip are this design's choices. With a
// constant select the loop never reaches the clip (the state stays below
// 2**W_OUT/k); it only matters right after the select has been raised, where
// it keeps the 12-bit feedback and output terms meaningful.
//
// Interface: acc (W_ACC bits, unsigned), sel (coefficient index), y
// (W_OUT bits, unsigned). Purely combinational.
module iir_fil_coeff
  import iir_pkg::*;
#(
  parameter int W_ACC = iir_pkg::IIR_W_ACC,
  parameter int W_OUT = iir_pkg::IIR_W_IN
) (
  input  logic [W_ACC-1:0] acc,
  input  sel_t             sel,
  output logic [W_OUT-1:0] y
);

  localparam int W_PROD = W_ACC + COEF_SHIFT;
  localparam logic [W_PROD-1:0] Y_MAX = W_PROD'((64'd1 << W_OUT) - 1);

  logic [W_PROD-1:0] prod [NUM_COEF];  // acc * n for every table entry
  logic [W_PROD-1:0] quot;

  always_comb begin
    for (int i = 0; i < NUM_COEF; i++) begin
      prod[i] = '0;
      for (int b = 0; b < COEF_SHIFT; b++) begin
        if (coef_num(sel_t'(i))[b]) prod[i] = prod[i] + (W_PROD'(acc) << b);
      end
    end
  end

  assign quot = prod[sel] >> COEF_SHIFT;
  assign y    = (quot > Y_MAX) ? Y_MAX[W_OUT-1:0] : quot[W_OUT-1:0];

endmodule
