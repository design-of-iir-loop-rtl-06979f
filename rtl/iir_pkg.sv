// iir_pkg: sizes and the coefficient table shared by the time-multiplexed
// IIR loop filter.
//
// The filter is a first-order recursive (IIR) low-pass loop,
//     S[n] = X[n] + S[n-1] - k*S[n-1],   Y[n] = k*S[n],
// with k = COEF_NUM/256. At DC, Y follows X exactly, so a step on X settles
// at gain 1; a small k gives a slow, smooth approach and hides flicker when
// a colour-tone control value jumps.
//
// Taken from the design description: 12-bit input and output samples, a
// 20-bit loop accumulator, three inputs served by one datapath, 16
// selectable coefficients spanning 1/256 to 240/256.
// Own choice: the 14 coefficients between the two printed end points. The
// slow ones are powers of two (1, 2, 4, 8, 16 /256), which matches the
// published step responses; the rest fill the range up to 240/256. Every
// entry has at most four set bits, so each product is at most four shifted
// terms.
package iir_pkg;

  localparam int IIR_W_IN   = 12;  // input / output sample width
  localparam int IIR_W_ACC  = 20;  // loop accumulator width (W_IN + COEF_SHIFT)
  localparam int IIR_NUM_CH = 3;   // inputs sharing one datapath
  localparam int NUM_COEF   = 16;  // selectable coefficients
  localparam int W_SEL      = 4;   // width of the coefficient select
  localparam int COEF_SHIFT = 8;   // coefficient denominator is 2**COEF_SHIFT

  typedef logic [W_SEL-1:0]      sel_t;
  typedef logic [COEF_SHIFT-1:0] coef_t;

  // Numerator n of coefficient k = n/256 for each value of the select.
  function automatic coef_t coef_num(input sel_t sel);
    case (sel)
      4'd0:    return 8'd1;
      4'd1:    return 8'd2;
      4'd2:    return 8'd4;
      4'd3:    return 8'd8;
      4'd4:    return 8'd16;
      4'd5:    return 8'd24;
      4'd6:    return 8'd32;
      4'd7:    return 8'd48;
      4'd8:    return 8'd64;
      4'd9:    return 8'd96;
      4'd10:   return 8'd128;
      4'd11:   return 8'd160;
      4'd12:   return 8'd192;
      4'd13:   return 8'd208;
      4'd14:   return 8'd224;
      default: return 8'd240;
    endcase
  endfunction

endpackage
