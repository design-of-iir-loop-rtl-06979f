// tb_iir_step_response: step response of the filter for all 16
// coefficients, the way the filter is characterised (gain against the number
// of line updates).
//
// For each coefficient the filter is reset, a step of 4095, 2048 and 1000 is
// applied to the three inputs, and sweeps run back-to-back. After every
// update n of channel c the output is compared with the ideal first-order
// step response X*(1 - (1-k)**n): the fixed-point loop truncates toward zero
// in both coefficient multipliers, which keeps it within one LSB of the ideal
// value. The output must never fall, and must reach X exactly (gain 1). The
// gain after 50 updates is printed for each coefficient.
module tb_iir_step_response;
  import iir_pkg::*;

  localparam int NCH = 3;
  localparam int MAX_LINES = 4000;

  logic clk = 0, rst_n = 0, start = 0;
  sel_t sel;
  logic [NCH-1:0][11:0] x, y, y_prev;
  logic [NCH-1:0]       y_upd;

  localparam int unsigned NUMS [16] = '{1, 2, 4, 8, 16, 24, 32, 48, 64, 96, 128, 160, 192, 208, 224, 240};

  iir_loop_filter_tm dut (.clk, .rst_n, .start, .sel, .x, .y, .y_upd);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   lines [NCH];
    int   settled [NCH];
    real  k, ideal, gain50;
    logic all_settled;
    x = {12'd1000, 12'd2048, 12'd4095};
    for (int s = 0; s < 16; s++) begin
      sel = sel_t'(s);
      k = real'(NUMS[s]) / 256.0;
      rst_n = 0;
      start = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      start = 1;
      y_prev = '0;
      gain50 = 0.0;
      for (int c = 0; c < NCH; c++) begin lines[c] = 0; settled[c] = -1; end
      all_settled = 0;
      while ((!all_settled || lines[0] < 50) && lines[NCH-1] < MAX_LINES) begin
        @(negedge clk);
        for (int c = 0; c < NCH; c++) begin
          if (y_upd[c]) begin
            lines[c]++;
            ideal = real'(x[c]) * (1.0 - (1.0 - k) ** lines[c]);
            check(real'(y[c]) > ideal - 1.0 && real'(y[c]) < ideal + 1.0, "within one LSB of the ideal response");
            check(y[c] >= y_prev[c], "monotone rise");
            y_prev[c] = y[c];
            if (c == 0 && lines[c] == 50) gain50 = real'(y[c]) / real'(x[c]);
            if (y[c] == x[c] && settled[c] < 0) settled[c] = lines[c];
          end
        end
        all_settled = 1;
        for (int c = 0; c < NCH; c++) if (settled[c] < 0) all_settled = 0;
      end
      for (int c = 0; c < NCH; c++) check(settled[c] > 0, "reaches gain 1");
      $display("k=%0d/256: gain after 50 lines %0.3f (ideal %0.3f), output equals input after %0d lines",
               NUMS[s], gain50, 1.0 - (1.0 - k) ** 50, settled[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
