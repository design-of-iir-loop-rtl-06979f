// tb_iir_fil_coeff: self-checking test of the shift-add coefficient
// multiplier. For every select value it applies corner and random
// accumulator values and compares y with min(floor(acc*n/256), 4095),
// computed with an ordinary multiplication from the testbench's own copy of
// the coefficient numerators.
module tb_iir_fil_coeff;
  localparam int W_ACC = 20;
  localparam int W_OUT = 12;

  logic [W_ACC-1:0] acc;
  logic [3:0]       sel;
  logic [W_OUT-1:0] y;

  int checks = 0, failures = 0, clipped = 0;

  localparam int unsigned NUMS [16] = '{1, 2, 4, 8, 16, 24, 32, 48, 64, 96, 128, 160, 192, 208, 224, 240};

  iir_fil_coeff #(.W_ACC(W_ACC), .W_OUT(W_OUT)) dut (.acc, .sel, .y);

  function automatic int unsigned ref_y(int unsigned a, int unsigned n);
    longint unsigned q = (longint'(a) * n) >> 8;
    return (q > 4095) ? 4095 : int'(q);
  endfunction

  task automatic check_one(int unsigned a, int unsigned s);
    int unsigned e;
    acc = W_ACC'(a);
    sel = 4'(s);
    #1;
    e = ref_y(a, NUMS[s]);
    if (((longint'(a) * NUMS[s]) >> 8) > 4095) clipped++;
    checks++;
    if (y !== W_OUT'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%0d sel=%0d y=%0d expected=%0d", a, s, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      check_one(0, s);
      check_one(1, s);
      check_one(255, s);
      check_one(256, s);
      check_one(4095, s);
      check_one(1048575, s);
      check_one(4096 * 256 / NUMS[s] - 1, s);  // largest value below the clip
      if (NUMS[s] > 1) check_one(4096 * 256 / NUMS[s] + 1, s);
      for (int i = 0; i < 300; i++) begin
        if (i % 2 == 0) check_one($urandom_range(1048575, 0), s);
        else            check_one($urandom_range(4096 * 256 / NUMS[s], 0), s);
      end
    end
    if (clipped == 0) begin
      failures++;
      $display("FAIL: clipping never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
