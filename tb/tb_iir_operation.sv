// tb_iir_operation: self-checking test of the loop arithmetic. For random
// and corner state/sample/select values it compares the new state s with
// X + R - min(floor(R*n/256), 4095) and the output term with
// min(floor(s*n/256), 4095), computed with ordinary multiplications.
module tb_iir_operation;
  localparam int W_IN  = 12;
  localparam int W_ACC = 20;

  logic [W_IN-1:0]  x_q;
  logic [W_ACC-1:0] fb, s;
  logic [3:0]       sel;
  logic [W_IN-1:0]  y_pre;

  int checks = 0, failures = 0;
  localparam int unsigned NUMS [16] = '{1, 2, 4, 8, 16, 24, 32, 48, 64, 96, 128, 160, 192, 208, 224, 240};

  iir_operation #(.W_IN(W_IN), .W_ACC(W_ACC)) dut (.x_q, .fb, .sel, .s, .y_pre);

  function automatic longint unsigned kmul(longint unsigned a, int unsigned n);
    longint unsigned q = (a * n) >> 8;
    return (q > 4095) ? 4095 : q;
  endfunction

  task automatic check_one(int unsigned xv, int unsigned r, int unsigned si);
    longint unsigned es, ey;
    x_q = W_IN'(xv);
    fb  = W_ACC'(r);
    sel = 4'(si);
    #1;
    es = longint'(xv) + longint'(r) - kmul(longint'(r), NUMS[si]);
    ey = kmul(es, NUMS[si]);
    checks += 2;
    if (longint'(s) != es) begin
      failures++;
      if (failures < 10) $display("FAIL s: x=%0d r=%0d sel=%0d s=%0d exp=%0d", xv, r, si, s, es);
    end
    if (longint'(y_pre) != ey) begin
      failures++;
      if (failures < 10) $display("FAIL y: x=%0d r=%0d sel=%0d y=%0d exp=%0d", xv, r, si, y_pre, ey);
    end
    if (es > 1048575) begin
      failures++;
      $display("FAIL: state exceeds 20 bits");
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
    for (int si = 0; si < 16; si++) begin
      check_one(0, 0, si);
      check_one(4095, 0, si);
      check_one(4095, 1048575, si);
      check_one(0, 1048575, si);
      check_one(4095, 4096 * 256 / NUMS[si] - 1, si);
      for (int i = 0; i < 300; i++)
        check_one($urandom_range(4095, 0), $urandom_range(4096 * 256 / NUMS[si], 0), si);
      for (int i = 0; i < 50; i++)
        check_one($urandom_range(4095, 0), $urandom_range(1048575, 0), si);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
