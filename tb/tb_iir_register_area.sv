// tb_iir_register_area: self-checking test of the per-channel state store.
// Random one-hot (or idle) write and read codes and random data are applied;
// a reference array in the testbench predicts fb, which must show the state
// of the read channel one clock after the read code, including a state
// written at the same edge the read is issued after (write-then-read order of
// the time-multiplexed schedule).
module tb_iir_register_area;
  localparam int NUM_CH = 3;
  localparam int W_ACC  = 20;

  logic clk = 0, rst_n = 0;
  logic [W_ACC-1:0]  s, fb;
  logic [NUM_CH-1:0] wr_ch, rd_ch;

  int checks = 0, failures = 0;
  logic [W_ACC-1:0] model [NUM_CH];
  logic [W_ACC-1:0] exp_fb;

  iir_register_area #(.NUM_CH(NUM_CH), .W_ACC(W_ACC)) dut (.clk, .rst_n, .s, .wr_ch, .rd_ch, .fb);

  always #5 clk = ~clk;

  function automatic logic [NUM_CH-1:0] rand_code();
    int r = $urandom_range(NUM_CH, 0);
    return (r == NUM_CH) ? '0 : NUM_CH'(1) << r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NUM_CH; c++) model[c] = '0;
    s = '0; wr_ch = '0; rd_ch = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      s     = W_ACC'($urandom);
      wr_ch = rand_code();
      rd_ch = rand_code();
      exp_fb = '0;
      for (int c = 0; c < NUM_CH; c++) if (rd_ch[c]) exp_fb = model[c];
      @(posedge clk);
      for (int c = 0; c < NUM_CH; c++) if (wr_ch[c]) model[c] = s;
      #1;
      checks++;
      if (fb !== exp_fb) begin
        failures++;
        if (failures < 10) $display("FAIL fb=%0h expected=%0h at %0t", fb, exp_fb, $time);
      end
    end
    // a value written at one edge is read at the next
    @(negedge clk); s = 20'hABCDE; wr_ch = 3'b010; rd_ch = 3'b000;
    @(negedge clk); s = 20'h00000; wr_ch = 3'b000; rd_ch = 3'b010;
    @(negedge clk); checks++;
    if (fb !== 20'hABCDE) begin failures++; $display("FAIL write-then-read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
