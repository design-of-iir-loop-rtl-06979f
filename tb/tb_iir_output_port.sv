// tb_iir_output_port: self-checking test of the output register and
// demultiplexer. A random output term and a random channel code are applied
// each clock; the testbench predicts that y[c] takes the term at the next
// clock edge when the code names c, that the other outputs hold, and that
// y_upd repeats the code one clock later.
module tb_iir_output_port;
  localparam int NUM_CH = 3;
  localparam int W_IN   = 12;

  logic clk = 0, rst_n = 0;
  logic [W_IN-1:0]             y_pre;
  logic [NUM_CH-1:0]           ch_q, y_upd;
  logic [NUM_CH-1:0][W_IN-1:0] y, m_y;
  logic [NUM_CH-1:0] d1_c;

  int checks = 0, failures = 0;

  iir_output_port #(.NUM_CH(NUM_CH), .W_IN(W_IN)) dut (.clk, .rst_n, .y_pre, .ch_q, .y, .y_upd);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    m_y = '0; d1_c = '0;
    y_pre = '0; ch_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      y_pre = W_IN'($urandom);
      r = $urandom_range(NUM_CH, 0);
      ch_q = (r == NUM_CH) ? '0 : NUM_CH'(1) << r;
      @(posedge clk);
      // reference: load the named channel's output at this edge
      for (int c = 0; c < NUM_CH; c++) if (ch_q[c]) m_y[c] = y_pre;
      d1_c = ch_q;
      #1;
      checks += 2;
      if (y !== m_y) begin
        failures++;
        if (failures < 10) $display("FAIL y=%h expected=%h at %0t", y, m_y, $time);
      end
      if (y_upd !== d1_c) begin
        failures++;
        if (failures < 10) $display("FAIL y_upd=%b expected=%b at %0t", y_upd, d1_c, $time);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
