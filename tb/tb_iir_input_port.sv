// tb_iir_input_port: self-checking test of the channel counter, its control
// and the input multiplexer. A reference counter in the testbench follows the
// start rule (start a sweep when idle or on the last channel); each clock the
// test checks cnt, and that x_q and ch_q are x[cnt] and cnt of the previous
// clock. Stimulus covers single sweeps, start held high (back-to-back sweeps),
// start pulses in the middle of a sweep (ignored) and idle gaps.
module tb_iir_input_port;
  localparam int NUM_CH = 3;
  localparam int W_IN   = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NUM_CH-1:0][W_IN-1:0] x;
  logic [NUM_CH-1:0] cnt, ch_q;
  logic [W_IN-1:0]   x_q;

  int checks = 0, failures = 0;
  int m_cnt, m_cnt_next;  // reference counter: 0 idle, 1..NUM_CH channel
  logic [W_IN-1:0]   exp_x;
  logic [NUM_CH-1:0] exp_ch;
  int sweeps = 0, back_to_back = 0, ignored = 0, start_to_first = -1;

  iir_input_port #(.NUM_CH(NUM_CH), .W_IN(W_IN)) dut (.clk, .rst_n, .start, .x, .cnt, .x_q, .ch_q);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_cnt = 0;
    exp_x = '0;
    exp_ch = '0;
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // drive new stimulus away from the clock edge
      @(negedge clk);
      for (int c = 0; c < NUM_CH; c++) x[c] = W_IN'($urandom);
      if (cyc < 1000)      start = ($urandom_range(3, 0) == 0);
      else if (cyc < 1300) start = 1'b1;
      else                 start = ($urandom_range(1, 0) == 0);
      // outputs of the previous edge
      check(cnt == ((m_cnt == 0) ? NUM_CH'(0) : NUM_CH'(1) << (m_cnt - 1)), "cnt");
      // reference for the next edge
      exp_ch = cnt;
      exp_x  = (m_cnt == 0) ? '0 : x[m_cnt - 1];
      if (m_cnt == 0 || m_cnt == NUM_CH) m_cnt_next = start ? 1 : 0;
      else begin
        m_cnt_next = m_cnt + 1;
        if (start) ignored++;
      end
      if (m_cnt_next == 1) begin
        sweeps++;
        if (m_cnt == NUM_CH) back_to_back++;
      end
      @(posedge clk);
      m_cnt = m_cnt_next;
      #1;
      check(x_q == exp_x, "x_q");
      check(ch_q == exp_ch, "ch_q");
    end
    check(sweeps > 0 && back_to_back > 0 && ignored > 0, "all counter cases exercised");
    // latency: start sampled at an edge, first channel selected right after it
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    start = 1;
    @(negedge clk); start = 0;
    check(cnt == NUM_CH'(1), "counter starts one clock after start");
    @(negedge clk);
    check(ch_q == NUM_CH'(1) && cnt == NUM_CH'(2), "channel code registered one clock later");
    $display("sweeps=%0d back_to_back=%0d ignored_starts=%0d", sweeps, back_to_back, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
