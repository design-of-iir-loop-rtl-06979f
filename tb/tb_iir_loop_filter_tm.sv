// tb_iir_loop_filter_tm: end-to-end, self-checking test of the three-input
// time-multiplexed IIR loop filter at its default sizes.
//
// A cycle-accurate reference model runs beside the filter: its own counter
// with the start rule, a per-channel state S_c updated with
//     S_c <= X_c + S_c - min(floor(S_c*n/256), 4095)
// and an output min(floor(S_c*n/256), 4095) that must appear on y[c], with
// y_upd[c], one clock after the channel's sample is registered (two after
// the counter selects the channel). y and y_upd
// are compared every clock. The stimulus runs, in turn: single sweeps with
// idle gaps, start pulses inside a sweep (ignored), back-to-back sweeps with a
// held step input until every output equals its input, random coefficient
// changes, and a switch from the slowest to the fastest coefficient after
// the state has grown, which drives both coefficient multipliers into their
// clip. Each of these is counted, and one that never happened is a failure.
// The latency from start to the first and last channel's output is checked
// on its own.
module tb_iir_loop_filter_tm;
  import iir_pkg::*;

  localparam int NCH = 3;

  logic clk = 0, rst_n = 0, start = 0;
  sel_t sel;
  logic [NCH-1:0][11:0] x, y;
  logic [NCH-1:0]       y_upd;

  localparam int unsigned NUMS [16] = '{1, 2, 4, 8, 16, 24, 32, 48, 64, 96, 128, 160, 192, 208, 224, 240};

  iir_loop_filter_tm dut (.clk, .rst_n, .start, .sel, .x, .y, .y_upd);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_sweeps = 0, n_back_to_back = 0, n_ignored = 0, n_sel_changes = 0;
  int n_fb_clip = 0, n_out_clip = 0, n_converged = 0;

  // reference model
  int          m_cnt = 0;
  logic        s1_v = 0;
  int          s1_ch = 0;
  int unsigned s1_x = 0;
  longint unsigned m_s [NCH];
  logic [NCH-1:0][11:0] m_y;
  logic [NCH-1:0]       m_upd;
  sel_t prev_sel;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint unsigned kmul(longint unsigned a, int unsigned n, output logic clip);
    longint unsigned q = (a * n) >> 8;
    clip = (q > 4095);
    return clip ? 4095 : q;
  endfunction

  // model update at every rising edge, from the values in place before it
  always @(posedge clk) begin
    if (!rst_n) begin
      m_cnt = 0; s1_v = 0; m_y = '0; m_upd = '0;
      for (int c = 0; c < NCH; c++) m_s[c] = 0;
    end else begin
      logic c1, c2;
      longint unsigned t;
      // operation part, register area and output port
      m_upd = '0;
      if (s1_v) begin
        t = kmul(m_s[s1_ch], NUMS[sel], c1);
        m_s[s1_ch] = longint'(s1_x) + m_s[s1_ch] - t;
        m_y[s1_ch] = 12'(kmul(m_s[s1_ch], NUMS[sel], c2));
        m_upd[s1_ch] = 1'b1;
        if (c1) n_fb_clip++;
        if (c2) n_out_clip++;
        if (sel != prev_sel) n_sel_changes++;
        prev_sel = sel;
      end
      // input port
      s1_v = (m_cnt != 0);
      if (s1_v) begin
        s1_ch = m_cnt - 1;
        s1_x  = int'(x[s1_ch]);
      end
      // counter
      if (m_cnt == 0 || m_cnt == NCH) begin
        if (start) begin
          n_sweeps++;
          if (m_cnt == NCH) n_back_to_back++;
        end
        m_cnt = start ? 1 : 0;
      end else begin
        if (start) n_ignored++;
        m_cnt = m_cnt + 1;
      end
    end
    #1;
    check(y == m_y, "y");
    check(y_upd == m_upd, "y_upd");
  end

  task automatic set_inputs_random();
    for (int c = 0; c < NCH; c++) x[c] = 12'($urandom);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    sel = 4'd3;
    prev_sel = sel;
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // latency: start sampled at edge 0, y[0] at edge 2, y[NCH-1] at edge NCH+1
    @(negedge clk);
    x = {12'd300, 12'd200, 12'd100};
    start = 1;
    @(negedge clk);
    start = 0;
    edges = 0;
    while (y_upd[0] !== 1'b1 && edges < 20) begin @(negedge clk); edges++; end
    check(edges == 2, "latency to first channel");
    while (y_upd[NCH-1] !== 1'b1 && edges < 20) begin @(negedge clk); edges++; end
    check(edges == NCH + 1, "latency to last channel");
    $display("start-to-output latency of channel %0d: %0d clocks", NCH, edges);

    // single sweeps with gaps, start pulses inside sweeps
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i % 50 == 0) set_inputs_random();
      start = ($urandom_range(2, 0) == 0);
    end

    // back-to-back sweeps on a held step until the outputs equal the inputs
    @(negedge clk);
    sel = 4'd6;
    x = {12'd4095, 12'd2048, 12'd1};
    start = 1;
    repeat (NCH * 300) @(negedge clk);
    start = 0;
    repeat (NCH + 4) @(negedge clk);
    check(y == x, "converged to the input");
    if (y == x) n_converged++;

    // random coefficients and inputs, start mostly held
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i % 37 == 0) sel = sel_t'($urandom_range(15, 0));
      if (i % 101 == 0) set_inputs_random();
      start = ($urandom_range(7, 0) != 0);
    end

    // grow the state with the slowest coefficient, then switch to the fastest
    @(negedge clk);
    sel = 4'd0;
    x = {12'd4095, 12'd4095, 12'd4095};
    start = 1;
    repeat (NCH * 200) @(negedge clk);
    sel = 4'd15;
    x = {12'd10, 12'd1000, 12'd2000};
    repeat (NCH * 2000) @(negedge clk);
    start = 0;
    repeat (NCH + 4) @(negedge clk);
    check(y == x, "settles after the clip");
    if (y == x) n_converged++;

    $display("sweeps=%0d back_to_back=%0d ignored_starts=%0d sel_changes=%0d fb_clips=%0d out_clips=%0d converged=%0d",
             n_sweeps, n_back_to_back, n_ignored, n_sel_changes, n_fb_clip, n_out_clip, n_converged);
    check(n_sweeps > 0, "single sweep happened");
    check(n_back_to_back > 0, "back-to-back sweep happened");
    check(n_ignored > 0, "start inside a sweep happened");
    check(n_sel_changes > 0, "coefficient change happened");
    check(n_fb_clip > 0, "feedback clip happened");
    check(n_out_clip > 0, "output clip happened");
    check(n_converged > 0, "convergence happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
