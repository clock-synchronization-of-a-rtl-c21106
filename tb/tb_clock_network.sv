// tb_clock_network -- end-to-end test of the clustered clock network at its default size:
// 8 clocks in 4 clusters of 2, each node with 5 inputs tolerating 1 fault, T_gcc = 33 T_hf.
// 1) The connection pattern elaborated by the network is compared with the published 8-clock
//    connection matrix (written out below) and the link count with J = N(M+p-2) + N = 40.
// 2) The clocks start at scattered phases with different free-running frequencies. After 150
//    global cycles all 8 must tick within SKEW_MAX clk_hf periods of each other in every cycle.
//    SKEW_MAX = 6 is the 3*delta bound of the clustered network with delta = 2 clk_hf periods,
//    the time resolution of Block A plus one period of the phase detector. The common period
//    must also stay within 30..36 clk_hf periods of the nominal 33.
// 3) Clock 5 turns malicious: each receiver sees its own waveform from it, early for some,
//    late for others, with two pulses per cycle for some (the Block A flip-flops must absorb
//    the second pulse). After 150 more cycles the 7 good clocks must again stay within
//    SKEW_MAX of each other in every cycle.
// Mechanisms counted (each must occur): the three reference rules, phase corrections by
// Block D, malicious links shown to receivers, and double pulses on a link.
module tb_clock_network;
  import clksync_pkg::*;
  localparam int N = 8, CNT_MOD = 33, HALF = CNT_MOD / 2, SKEW_MAX = 6;
  localparam int BAD = 5;
  logic                clk_hf = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        inj_en = '0;
  logic [N-1:0][N-1:0] inj_val = '0;
  logic [N-1:0]        c_out, ref_out, line_a, err_valid;
  rule_e [N-1:0]       rule;
  logic [N-1:0][15:0]  phase_err;
  int checks = 0, failures = 0;
  int cyc = 0;

  clock_network dut (.*);

  always #5 clk_hf = ~clk_hf;

  initial begin
    repeat (20000) @(posedge clk_hf);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Published connection matrix: row = receiving clock, column = sending clock,
  // clocks ordered c11 c12 c21 c22 c31 c32 c41 c42.
  localparam bit [7:0] TABLE_I [8] = '{
    8'b11101010, 8'b11101010, 8'b01110101, 8'b01110101,
    8'b10101110, 8'b10101110, 8'b01010111, 8'b01010111 };

  // Malicious waveforms of clock BAD, per receiver: phase offset and an optional second pulse.
  int n_double = 0, n_lies = 0;
  always @(posedge clk_hf) begin
    cyc <= cyc + 1;
    for (int d = 0; d < N; d++) begin
      int ph;
      ph = (cyc + 3 * d) % CNT_MOD;
      if (d % 2 == 0) inj_val[d][BAD] <= (ph < 2);                         // one pulse
      else            inj_val[d][BAD] <= (ph < 2) || (ph >= 10 && ph < 12); // two pulses
      if (inj_en[BAD] && d % 2 == 1 && ph == 10 && connected(d, BAD, 4, 2, 0, 1)) n_double++;
      if (inj_en[BAD] && ph == 0 && d != BAD && connected(d, BAD, 4, 2, 0, 1)) n_lies++;
    end
  end

  // Spread of the good clocks' ticks in each global cycle.
  logic [N-1:0] good = '1;
  int last_rise [N];
  logic [N-1:0] prev = '0;
  bit  measure = 0;
  int  n_cycles = 0, n_tight = 0, worst = 0;
  int  prev_in = 0;
  int  rule_cnt [4];
  int  n_corr = 0;
  int  n_rise0 = 0;
  always @(negedge clk_hf) if (rst_n) begin
    int in_win, lo;
    for (int g = 0; g < N; g++) if (c_out[g] && !prev[g]) last_rise[g] = cyc;
    if (measure && c_out[0] && !prev[0]) n_rise0++;
    prev = c_out;
    in_win = 0;
    lo = cyc;
    for (int g = 0; g < N; g++) if (good[g] && cyc - last_rise[g] <= HALF) begin
      in_win++;
      if (last_rise[g] < lo) lo = last_rise[g];
    end
    if (in_win == $countones(good) && prev_in != in_win && measure) begin
      n_cycles++;
      if (cyc - lo <= SKEW_MAX) n_tight++;
      if (cyc - lo > worst) worst = cyc - lo;
    end
    prev_in = in_win;
    for (int g = 0; g < N; g++) begin
      rule_cnt[rule[g]]++;
      if (err_valid[g] && phase_err[g] != 0) n_corr++;
    end
  end

  initial begin
    for (int g = 0; g < N; g++) last_rise[g] = -1000;
    // 1) connection pattern
    for (int d = 0; d < N; d++) begin
      for (int s = 0; s < N; s++)
        check(connected(d, s, 4, 2, 0, 1) == TABLE_I[d][7 - s], "connection matrix entry");
      check(fan_in(d, 4, 2, 0, 1) == 5, "five inputs per clock");
    end
    check(total_links(4, 2, 0, 1) == 40, "link count");

    // 2) fault-free locking
    repeat (3) @(negedge clk_hf);
    rst_n = 1'b1;
    repeat (150 * CNT_MOD) @(negedge clk_hf);
    measure = 1;
    repeat (40 * CNT_MOD) @(negedge clk_hf);
    measure = 0;
    check(n_cycles >= 38, "fault-free: a spread measured every cycle");
    check(n_tight == n_cycles, "fault-free: all clocks within SKEW_MAX");
    check(n_rise0 * 30 <= 40 * CNT_MOD + 30 && n_rise0 * 36 >= 40 * CNT_MOD - 36,
          "fault-free: common period within 30..36");
    $display("fault-free: clock 0 ticked %0d times in %0d clk_hf periods", n_rise0, 40 * CNT_MOD);
    $display("fault-free: %0d cycles, %0d within %0d, worst spread %0d", n_cycles, n_tight,
             SKEW_MAX, worst);

    // 3) one malicious clock
    inj_en[BAD] = 1'b1;
    good[BAD] = 1'b0;
    n_cycles = 0; n_tight = 0; worst = 0;
    repeat (150 * CNT_MOD) @(negedge clk_hf);
    measure = 1;
    repeat (40 * CNT_MOD) @(negedge clk_hf);
    measure = 0;
    check(n_cycles >= 38, "malicious fault: a spread measured every cycle");
    check(n_tight == n_cycles, "malicious fault: good clocks within SKEW_MAX");
    $display("malicious fault: %0d cycles, %0d within %0d, worst spread %0d", n_cycles,
             n_tight, SKEW_MAX, worst);

    // mechanisms
    $display("rules (node-periods): slow=%0d fast=%0d mid=%0d none=%0d; corrections=%0d; lies=%0d; double pulses=%0d",
             rule_cnt[RULE_SLOW], rule_cnt[RULE_FAST], rule_cnt[RULE_MID], rule_cnt[RULE_NONE],
             n_corr, n_lies, n_double);
    check(rule_cnt[RULE_SLOW] > 0, "rule x >= n-m used");
    check(rule_cnt[RULE_FAST] > 0, "rule x <= 2m used");
    check(rule_cnt[RULE_MID] > 0, "rule 2m < x < n-m used");
    check(n_corr > 0, "phase corrections made");
    check(n_lies > 0, "malicious links exercised");
    check(n_double > 0, "double pulses on a link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
