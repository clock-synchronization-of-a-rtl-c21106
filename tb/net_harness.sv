// net_harness -- test harness around one clock_network configuration, used by the workload
// testbench. It checks the elaborated link count against the expected J, lets the network
// lock for SETTLE global cycles, turns F of its clocks malicious (each receiver sees its own
// phase, odd receivers two pulses per cycle), lets it settle again and then requires the good
// clocks to tick within SKEW_MAX clk_hf periods of each other in every one of 30 cycles.
// It reports its counts on checks/failures and raises done at the end.
module net_harness
  import clksync_pkg::*;
#(
  parameter int M1 = 2, P1 = 3, M2 = 7, P2 = 2, F = 3,
  parameter int J_EXPECT = 206,
  parameter int SETTLE   = 150,
  parameter int SKEW_MAX = 6
) (
  input  logic clk_hf,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = num_clocks(M1, P1, M2, P2), CNT_MOD = 33, HALF = CNT_MOD / 2;
  logic                rst_n = 1'b0;
  logic [N-1:0]        inj_en = '0;
  logic [N-1:0][N-1:0] inj_val = '0;
  logic [N-1:0]        c_out, ref_out, line_a, err_valid;
  rule_e [N-1:0]       rule;
  logic [N-1:0][15:0]  phase_err;
  int cyc = 0;

  clock_network #(.M1(M1), .P1(P1), .M2(M2), .P2(P2), .F_SPEC(F)) u_net (.*);

  function automatic bit is_bad(input int g);
    for (int b = 0; b < F; b++) if (g == (1 + b * (N / F)) % N) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk_hf) begin
    cyc <= cyc + 1;
    for (int d = 0; d < N; d++) for (int s = 0; s < N; s++) begin
      int ph;
      ph = (cyc + 5 * d + 7 * s) % CNT_MOD;
      inj_val[d][s] <= (ph < 2) || (d % 2 == 1 && ph >= 12 && ph < 14);
    end
  end

  logic [N-1:0] good = '1;
  int  last_rise [N];
  logic [N-1:0] prev = '0;
  bit  measure = 0;
  int  n_cycles = 0, n_tight = 0, worst = 0, prev_in = 0;
  always @(negedge clk_hf) if (rst_n) begin
    int in_win, lo;
    for (int g = 0; g < N; g++) if (c_out[g] && !prev[g]) last_rise[g] = cyc;
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
  end

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int g = 0; g < N; g++) last_rise[g] = -1000;
    checks++;
    if (total_links(M1, P1, M2, P2) != J_EXPECT) begin
      failures++;
      $display("FAIL N=%0d: J=%0d, expected %0d", N, total_links(M1, P1, M2, P2), J_EXPECT);
    end
    begin
      int j;
      j = 0;
      for (int d = 0; d < N; d++) j += fan_in(d, M1, P1, M2, P2);
      checks++;
      if (j != J_EXPECT) begin
        failures++;
        $display("FAIL N=%0d: %0d links elaborated, expected %0d", N, j, J_EXPECT);
      end
    end
    repeat (3) @(negedge clk_hf);
    rst_n = 1'b1;
    repeat (SETTLE * CNT_MOD) @(negedge clk_hf);
    for (int g = 0; g < N; g++) if (is_bad(g)) begin
      inj_en[g] = 1'b1;
      good[g] = 1'b0;
    end
    repeat (SETTLE * CNT_MOD) @(negedge clk_hf);
    measure = 1;
    repeat (30 * CNT_MOD) @(negedge clk_hf);
    measure = 0;
    checks++;
    if (n_cycles < 28 || n_tight != n_cycles) begin
      failures++;
      $display("FAIL N=%0d f=%0d: %0d of %0d cycles within %0d", N, F, n_tight, n_cycles, SKEW_MAX);
    end
    $display("N=%0d (M1=%0d p1=%0d M2=%0d p2=%0d) f=%0d: J=%0d, %0d faulty clocks, %0d cycles, worst spread %0d",
             N, M1, P1, M2, P2, F, total_links(M1, P1, M2, P2), $countones(inj_en), n_cycles, worst);
    done = 1'b1;
  end
endmodule
