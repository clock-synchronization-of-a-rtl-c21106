// tb_freq_adjust -- checks the Block D oscillator model (CNT_MOD = 33, DRIFT = +3/256).
// 1) With the reference held low the oscillator runs free: 20 periods must take
//    20*33*256/259 = 652.3 clk_hf periods (651..654 accepted), with pulses TICK_W = 2 wide.
// 2) A reference pulse train with period 33 is applied. Every phase error the detector
//    reports must equal the distance, measured here, between the own tick and the reference
//    edge. After 60 reference periods the loop must be locked: the last 20 errors within +-1.
module tb_freq_adjust;
  localparam int CNT_MOD = 33;
  logic clk_hf = 1'b0, rst_n = 1'b0, ref_sig = 1'b0;
  logic c_s, tick, err_valid;
  logic signed [15:0] phase_err;
  int checks = 0, failures = 0;
  int cyc = 0;

  freq_adjust #(.CNT_MOD(CNT_MOD), .DRIFT(3), .INIT_PHASE(5)) dut (.*);

  always #5 clk_hf = ~clk_hf;
  always @(posedge clk_hf) cyc <= cyc + 1;

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

  // Independent record of tick and reference edges, sampled mid-period.
  int last_tick = -1000, last_ref = -1000;
  logic ref_prev = 1'b0;
  logic drive_ref = 1'b0;
  int n_err = 0, n_late_ok = 0, n_late = 0;
  always @(negedge clk_hf) if (rst_n) begin
    if (err_valid) begin
      int expect_err;
      expect_err = last_tick - last_ref;
      n_err++;
      checks++;
      if (int'(phase_err) != expect_err) begin
        failures++;
        $display("FAIL phase error %0d, measured %0d (cycle %0d)", phase_err, expect_err, cyc);
      end
      if (n_err > 60) begin
        n_late++;
        if (phase_err >= -1 && phase_err <= 1) n_late_ok++;
      end
    end
    if (tick) last_tick = cyc;
    if (ref_sig && !ref_prev) last_ref = cyc;
    ref_prev = ref_sig;
  end

  // Reference pulse train, period CNT_MOD, 2 periods wide, changing with the clk_hf edge.
  always @(posedge clk_hf) begin
    if (drive_ref) ref_sig <= (cyc % CNT_MOD) < 2;
    else           ref_sig <= 1'b0;
  end

  initial begin
    int t_first, n_ticks, hi;
    repeat (3) @(negedge clk_hf);
    rst_n = 1'b1;
    // 1) free running
    @(posedge tick);
    @(negedge clk_hf);
    t_first = cyc;
    n_ticks = 0;
    while (n_ticks < 20) begin
      @(negedge clk_hf);
      if (tick) n_ticks++;
    end
    check(cyc - t_first >= 651 && cyc - t_first <= 654, "free-running period");
    hi = 0;
    @(posedge c_s);
    @(negedge clk_hf);
    while (c_s) begin hi++; @(negedge clk_hf); end
    check(hi == 2, "pulse width");
    // 2) locking
    drive_ref = 1'b1;
    wait (n_late >= 20);
    check(n_late_ok == n_late, "locked to within one clk_hf period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
