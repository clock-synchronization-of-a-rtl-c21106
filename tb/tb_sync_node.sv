// tb_sync_node -- one synchronization node with n = 5 inputs (own clock at ID 2), m = 1.
// The four other clocks are ideal pulse trains of period 33 made by the test. Phase 1: all
// four tick at the same phase; the node starts 13 periods of clk_hf away and must pull its own
// tick to within +-2 clk_hf periods of them. Phase 2: the four clocks jump to a new phase and
// clock 0 turns malicious, giving two pulses per cycle at random times; the node must lock to
// the three good clocks again. Throughout, the reference signal may only ever be one of the
// other clocks' waveforms, never the own clock alone.
module tb_sync_node;
  import clksync_pkg::*;
  localparam int N = 5, M = 1, CNT_MOD = 33;
  logic           clk_hf = 1'b0, rst_n = 1'b0;
  logic [N-2:0]   c_other = '0;
  logic           c_s, ref_sig, line_a, err_valid;
  logic [N-1:0]   ticked;
  logic [7:0][2:0] seq_id;
  rule_e          rule;
  logic [3:0]     own_pos;
  logic signed [15:0] phase_err;
  int checks = 0, failures = 0;
  int cyc = 0;

  sync_node #(.N(N), .M(M), .SELF_ID(2), .CNT_MOD(CNT_MOD), .DRIFT(-4), .INIT_PHASE(13)) dut (.*);

  always #5 clk_hf = ~clk_hf;

  initial begin
    repeat (30000) @(posedge clk_hf);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  good_phase = 0;
  bit  faulty = 0;
  int  f1, f2;
  always @(posedge clk_hf) begin
    cyc <= cyc + 1;
    if (cyc % CNT_MOD == 0) begin
      f1 = $urandom_range(0, CNT_MOD - 1);
      f2 = $urandom_range(0, CNT_MOD - 1);
    end
    for (int k = 0; k < N - 1; k++) begin
      int ph;
      ph = ((cyc - good_phase) % CNT_MOD + CNT_MOD) % CNT_MOD;
      if (faulty && k == 0)
        c_other[k] <= (cyc % CNT_MOD == f1) || (cyc % CNT_MOD == f2);
      else
        c_other[k] <= ph < 2;
    end
  end

  // Distance of the own tick from the good clocks' tick, in clk_hf periods.
  int last_good = 0, n_near = 0, n_seen = 0;
  bit measure = 0;
  logic cs_prev = 0, good_prev = 0;
  int rule_seen [4];
  always @(negedge clk_hf) if (rst_n) begin
    if (c_other[1] && !good_prev) last_good = cyc;
    if (c_s && !cs_prev && measure) begin
      int d;
      d = cyc - last_good;
      if (d > CNT_MOD / 2) d = d - CNT_MOD;
      n_seen++;
      if (d >= -2 && d <= 2) n_near++;
    end
    good_prev = c_other[1];
    cs_prev = c_s;
    rule_seen[rule]++;
    // the reference may not be the own clock alone
    if (ref_sig && c_other == '0) begin
      checks++;
      failures++;
      $display("FAIL reference follows the own clock (cycle %0d)", cyc);
    end
  end

  initial begin
    repeat (3) @(negedge clk_hf);
    rst_n = 1'b1;
    repeat (120 * CNT_MOD) @(negedge clk_hf);
    measure = 1; n_seen = 0; n_near = 0;
    repeat (20 * CNT_MOD) @(negedge clk_hf);
    checks++;
    if (n_seen < 19 || n_near != n_seen) begin
      failures++;
      $display("FAIL phase 1: %0d of %0d ticks within 2", n_near, n_seen);
    end
    measure = 0;
    good_phase = 11;
    faulty = 1;
    repeat (150 * CNT_MOD) @(negedge clk_hf);
    measure = 1; n_seen = 0; n_near = 0;
    repeat (20 * CNT_MOD) @(negedge clk_hf);
    checks++;
    if (n_seen < 19 || n_near != n_seen) begin
      failures++;
      $display("FAIL phase 2: %0d of %0d ticks within 2", n_near, n_seen);
    end
    checks++;
    if (rule_seen[RULE_SLOW] == 0 && rule_seen[RULE_FAST] == 0 && rule_seen[RULE_MID] == 0) begin
      failures++;
      $display("FAIL no reference rule was ever in force");
    end
    $display("rules in force (clk_hf periods): slow=%0d fast=%0d mid=%0d none=%0d",
             rule_seen[RULE_SLOW], rule_seen[RULE_FAST], rule_seen[RULE_MID], rule_seen[RULE_NONE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
