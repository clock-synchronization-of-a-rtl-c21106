// tb_ref_selector -- checks the reference selector (Block C) for n = 8, m = 2, own ID 3.
// For every position x of the own clock in the tick sequence (and for random orders of the
// other IDs) the test loads a sequence at Line A and checks the rule and the chosen clock:
//   x >= 6: the 3rd clock of the sequence, x <= 4: the 5th clock, x = 5: the 4th clock.
// It then drives each input clock alone and checks that ref_sig follows exactly the chosen
// input, and that the selection holds until the next Line A.
module tb_ref_selector;
  import clksync_pkg::*;
  localparam int N = 8, M = 2, SELF = 3, IW = 3;
  logic                 clk_hf = 1'b0, rst_n = 1'b0, line_a = 1'b0;
  logic [N-1:0][IW-1:0] seq_id;
  logic [N-1:0]         c_in = '0;
  logic                 ref_sig;
  rule_e                rule;
  logic [IW-1:0]        ref_id;
  logic [IW:0]          own_pos;
  int checks = 0, failures = 0;

  ref_selector #(.N(N), .M(M), .SELF_ID(SELF)) dut (.*);

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
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    int perm [N];
    repeat (2) @(negedge clk_hf);
    rst_n = 1'b1;
    for (int round = 0; round < 40; round++) begin
      int x, pick;
      rule_e exp_rule;
      x = (round % N) + 1;             // 1-based own position
      // random order of the other IDs
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) if (perm[i] == SELF) begin
        perm[i] = perm[x-1]; perm[x-1] = SELF;
      end
      for (int i = 0; i < N; i++) seq_id[i] = IW'(perm[i]);
      if (x >= N - M)      begin exp_rule = RULE_SLOW; pick = perm[M];     end
      else if (x <= 2 * M) begin exp_rule = RULE_FAST; pick = perm[2*M];   end
      else                 begin exp_rule = RULE_MID;  pick = perm[2*M-1]; end
      line_a = 1'b1;
      @(negedge clk_hf);
      line_a = 1'b0;
      // the next sequence must not disturb the held selection
      for (int i = 0; i < N; i++) seq_id[i] = IW'((i + round) % N);
      check(rule == exp_rule, "rule");
      check(int'(ref_id) == pick, "chosen clock");
      check(int'(own_pos) == x, "own position");
      for (int c = 0; c < N; c++) begin
        c_in = '0;
        c_in[c] = 1'b1;
        #1;
        check(ref_sig == (c == pick), "reference follows the chosen clock only");
        c_in = '0;
        #1;
        check(ref_sig == 1'b0, "reference low");
      end
      @(negedge clk_hf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
