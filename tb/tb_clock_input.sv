// tb_clock_input -- checks the clock input circuitry (Block A) with n = 4, CNT_MOD = 33.
// In each global clock cycle the test raises input clocks at chosen counter values and
// checks, while Line A is high at the end of the cycle, that each register holds the counter
// value at which its clock was first sampled high, that a second pulse of the same clock in
// the same cycle is ignored, that a clock that never ticks reads all ones, that two clocks in
// the same clk_hf period get the same count, and that everything is cleared for the next
// cycle. It also checks that Line A repeats every CNT_MOD clk_hf periods and that the align
// input loads the counter.
module tb_clock_input;
  localparam int N = 4, CNT_MOD = 33, K = 6;
  logic                clk_hf = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        c_in = '0;
  logic                align = 1'b0;
  logic [K-1:0]        counter;
  logic                line_a;
  logic [N-1:0]        ticked;
  logic [N-1:0][K-1:0] count_o;
  int checks = 0, failures = 0;

  clock_input #(.N(N), .CNT_MOD(CNT_MOD)) dut (.*);

  always #5 clk_hf = ~clk_hf;

  initial begin
    repeat (2000) @(posedge clk_hf);
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

  // Raise the given clocks for `width` periods starting when the counter reads `at`.
  task automatic pulse(input logic [N-1:0] which, input int at, input int width);
    while (counter != K'(at)) @(negedge clk_hf);
    c_in = c_in | which;
    repeat (width) @(negedge clk_hf);
    c_in = c_in & ~which;
  endtask

  int last_line_a;
  int period_ok = 0;

  initial begin
    repeat (3) @(negedge clk_hf);
    rst_n = 1'b1;
    // skip the first Line A
    @(negedge clk_hf);
    for (int cyc = 0; cyc < 3; cyc++) begin
      int t0, t1, t2;
      t0 = 5 + cyc; t1 = 12 + 2 * cyc; t2 = 20;
      pulse(4'b0001, t0, 2);
      pulse(4'b0110, t1, 3);            // clocks 1 and 2 in the same period
      pulse(4'b0010, t2, 2);            // second pulse of clock 1: must be ignored
      check(ticked == 4'b0111, "ticked flip-flops");
      while (!line_a) @(negedge clk_hf);
      check(count_o[0] == K'(t0), "count of clock 0");
      check(count_o[1] == K'(t1), "count of clock 1 (first pulse only)");
      check(count_o[2] == K'(t1), "equal count for same-period arrival");
      check(count_o[3] == '1, "clock that never ticked reads all ones");
      @(negedge clk_hf);
      check(count_o == '1 && ticked == '0, "registers preset at Line A");
    end
    // align: load the counter
    while (counter != K'(3)) @(negedge clk_hf);
    align = 1'b1;
    @(negedge clk_hf);
    align = 1'b0;
    check(counter == K'(CNT_MOD / 2), "align loads the counter");
    @(negedge clk_hf);
    check(counter == K'(CNT_MOD / 2 + 1), "counter continues after align");
    check(period_ok >= 3, "Line A period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line A must come exactly every CNT_MOD periods while align is idle.
  initial begin
    last_line_a = -1;
    forever begin
      @(posedge clk_hf);
      if (rst_n && line_a) begin
        if (last_line_a >= 0) begin
          checks++;
          if ($time / 10 - last_line_a != CNT_MOD) begin
            failures++;
            $display("FAIL Line A period %0d", $time / 10 - last_line_a);
          end else period_ok++;
        end
        last_line_a = int'($time / 10);
      end
    end
  end
endmodule
