// tb_tick_sorter -- checks the tick sequence generator at n = 8 (the worked example size) and
// at n = 5 (a non-power-of-two node, padded to 8 entries).
// Random time stamps, with many ties, are applied; the sequence must be ascending, hold every
// ID exactly once, carry each clock's own count, and at n = 5 keep the three padding entries
// (all-ones counts) behind the real clocks whenever the real clocks all ticked.
module tb_tick_sorter;
  localparam int W = 6;
  logic [7:0][W-1:0] cnt8, seq8_cnt;
  logic [7:0][2:0]   seq8_id;
  logic [4:0][W-1:0] cnt5;
  logic [7:0][W-1:0] seq5_cnt;
  logic [7:0][2:0]   seq5_id;
  int checks = 0, failures = 0;

  tick_sorter #(.N(8), .W(W)) dut8 (.count_i(cnt8), .seq_cnt(seq8_cnt), .seq_id(seq8_id));
  tick_sorter #(.N(5), .W(W)) dut5 (.count_i(cnt5), .seq_cnt(seq5_cnt), .seq_id(seq5_id));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] count_of(input int n, input int id);
    if (id >= n) return '1;
    return (n == 8) ? cnt8[id] : cnt5[id];
  endfunction

  task automatic check_seq(input int n, input logic [7:0][W-1:0] sc, input logic [7:0][2:0] si);
    logic ok;
    logic [7:0] seen;
    ok = 1'b1;
    seen = '0;
    for (int p = 0; p < 8; p++) begin
      if (p > 0 && sc[p] < sc[p-1]) ok = 1'b0;
      if (seen[si[p]]) ok = 1'b0;
      seen[si[p]] = 1'b1;
      if (sc[p] != count_of(n, int'(si[p]))) ok = 1'b0;
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL n=%0d cnt=%p ids=%p", n, sc, si);
    end
  endtask

  initial begin
    repeat (3000) begin
      for (int i = 0; i < 8; i++) cnt8[i] = W'($urandom_range(0, 40));
      for (int i = 0; i < 5; i++) cnt5[i] = W'($urandom_range(0, 32));
      #1;
      check_seq(8, seq8_cnt, seq8_id);
      check_seq(5, seq5_cnt, seq5_id);
      checks++;
      for (int p = 0; p < 5; p++)
        if (seq5_id[p] > 4) begin
          failures++;
          $display("FAIL padding entry at position %0d", p);
          break;
        end
    end
    // reverse order and all equal
    for (int i = 0; i < 8; i++) cnt8[i] = W'(40 - 5 * i);
    #1 check_seq(8, seq8_cnt, seq8_id);
    checks++;
    for (int p = 0; p < 8; p++) if (seq8_id[p] != 3'(7 - p)) begin failures++; break; end
    cnt8 = '0;
    #1 check_seq(8, seq8_cnt, seq8_id);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
