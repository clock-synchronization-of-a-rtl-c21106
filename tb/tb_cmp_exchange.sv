// tb_cmp_exchange -- exhaustive check of the comparison-and-exchange module for 4-bit counts.
// Every pair of counts with both values of invert is applied; the expected min/max outputs
// are computed here with ordinary comparisons, including the rule that on equal counts the
// B input leaves on the min side.
module tb_cmp_exchange;
  localparam int W = 4, IW = 3;
  logic [W-1:0]  a_cnt, b_cnt, min_cnt, max_cnt;
  logic [IW-1:0] a_id, b_id, min_id, max_id;
  logic          invert;
  int checks = 0, failures = 0;

  cmp_exchange #(.W(W), .IW(IW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int inv = 0; inv < 2; inv++)
      for (int a = 0; a < (1 << W); a++)
        for (int b = 0; b < (1 << W); b++) begin
          logic a_first;
          a_cnt = W'(a); b_cnt = W'(b); invert = inv[0];
          a_id = IW'(a % 7); b_id = IW'(7 - (b % 7));
          #1;
          a_first = (a < b) ^ inv[0];
          checks++;
          if (min_cnt !== (a_first ? a_cnt : b_cnt) || min_id !== (a_first ? a_id : b_id) ||
              max_cnt !== (a_first ? b_cnt : a_cnt) || max_id !== (a_first ? b_id : a_id)) begin
            failures++;
            $display("FAIL a=%0d b=%0d inv=%0d -> min=%0d/%0d max=%0d/%0d", a, b, inv,
                     min_cnt, min_id, max_cnt, max_id);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
