// tb_sorter4 -- random and corner-case check of the 4-input sorter.
// For each input set the outputs must be in ascending order, every input ID must appear
// exactly once and each output count must be the count that went in with that ID.
module tb_sorter4;
  localparam int W = 6, IW = 3;
  logic [3:0][W-1:0]  in_cnt, out_cnt;
  logic [3:0][IW-1:0] in_id, out_id;
  int checks = 0, failures = 0;

  sorter4 #(.W(W), .IW(IW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic ok;
    logic [3:0] seen;
    int expect_sorted [4];
    ok = 1'b1;
    seen = '0;
    for (int i = 0; i < 4; i++) expect_sorted[i] = in_cnt[i];
    expect_sorted.sort();
    for (int i = 0; i < 4; i++) begin
      if (out_cnt[i] != W'(expect_sorted[i])) ok = 1'b0;
      if (out_id[i] > 3) ok = 1'b0;
      else begin
        if (seen[out_id[i]]) ok = 1'b0;
        seen[out_id[i]] = 1'b1;
        if (in_cnt[out_id[i]] != out_cnt[i]) ok = 1'b0;
      end
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL in=%p out=%p ids=%p", in_cnt, out_cnt, out_id);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) in_id[i] = IW'(i);
    // all orderings of four distinct values
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
      for (int c = 0; c < 4; c++) for (int d = 0; d < 4; d++) begin
        in_cnt = {W'(d * 9), W'(c * 9), W'(b * 9), W'(a * 9)};
        #1 check_one();
      end
    repeat (2000) begin
      for (int i = 0; i < 4; i++) in_cnt[i] = W'($urandom_range(0, 63));
      #1 check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
