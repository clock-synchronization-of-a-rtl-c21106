// tb_network_workloads -- the network configurations of the published interconnection tables.
// 1) For every row of the table of network sizes (N = 20..100, f_spec = 3, 5, 7) the link
//    count J = N(M1+M2-1) + M1 p1^2 + M2 p2^2 of the chosen cluster sizes must equal the
//    published J, the cluster sizes must add up to N, and every clock must have more than
//    3 f_spec inputs.
// 2) The N = 20, f_spec = 3 network (2 clusters of 3, 7 clusters of 2) is simulated with 3
//    malicious clocks. The good clocks must stay within 9 clk_hf periods (3 delta with
//    delta = 3: with m = 3 the reference can sit further from the own clock) of each other (see
//    net_harness). The larger rows differ only in size.
module tb_network_workloads;
  import clksync_pkg::*;
  logic clk_hf = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk_hf = ~clk_hf;

  // N, f_spec, M1, p1, M2, p2, J
  localparam int ROWS = 20;
  localparam int T2 [ROWS][7] = '{
    '{20, 3, 2, 3, 7, 2, 206},   '{30, 3, 6, 5, 0, 0, 300},   '{40, 3, 2, 6, 4, 7, 468},
    '{50, 3, 1, 8, 6, 7, 658},   '{62, 3, 2, 7, 6, 8, 916},   '{64, 3, 1, 8, 7, 8, 960},
    '{100, 3, 10, 10, 0, 0, 1900},
    '{20, 5, 4, 2, 12, 1, 328},  '{30, 5, 1, 2, 14, 2, 480},  '{40, 5, 5, 2, 10, 3, 670},
    '{50, 5, 6, 3, 8, 4, 832},   '{62, 5, 2, 6, 10, 5, 1004}, '{64, 5, 4, 6, 8, 5, 1048},
    '{100, 5, 10, 10, 0, 0, 1900},
    '{30, 7, 14, 1, 8, 2, 676},  '{40, 7, 4, 1, 18, 2, 916},  '{50, 7, 8, 3, 13, 2, 1124},
    '{62, 7, 2, 4, 18, 3, 1372}, '{64, 7, 4, 4, 16, 3, 1424}, '{100, 7, 8, 5, 10, 6, 2260} };

  logic done_a;
  int   ck_a, fl_a;

  net_harness #(.M1(2), .P1(3), .M2(7), .P2(2), .F(3), .J_EXPECT(206), .SKEW_MAX(9))
    u_n20 (.clk_hf, .done(done_a), .checks(ck_a), .failures(fl_a));

  initial begin
    repeat (20000) @(posedge clk_hf);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + ck_a,
             failures + fl_a);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      int n, f, m1, p1, m2, p2, jx, nmin;
      n = T2[r][0]; f = T2[r][1]; m1 = T2[r][2]; p1 = T2[r][3]; m2 = T2[r][4]; p2 = T2[r][5];
      jx = T2[r][6];
      checks += 3;
      if (num_clocks(m1, p1, m2, p2) != n) begin
        failures++; $display("FAIL row %0d: cluster sizes do not add up to N", r);
      end
      if (total_links(m1, p1, m2, p2) != jx) begin
        failures++; $display("FAIL row %0d: J=%0d", r, total_links(m1, p1, m2, p2));
      end
      nmin = (m2 > 0) ? m1 + m2 + p2 - 1 : m1 + p1 - 1;
      if (m1 > 0 && m1 + m2 + p1 - 1 < nmin) nmin = m1 + m2 + p1 - 1;
      if (nmin <= 3 * f) begin
        failures++; $display("FAIL row %0d: %0d inputs cannot tolerate %0d faults", r, nmin, f);
      end
    end
    @(posedge clk_hf);
    wait (done_a === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ck_a,
             failures + fl_a);
    $finish;
  end
endmodule
