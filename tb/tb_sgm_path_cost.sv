// Test of sgm_path_cost against the smoothing term
// min(L(d), L(d-1)+P1, L(d+1)+P1, Lmin+P2) - Lmin, with Lmin the real
// minimum of a random cost vector, plus the all-maximum edge case.
module tb_sgm_path_cost;
  localparam int P1 = 2, P2 = 20;
  logic [7:0] dm1, d0, dp1, mn, term;
  int checks = 0, failures = 0;

  sgm_path_cost #(.COST_W(8), .P1(P1), .P2(P2)) dut (
    .l_dm1(dm1), .l_d(d0), .l_dp1(dp1), .l_min(mn), .term(term));

  task automatic check(input int a, input int b, input int c, input int m);
    int e;
    dm1 = 8'(a);  d0 = 8'(b);  dp1 = 8'(c);  mn = 8'(m);
    #1;
    e = b;
    if (a + P1 < e) e = a + P1;
    if (c + P1 < e) e = c + P1;
    if (m + P2 < e) e = m + P2;
    e = e - m;
    checks++;
    if (int'(term) != e) begin
      failures++;  $display("term(%0d,%0d,%0d,%0d)=%0d expected %0d", a, b, c, m, term, e);
    end
  endtask

  initial begin
    check(255, 255, 255, 255);   // edge neighbour: term 0
    check(10, 5, 10, 5);         // same disparity wins
    check(3, 40, 60, 3);         // neighbour disparity: P1
    check(200, 200, 200, 0);     // large jump: P2
    for (int t = 0; t < 5000; t++) begin
      int a, b, c, m;
      a = $urandom_range(0, 255);  b = $urandom_range(0, 255);  c = $urandom_range(0, 255);
      m = $urandom_range(0, 255);
      if (a < m) m = a;
      if (b < m) m = b;
      if (c < m) m = c;
      check(a, b, c, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
