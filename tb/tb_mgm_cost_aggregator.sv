// Test of mgm_cost_aggregator: random neighbour costs and census costs; the
// expected value is C + (sum of the four path terms >> 2), clipped to 255.
module tb_mgm_cost_aggregator;
  localparam int P1 = 2, P2 = 20;
  logic [5:0] ham;
  logic [7:0] tl[3], t[3], tr[3], lf[3];
  logic [7:0] mtl, mt, mtr, ml, cost;
  int checks = 0, failures = 0;

  mgm_cost_aggregator #(.COST_W(8), .HAM_W(6), .P1(P1), .P2(P2)) dut (
    .ham, .l_tl(tl), .l_t(t), .l_tr(tr), .l_l(lf),
    .min_tl(mtl), .min_t(mt), .min_tr(mtr), .min_l(ml), .cost);

  function automatic int term(input logic [7:0] v[3], input logic [7:0] m);
    int e;
    e = v[1];
    if (v[0] + P1 < e) e = v[0] + P1;
    if (v[2] + P1 < e) e = v[2] + P1;
    if (m + P2 < e) e = m + P2;
    return e - m;
  endfunction

  task automatic rnd(output logic [7:0] v[3], output logic [7:0] m, input bit at_edge);
    int mm;
    mm = 255;
    for (int i = 0; i < 3; i++) begin
      v[i] = at_edge ? 8'd255 : 8'($urandom_range(0, 120));
      if (v[i] < mm) mm = v[i];
    end
    m = at_edge ? 8'd255 : 8'(mm - $urandom_range(0, mm));
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int e;
      rnd(tl, mtl, n % 7 == 0);
      rnd(t,  mt,  n % 11 == 0);
      rnd(tr, mtr, n % 5 == 0);
      rnd(lf, ml,  n % 13 == 0);
      ham = 6'($urandom_range(0, 48));
      #1;
      e = int'(ham) + ((term(tl, mtl) + term(t, mt) + term(tr, mtr) + term(lf, ml)) >> 2);
      if (e > 255) e = 255;
      checks++;
      if (int'(cost) != e) begin
        failures++;  if (failures < 10) $display("cost %0d expected %0d", cost, e);
      end
    end
    // all neighbours at the edge: the cost is the census cost alone
    tl = '{255, 255, 255};  t = tl;  tr = tl;  lf = tl;
    mtl = 255;  mt = 255;  mtr = 255;  ml = 255;  ham = 6'd17;
    #1;
    checks++;
    if (cost != 8'd17) failures++;
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
