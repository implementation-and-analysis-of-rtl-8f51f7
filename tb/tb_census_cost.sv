// Test of census_cost: random and structured 7x7 window pairs, the expected
// Hamming distance computed bit by bit in the test bench.
module tb_census_cost;
  localparam int WIN = 7, N = WIN * WIN;
  logic [7:0] wl [N];
  logic [7:0] wr [N];
  logic [5:0] ham;
  int checks = 0, failures = 0;

  census_cost #(.WIN(WIN)) dut (.win_l(wl), .win_r(wr), .ham(ham));

  task automatic check();
    int e;
    #1;
    e = 0;
    for (int i = 0; i < N; i++) e += ((wl[i] > wl[N/2]) != (wr[i] > wr[N/2]));
    checks++;
    if (int'(ham) != e) begin
      failures++;  $display("ham %0d expected %0d", ham, e);
    end
  endtask

  initial begin
    // identical windows: cost 0
    for (int i = 0; i < N; i++) begin wl[i] = 8'($urandom); wr[i] = wl[i]; end
    check();
    checks++;  if (ham != 0) failures++;
    // left all brighter than centre, right all darker: 48 bits differ
    for (int i = 0; i < N; i++) begin wl[i] = 8'd200; wr[i] = 8'd10; end
    wl[N/2] = 8'd100;  wr[N/2] = 8'd100;
    check();
    checks++;  if (ham != 6'd48) failures++;
    // equal to the centre counts as not brighter
    for (int i = 0; i < N; i++) begin wl[i] = 8'd100; wr[i] = 8'd101; end
    wr[N/2] = 8'd100;
    check();
    checks++;  if (ham != 6'd48) failures++;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) begin
        wl[i] = 8'($urandom_range(0, 15) * 16);
        wr[i] = 8'($urandom_range(0, 15) * 16);
      end
      check();
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
