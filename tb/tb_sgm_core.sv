// Self-checking test of sgm_core on small random stereo pairs.
//
// The right image is the left image shifted by a known disparity with some
// pixel noise. A behavioural model in this file recomputes every disparity
// from the same equations (census, four grouped paths, shift by two, clip,
// first minimum) with plain arrays, and each output of the engine is compared
// with it. Frame 1 runs with the input always valid and the output always
// ready and checks the clock count against (D+3) clocks per pixel plus 2*D+1
// per processed row; frame 2 adds random input gaps and output stalls.
module tb_sgm_core;
  localparam int W = 20, H = 12, D = 8, WIN = 7, P1 = 2, P2 = 20, OFFS = WIN / 2;
  localparam int MAXC = 255;

  logic clk = 0, rst_n = 1, start = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, busy, done;
  logic [7:0] in_l = 0, in_r = 0, out_disp;
  logic [$clog2(H)-1:0] out_row;
  logic [$clog2(W)-1:0] out_col;

  sgm_core #(.W(W), .H(H), .D(D), .WIN(WIN), .P1(P1), .P2(P2)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real reset edge before the first clock edge

  int checks = 0, failures = 0;
  int img_l [H][W];
  int img_r [H][W];
  int ref_d [H][W];
  int got   [H][W];
  int n_out;

  // ---------------- reference model ----------------
  function automatic int pix(input int im, input int r, input int c);
    if (c < 0) return 0;
    return (im == 0) ? img_l[r][c] : img_r[r][c];
  endfunction

  function automatic int pterm(input int v[D], input int dd, input int mn);
    int a, b, c, e, m;
    a = v[dd];
    b = (dd > 0) ? v[dd-1] + P1 : MAXC + P1;
    c = (dd < D - 1) ? v[dd+1] + P1 : MAXC + P1;
    e = mn + P2;
    m = a;
    if (b < m) m = b;
    if (c < m) m = c;
    if (e < m) m = e;
    return m - mn;
  endfunction

  task automatic run_model();
    int prev [W][D];
    int cur  [W][D];
    int pmin [W];
    int cmin [W];
    int maxv [D];
    bit have_prev;
    for (int dd = 0; dd < D; dd++) maxv[dd] = MAXC;
    have_prev = 0;
    for (int r = WIN - 1; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        int tl[D], t[D], tr[D], lf[D];
        int mtl, mt, mtr, ml, best, bestd;
        tl = (have_prev && c > 0) ? prev[c-1] : maxv;   mtl = (have_prev && c > 0) ? pmin[c-1] : MAXC;
        t  = have_prev ? prev[c] : maxv;                 mt  = have_prev ? pmin[c] : MAXC;
        tr = (have_prev && c < W - 1) ? prev[c+1] : maxv; mtr = (have_prev && c < W - 1) ? pmin[c+1] : MAXC;
        lf = (c > 0) ? cur[c-1] : maxv;                  ml  = (c > 0) ? cmin[c-1] : MAXC;
        best = 1 << 30;  bestd = 0;
        for (int dd = 0; dd < D; dd++) begin
          int ham, cl, cr, s, cost;
          ham = 0;
          cl = pix(0, r - OFFS, c - OFFS);
          cr = pix(1, r - OFFS, c - OFFS - dd);
          for (int i = 0; i < WIN; i++)
            for (int j = 0; j < WIN; j++) begin
              bit bl, br;
              bl = pix(0, r - (WIN - 1) + i, c - (WIN - 1) + j) > cl;
              br = pix(1, r - (WIN - 1) + i, c - (WIN - 1) + j - dd) > cr;
              ham += (bl != br);
            end
          s = pterm(tl, dd, mtl) + pterm(t, dd, mt) + pterm(tr, dd, mtr) + pterm(lf, dd, ml);
          cost = ham + (s >> 2);
          if (cost > MAXC) cost = MAXC;
          cur[c][dd] = cost;
          if (cost < best) begin best = cost; bestd = dd; end
        end
        cmin[c] = best;
        ref_d[r - (WIN - 1)][c] = bestd;
      end
      prev = cur;
      pmin = cmin;
      have_prev = 1;
    end
  endtask

  task automatic make_images(input int shift, input int noise);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img_l[r][c] = $urandom_range(0, 255);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        v = (c + shift < W) ? img_l[r][c + shift] : $urandom_range(0, 255);
        if (noise > 0 && $urandom_range(0, 99) < noise) v = $urandom_range(0, 255);
        img_r[r][c] = v;
      end
  endtask

  // ---------------- drivers ----------------
  bit stall_mode;
  always @(posedge clk) if (stall_mode) out_ready <= ($urandom_range(0, 3) != 0);
                        else out_ready <= 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got[out_row][out_col] = out_disp;
    n_out++;
  end

  task automatic run_frame(input bit stalls, output longint cycles);
    longint t0;
    stall_mode = stalls;
    n_out = 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        if (stalls) while ($urandom_range(0, 2) == 0) begin
          in_valid <= 0; @(posedge clk); t0++;
        end
        in_valid <= 1;  in_l <= 8'(img_l[r][c]);  in_r <= 8'(img_r[r][c]);
        @(posedge clk); t0++;
        while (!in_ready) begin @(posedge clk); t0++; end
      end
    in_valid <= 0;
    while (!done) begin @(posedge clk); t0++; end
    repeat (3) @(posedge clk);
    cycles = t0;
  endtask

  task automatic compare();
    for (int r = 0; r <= H - WIN; r++)
      for (int c = 0; c < W - OFFS; c++) begin
        checks++;
        if (got[r][c] != ref_d[r][c + OFFS]) begin
          failures++;
          if (failures < 10) $display("mismatch out(%0d,%0d): got %0d expected %0d", r, c, got[r][c], ref_d[r][c + OFFS]);
        end
      end
    checks++;
    if (n_out != (H - WIN + 1) * (W - OFFS)) begin
      failures++;  $display("output count %0d", n_out);
    end
  endtask

  initial begin
    longint cyc, expect_cyc;
    int interior_ok;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame 1: full rate, shift 3 with a little noise
    make_images(3, 5);
    run_model();
    run_frame(0, cyc);
    compare();
    expect_cyc = (WIN - 1) * W + (H - WIN + 1) * (1 + 2 * D + W * (D + 3));
    checks++;
    if (cyc < expect_cyc - 2 || cyc > expect_cyc + 2) begin
      failures++;  $display("cycle count %0d, expected about %0d", cyc, expect_cyc);
    end
    // the engine finds the true shift on most interior pixels
    interior_ok = 0;
    for (int r = 0; r <= H - WIN; r++)
      for (int c = OFFS + D; c < W - 2 * OFFS; c++) interior_ok += (got[r][c] == 3);
    checks++;
    if (interior_ok * 10 < 8 * (H - WIN + 1) * (W - 3 * OFFS - D)) begin
      failures++;  $display("true disparity found on only %0d pixels", interior_ok);
    end
    // frame 2: random stalls on both sides, different shift
    make_images(5, 20);
    run_model();
    run_frame(1, cyc);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
