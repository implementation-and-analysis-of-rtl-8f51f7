// One complete frame through stereo_top at its default size: 640x480
// images, disparity range 92, five sections, full 640x480 VGA raster.
//
// The raw right image is the raw left image moved 10 pixels to the left,
// over a random texture. Both maps sample every pixel half a pixel to the
// right, so rectification blurs the images but keeps the shift. The test
// checks every rectified pixel against the behavioural bilinear reference,
// checks that the disparity found inside the image (away from the borders
// and the left band where no match exists) is 10 for at least 95% of the
// pixels, checks the matching time against the per-row budget of sgm_core,
// and lets the display show one complete frame without a late line. One
// whole band (section 2) is also compared pixel by pixel with the
// behavioural reference.
module tb_stereo_top_full;
  import sgm_pkg::*;
  import sgm_ref_pkg::*;
  localparam int W = 640, H = 480, D = 92, WIN = 7, S = 5, OFFS = WIN / 2, SHIFT = 10;
  localparam int OUT_ROWS = (H - 2 * OFFS) / S, SEC_H = OUT_ROWS + 2 * OFFS;
  localparam int NP = S + 3;
  localparam int RAWL = 'h000000, RAWR = 'h050000, MAPL = 'h0A0000, MAPR = 'h1D0000,
                 RECL = 'h300000, RECR = 'h350000, DISP = 'h3A0000;

  logic clk = 0, rst_n = 1;
  logic remap_start = 0, remap_busy, remap_done, sgm_start = 0, sgm_busy, sgm_done;
  logic vga_enable = 0, hsync, vsync, vga_late;
  logic [3:0] vr, vg, vb;
  mem_req_t req [NP];
  mem_rsp_t rsp [NP];

  stereo_top dut (
    .clk, .rst_n,
    .remap_start, .raw_l_base(ADDR_W'(RAWL)), .raw_r_base(ADDR_W'(RAWR)),
    .map_l_base(ADDR_W'(MAPL)), .map_r_base(ADDR_W'(MAPR)),
    .rect_l_base(ADDR_W'(RECL)), .rect_r_base(ADDR_W'(RECR)), .remap_busy, .remap_done,
    .sgm_start, .disp_base(ADDR_W'(DISP)), .sgm_busy, .sgm_done,
    .vga_enable, .hsync, .vsync, .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_late,
    .mem_req(req), .mem_rsp(rsp));
  ddr_model #(.NPORTS(NP), .SIZE(1 << 22), .LAT(3)) u_mem (.clk, .req, .rsp);


  always #5 clk = ~clk;   // 100 MHz
  initial #1 rst_n = 0;   // a real reset edge before the first clock edge

  int checks = 0, failures = 0, n_late = 0, n_vs = 0;
  logic vs_q = 1;
  int raw_l[];

  always @(posedge clk) if (rst_n) begin
    if (vga_late && n_vs >= 1) n_late++;
    if (vs_q && !vsync) n_vs++;
    vs_q <= vsync;
  end

  // interior, reference-band and timing checks
  task automatic check_result(input int dr, input int ns, input int orows, input longint t);
    int good, total, bad, sh, band;
    int sl[], sr[];
    ivec_t ed;
    longint budget;
    good = 0;  total = 0;
    for (int g = 0; g < ns * orows; g++)
      for (int c = dr + 2 * OFFS; c < W - SHIFT - 2 * OFFS; c++) begin
        total++;
        good += (u_mem.mem[DISP + g * W + c] == 8'(SHIFT));
      end
    checks++;
    if (good * 100 < total * 95) failures++;
    $display("range %0d: disparity %0d found on %0d of %0d interior pixels", dr, SHIFT, good, total);
    // one band against the reference, every pixel
    band = 2;
    sh = orows + 2 * OFFS;
    sl = new[sh * W];  sr = new[sh * W];
    for (int i = 0; i < sh * W; i++) begin
      sl[i] = int'(u_mem.mem[RECL + band * orows * W + i]);
      sr[i] = int'(u_mem.mem[RECR + band * orows * W + i]);
    end
    ed = sgm_ref(W, sh, dr, WIN, 2, 20, sl, sr);
    bad = 0;
    for (int r = 0; r < orows; r++)
      for (int c = 0; c < W - OFFS; c++) begin
        checks++;
        if (int'(u_mem.mem[DISP + (band * orows + r) * W + c]) != ed[r * W + c]) bad++;
      end
    failures += bad;
    if (bad != 0) $display("range %0d: %0d disparities of band %0d differ from the reference",
                           dr, bad, band);
    // per section: WIN-1 rows at memory speed, then 2D+1 + W*(D+3) per row
    budget = longint'(orows) * longint'(1 + 2 * dr + W * (dr + 3)) + longint'((WIN - 1) * W * 8);
    checks++;
    if (t > budget) begin failures++; $display("matching took %0d clocks, budget %0d", t, budget); end
  endtask

  initial begin
    longint t0, t_remap, t_sgm;
    raw_l = new[W * H];
    foreach (raw_l[i]) raw_l[i] = $urandom_range(0, 255);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int i, mx, my;
        i = r * W + c;
        u_mem.mem[RAWL + i] = 8'(raw_l[i]);
        u_mem.mem[RAWR + i] = 8'((c + SHIFT < W) ? raw_l[i + SHIFT] : $urandom_range(0, 255));
        mx = c * 32 + 16;
        my = r * 32;
        for (int b = 0; b < 2; b++) begin
          u_mem.mem[MAPL + 4 * i + b]     = 8'(mx >> (8 * b));
          u_mem.mem[MAPL + 4 * i + 2 + b] = 8'(my >> (8 * b));
          u_mem.mem[MAPR + 4 * i + b]     = 8'(mx >> (8 * b));
          u_mem.mem[MAPR + 4 * i + 2 + b] = 8'(my >> (8 * b));
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);  remap_start <= 1;  @(posedge clk);  remap_start <= 0;
    t0 = 0;
    while (!remap_done) begin @(posedge clk); t0++; end
    t_remap = t0;
    begin
      int rr[], bad;
      rr = new[W * H];
      for (int i = 0; i < W * H; i++) rr[i] = int'(u_mem.mem[RAWR + i]);
      bad = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int i;
          i = r * W + c;
          checks += 2;
          if (int'(u_mem.mem[RECL + i]) != remap_ref(W, H, raw_l, c * 32 + 16, r * 32)) bad++;
          if (int'(u_mem.mem[RECR + i]) != remap_ref(W, H, rr, c * 32 + 16, r * 32)) bad++;
        end
      failures += bad;
      if (bad != 0) $display("%0d rectified pixels wrong", bad);
    end
    @(posedge clk);  sgm_start <= 1;  @(posedge clk);  sgm_start <= 0;
    t_sgm = 0;
    while (!sgm_done) begin @(posedge clk); t_sgm++; end
    check_result(D, S, OUT_ROWS, t_sgm);
    $display("remap %0d clocks, matching %0d clocks (%0d fps at 100 MHz)", t_remap, t_sgm,
             100000000 / t_sgm);
    // one full display frame of the result
    vga_enable <= 1;
    wait (n_vs >= 2);
    checks++;
    if (n_late != 0) begin failures++; $display("%0d late display lines", n_late); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
