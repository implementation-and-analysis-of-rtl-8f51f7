// Full-frame test of stereo_top in the configuration meant for a larger
// device: 640x480 images, disparity range 64, nine sections. 474 output rows
// do not divide by nine, so each section has 52 output rows (58 input rows)
// and the disparity image covers rows 0 to 467.
//
// The rectified pair is written straight into memory (the remap units are
// not started; they are covered by the default-size test): a random texture
// and the same texture moved 10 pixels to the left. The test checks that
// the disparity inside the image is 10 for at least 95% of the pixels,
// compares one whole section (section 2) pixel by pixel with the behavioural
// reference, and checks the matching time against the per-row budget of
// sgm_core. The display stays disabled.
module tb_stereo_top_range64;
  import sgm_pkg::*;
  import sgm_ref_pkg::*;
  localparam int W = 640, H = 480, D = 64, WIN = 7, S = 9, OFFS = WIN / 2, SHIFT = 10;
  localparam int OUT_ROWS = (H - 2 * OFFS) / S, SEC_H = OUT_ROWS + 2 * OFFS;
  localparam int NP = S + 3;
  localparam int RECL = 'h000000, RECR = 'h050000, DISP = 'h0A0000;

  logic clk = 0, rst_n = 1;
  logic sgm_start = 0, sgm_busy, sgm_done, remap_busy, remap_done, hsync, vsync, vga_late;
  logic [3:0] vr, vg, vb;
  mem_req_t req [NP];
  mem_rsp_t rsp [NP];

  stereo_top #(.D(D), .SECTIONS(S)) dut (
    .clk, .rst_n,
    .remap_start(1'b0), .raw_l_base('0), .raw_r_base('0), .map_l_base('0), .map_r_base('0),
    .rect_l_base(ADDR_W'(RECL)), .rect_r_base(ADDR_W'(RECR)), .remap_busy, .remap_done,
    .sgm_start, .disp_base(ADDR_W'(DISP)), .sgm_busy, .sgm_done,
    .vga_enable(1'b0), .hsync, .vsync, .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_late,
    .mem_req(req), .mem_rsp(rsp));
  ddr_model #(.NPORTS(NP), .SIZE(1 << 20), .LAT(3)) u_mem (.clk, .req, .rsp);

  always #5 clk = ~clk;   // 100 MHz
  initial #1 rst_n = 0;   // a real reset edge before the first clock edge

  int checks = 0, failures = 0;

  initial begin
    longint t_sgm, budget;
    int good, total, bad, band;
    int img[], sl[], sr[];
    ivec_t ed;
    img = new[W * H];
    foreach (img[i]) img[i] = $urandom_range(0, 255);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        u_mem.mem[RECL + r * W + c] = 8'(img[r * W + c]);
        u_mem.mem[RECR + r * W + c] = 8'((c + SHIFT < W) ? img[r * W + c + SHIFT]
                                                          : $urandom_range(0, 255));
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);  sgm_start <= 1;  @(posedge clk);  sgm_start <= 0;
    t_sgm = 0;
    while (!sgm_done) begin @(posedge clk); t_sgm++; end
    // interior of every section
    good = 0;  total = 0;
    for (int g = 0; g < S * OUT_ROWS; g++)
      for (int c = D + 2 * OFFS; c < W - SHIFT - 2 * OFFS; c++) begin
        total++;
        good += (u_mem.mem[DISP + g * W + c] == 8'(SHIFT));
      end
    checks++;
    if (good * 100 < total * 95) failures++;
    $display("disparity %0d found on %0d of %0d interior pixels", SHIFT, good, total);
    // one section against the reference
    band = 2;
    sl = new[SEC_H * W];  sr = new[SEC_H * W];
    for (int i = 0; i < SEC_H * W; i++) begin
      sl[i] = int'(u_mem.mem[RECL + band * OUT_ROWS * W + i]);
      sr[i] = int'(u_mem.mem[RECR + band * OUT_ROWS * W + i]);
    end
    ed = sgm_ref(W, SEC_H, D, WIN, 2, 20, sl, sr);
    bad = 0;
    for (int r = 0; r < OUT_ROWS; r++)
      for (int c = 0; c < W - OFFS; c++) begin
        checks++;
        if (int'(u_mem.mem[DISP + (band * OUT_ROWS + r) * W + c]) != ed[r * W + c]) bad++;
      end
    failures += bad;
    if (bad != 0) $display("%0d disparities of section %0d differ from the reference", bad, band);
    // per section: WIN-1 rows at memory speed, then 2D+1 + W*(D+3) per row
    budget = longint'(OUT_ROWS) * longint'(1 + 2 * D + W * (D + 3)) + longint'((WIN - 1) * W * 8);
    checks++;
    if (t_sgm > budget) begin
      failures++;
      $display("matching took %0d clocks, budget %0d", t_sgm, budget);
    end
    $display("range %0d, %0d sections: matching %0d clocks (%0d fps at 100 MHz)", D, S, t_sgm,
             100000000 / t_sgm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
