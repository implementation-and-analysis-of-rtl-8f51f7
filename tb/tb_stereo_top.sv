// End-to-end test of stereo_top at reduced size: 24x20 images, range 8,
// two sections, a 32x19 VGA raster, and a memory that stalls at random.
//
// The raw right image is the raw left image moved by 3 pixels; both go
// through their own calibration map (sub-pixel offsets, some entries pointing
// outside the image). The test bench computes the rectified images and then
// the disparity of every section with the behavioural reference and compares
// both with what the peripherals wrote to memory. It also counts how often
// each mechanism of the design was exercised and fails if one never was:
// remap border samples, stalled memory requests, disparity writes that won
// the port over a pending read, the sections running at the same time,
// display line fetches, display lines starting too late (forced by blocking
// the display's memory port for a while), and complete display frames.
module tb_stereo_top;
  import sgm_pkg::*;
  import sgm_ref_pkg::*;
  localparam int W = 24, H = 20, D = 8, WIN = 7, S = 2, OFFS = WIN / 2;
  localparam int OUT_ROWS = (H - 2 * OFFS) / S, SEC_H = OUT_ROWS + 2 * OFFS;
  localparam int NP = S + 3;
  localparam int RAWL = 'h0000, RAWR = 'h0400, MAPL = 'h0800, MAPR = 'h1000,
                 RECL = 'h1800, RECR = 'h1C00, DISP = 'h2000;
  localparam int HA = 26, HF = 2, HS = 2, HB = 2, VA = 16, VF = 1, VS = 1, VB = 1;

  logic clk = 0, rst_n = 1;
  logic remap_start = 0, remap_busy, remap_done, sgm_start = 0, sgm_busy, sgm_done;
  logic vga_enable = 0, hsync, vsync, vga_late;
  logic [3:0] vr, vg, vb;
  mem_req_t req [NP];
  mem_rsp_t rsp [NP];
  mem_rsp_t rsp_dut [NP];
  bit block_vga = 0;

  stereo_top #(.IMG_W(W), .IMG_H(H), .D(D), .WIN(WIN), .SECTIONS(S), .CLK_DIV(4),
               .V_H_ACT(HA), .V_H_FP(HF), .V_H_SYNC(HS), .V_H_BP(HB),
               .V_V_ACT(VA), .V_V_FP(VF), .V_V_SYNC(VS), .V_V_BP(VB)) dut (
    .clk, .rst_n,
    .remap_start, .raw_l_base(ADDR_W'(RAWL)), .raw_r_base(ADDR_W'(RAWR)),
    .map_l_base(ADDR_W'(MAPL)), .map_r_base(ADDR_W'(MAPR)),
    .rect_l_base(ADDR_W'(RECL)), .rect_r_base(ADDR_W'(RECR)), .remap_busy, .remap_done,
    .sgm_start, .disp_base(ADDR_W'(DISP)), .sgm_busy, .sgm_done,
    .vga_enable, .hsync, .vsync, .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_late,
    .mem_req(req), .mem_rsp(rsp_dut));
  ddr_model #(.NPORTS(NP), .SIZE(16384), .LAT(3), .STALL(1)) u_mem (.clk, .req, .rsp);

  always_comb begin
    rsp_dut = rsp;
    if (block_vga) rsp_dut[NP-1] = '0;
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real reset edge before the first clock edge

  int checks = 0, failures = 0;
  int raw_l[], raw_r[], rect_l[], rect_r[];
  int mxl[], myl[], mxr[], myr[];
  // mechanism counters
  int n_border = 0, n_stall = 0, n_parallel = 0;
  int n_wr_over_rd;
  int n_fetch = 0, n_late = 0, n_frames = 0;
  logic vs_q = 1;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) if (req[p].valid && !rsp_dut[p].ready) n_stall++;
    if (&dut.sg_busy) n_parallel++;
    if (req[NP-1].valid && rsp_dut[NP-1].ready) n_fetch++;
    if (vga_late) n_late++;
    if (vs_q && !vsync) n_frames++;
    vs_q <= vsync;
  end

  // a disparity write takes the port while the section's reader wants it
  for (genvar s = 0; s < S; s++) begin : g_mon
    int cnt = 0;
    always @(posedge clk)
      if (rst_n && dut.g_sec[s].u_sgm.c_out_valid &&
          (dut.g_sec[s].u_sgm.rstate == 3'd1 || dut.g_sec[s].u_sgm.rstate == 3'd2)) cnt++;
  end
  assign n_wr_over_rd = g_mon[0].cnt + g_mon[S-1].cnt;  // S = 2 sections

  function automatic int mk_map(input int v, input int i);
    return v * 32 + ((i * 7) % 23) - 11;
  endfunction

  initial begin
    raw_l = new[W * H];  raw_r = new[W * H];  rect_l = new[W * H];  rect_r = new[W * H];
    mxl = new[W * H];  myl = new[W * H];  mxr = new[W * H];  myr = new[W * H];
    foreach (raw_l[i]) raw_l[i] = $urandom_range(0, 255);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        raw_r[r * W + c] = (c + 3 < W) ? raw_l[r * W + c + 3] : $urandom_range(0, 255);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int i;
        i = r * W + c;
        mxl[i] = mk_map(c, i);       myl[i] = mk_map(r, i + 5);
        mxr[i] = mk_map(c, i + 3);   myr[i] = mk_map(r, i + 9);
        if (mxl[i] < 0 || (mxl[i] >>> 5) + 1 >= W || myl[i] < 0 || (myl[i] >>> 5) + 1 >= H) n_border++;
        rect_l[i] = remap_ref(W, H, raw_l, mxl[i], myl[i]);
        rect_r[i] = remap_ref(W, H, raw_r, mxr[i], myr[i]);
        u_mem.mem[RAWL + i] = 8'(raw_l[i]);
        u_mem.mem[RAWR + i] = 8'(raw_r[i]);
        for (int b = 0; b < 2; b++) begin
          u_mem.mem[MAPL + 4 * i + b]     = 8'(mxl[i] >> (8 * b));
          u_mem.mem[MAPL + 4 * i + 2 + b] = 8'(myl[i] >> (8 * b));
          u_mem.mem[MAPR + 4 * i + b]     = 8'(mxr[i] >> (8 * b));
          u_mem.mem[MAPR + 4 * i + 2 + b] = 8'(myr[i] >> (8 * b));
        end
      end
    for (int i = 0; i < S * OUT_ROWS * W; i++) u_mem.mem[DISP + i] = 8'hEE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    vga_enable = 1;
    // the processor starts rectification, then matching
    @(posedge clk);  remap_start <= 1;  @(posedge clk);  remap_start <= 0;
    while (!remap_done) @(posedge clk);
    for (int i = 0; i < W * H; i++) begin
      checks += 2;
      if (int'(u_mem.mem[RECL + i]) != rect_l[i]) begin failures++; $display("rect_l[%0d]", i); end
      if (int'(u_mem.mem[RECR + i]) != rect_r[i]) begin failures++; $display("rect_r[%0d]", i); end
    end
    @(posedge clk);  sgm_start <= 1;  @(posedge clk);  sgm_start <= 0;
    while (!sgm_done) @(posedge clk);
    for (int s = 0; s < S; s++) begin
      int sl[], sr[], ed[];
      sl = new[SEC_H * W];  sr = new[SEC_H * W];
      for (int i = 0; i < SEC_H * W; i++) begin
        sl[i] = rect_l[s * OUT_ROWS * W + i];
        sr[i] = rect_r[s * OUT_ROWS * W + i];
      end
      ed = sgm_ref(W, SEC_H, D, WIN, 2, 20, sl, sr);
      for (int r = 0; r < OUT_ROWS; r++)
        for (int c = 0; c < W - OFFS; c++) begin
          int got;
          got = int'(u_mem.mem[DISP + (s * OUT_ROWS + r) * W + c]);
          checks++;
          if (got != ed[r * W + c]) begin
            failures++;
            if (failures < 10) $display("section %0d disp(%0d,%0d)=%0d expected %0d", s, r, c, got, ed[r * W + c]);
          end
        end
    end
    // let the display run, with its memory port blocked for a few lines
    wait (n_frames >= 2);
    block_vga = 1;
    repeat (4 * (HA + HF + HS + HB) * 3) @(posedge clk);
    block_vga = 0;
    wait (n_frames >= 4);
    $display("border samples %0d, stalls %0d, write-over-read %0d, parallel clocks %0d",
             n_border, n_stall, n_wr_over_rd, n_parallel);
    $display("display fetches %0d, late lines %0d, frames %0d", n_fetch, n_late, n_frames);
    checks += 7;
    if (n_border == 0)     begin failures++; $display("no remap border sample"); end
    if (n_stall == 0)      begin failures++; $display("no memory stall"); end
    if (n_wr_over_rd == 0) begin failures++; $display("no write/read arbitration"); end
    if (n_parallel == 0)   begin failures++; $display("sections never ran together"); end
    if (n_fetch < 2 * S * OUT_ROWS * W) begin failures++; $display("too few display fetches"); end
    if (n_late == 0)       begin failures++; $display("late line never reported"); end
    if (n_frames < 4)      begin failures++; $display("display frames missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
