// Test of vga_display with a shrunken raster (24 x 15 pixel clocks per
// frame). Every pixel period is sampled once; the sync pulse widths and
// periods are measured, and each visible pixel is compared with the upper
// four bits of the image byte at the raster position derived from the syncs.
// In frame 3 the memory stops accepting requests for a while, which must
// raise 'late'; without that stall it must never rise.
module tb_vga_display;
  import sgm_pkg::*;
  localparam int IW = 12, IR = 8;
  localparam int HA = 16, HF = 2, HS = 3, HB = 3, VA = 10, VF = 1, VS = 2, VB = 2, DIV = 4;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int FB = 'h100;

  logic clk = 0, rst_n = 1, enable = 0, hsync, vsync, late;
  logic [3:0] vr, vg, vb;
  mem_req_t req [1];
  mem_rsp_t rsp [1];
  mem_rsp_t rsp_dut;
  bit block = 0;

  vga_display #(.IMG_W(IW), .IMG_ROWS(IR), .H_ACT(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
                .V_ACT(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .CLK_DIV(DIV)) dut (
    .clk, .rst_n, .enable, .fb_base(ADDR_W'(FB)), .hsync, .vsync,
    .vga_r(vr), .vga_g(vg), .vga_b(vb), .late, .mem_req(req[0]), .mem_rsp(rsp_dut));
  ddr_model #(.NPORTS(1), .SIZE(1024), .LAT(3)) u_mem (.clk, .req, .rsp);
  assign rsp_dut = block ? '0 : rsp[0];

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real reset edge before the first clock edge

  int checks = 0, failures = 0, n_late = 0, n_late_unexpected = 0;
  int k = 0;
  int hlow = 0, samples_since_hrise = -1000, lines_since_vrise = -1000;
  int hs_period = 0, last_hfall = -1, nsamp = 0, frames = 0, vlow_lines = 0;
  logic hs_q = 1, vs_q = 1;
  int pix_checked = 0;

  always @(posedge clk) if (rst_n) begin
    if (late) begin
      n_late++;
      if (!block && frames != 2) n_late_unexpected++;
    end
  end

  // one sample per pixel period
  always @(posedge clk) if (rst_n && enable) begin
    k++;
    if (k % DIV == 0 && k > 2 * DIV) begin
      nsamp++;
      if (!hsync) hlow++;
      if (hs_q && !hsync) begin                  // hsync falls
        if (last_hfall >= 0) begin
          checks++;
          if (nsamp - last_hfall != HT) begin failures++; $display("line period %0d", nsamp - last_hfall); end
        end
        last_hfall = nsamp;
        if (!vsync) vlow_lines++;
        lines_since_vrise++;
      end
      if (!hs_q && hsync) begin                  // hsync rises
        checks++;
        if (hlow != HS) begin failures++; $display("hsync width %0d", hlow); end
        hlow = 0;
        samples_since_hrise = 0;
      end else samples_since_hrise++;
      if (!vs_q && vsync) begin                  // vsync rises: frame top minus back porch
        checks++;
        if (vlow_lines != VS) begin failures++; $display("vsync lines %0d", vlow_lines); end
        vlow_lines = 0;
        lines_since_vrise = 0;
        frames++;
      end
      // position of this sample
      begin
        int x, y, e;
        x = samples_since_hrise - HB;
        y = lines_since_vrise - VB;
        if (x >= 0 && x < HA && y >= 0 && y < VA && lines_since_vrise >= 0 && frames >= 1 && frames != 3) begin
          e = (x < IW && y < IR) ? int'(u_mem.mem[FB + y * IW + x][7:4]) : 0;
          checks++;
          pix_checked++;
          if (vr != 4'(e) || vg != 4'(e) || vb != 4'(e)) begin
            failures++;
            if (failures < 10) $display("pixel (%0d,%0d) = %0d expected %0d", x, y, vr, e);
          end
        end
      end
      hs_q = hsync;
      vs_q = vsync;
    end
  end

  initial begin
    for (int i = 0; i < IW * IR; i++) u_mem.mem[FB + i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    wait (frames == 3);
    // during frame 3 the memory refuses requests for two lines
    repeat (HT * DIV * 3) @(posedge clk);
    block = 1;
    repeat (HT * DIV * 2) @(posedge clk);
    block = 0;
    wait (frames == 5);
    checks++;
    if (n_late == 0) begin failures++; $display("late never reported"); end
    checks++;
    if (n_late_unexpected != 0) begin failures++; $display("%0d unexpected late lines", n_late_unexpected); end
    checks++;
    if (pix_checked < 3 * HA * VA) begin failures++; $display("only %0d pixels checked", pix_checked); end
    $display("late lines: %0d", n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (HT * VT * DIV * 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
