// Stereo depth system: rectification, SGM disparity and display, with all
// image data in shared external memory.
//
// Data flow, one frame:
//   1. two remap_ip peripherals turn the raw left and right images into
//      rectified images, each following its own calibration map;
//   2. SECTIONS sgm_ip peripherals then compute the disparity image. The
//      image is cut into SECTIONS horizontal bands of OUT_ROWS output rows;
//      each engine reads its band plus WIN/2 rows above and below, so the
//      bands join without a gap, and works on it independently and in
//      parallel with the others;
//   3. vga_display keeps showing the disparity image on a VGA monitor.
// The processor that captures camera frames and starts the peripherals, the
// memory itself and the bus between them are outside this module: every
// peripheral has its own memory port (mem_req[i] / mem_rsp[i], types in
// sgm_pkg), numbered 0 = left remap, 1 = right remap, 2..SECTIONS+1 = SGM
// sections, SECTIONS+2 = display.
//
// Geometry (defaults): 640x480 images, OUT_ROWS = (480-2*3)/5 = 94,
// SEC_H = 94+6 = 100 input rows per section, a 640x470 disparity image whose
// row g is centred on rectified row g+3 and whose column c is centred on
// column c+3 (the last three columns of each row are not written).
// Control: remap_start / remap_done and sgm_start / sgm_done are the
// peripherals' start and completion signals, each pulse *_done coming when
// all units of that kind have finished; base addresses are held while busy.
// rst_n is an asynchronous reset for all flops; the linter also sees it used
// synchronously by the handshake assertion inside sgm_core, which is intended.
// The number of sections, the band heights, window, range and penalties are
// the document's Zedboard configuration; the port scheme is this design's.
module stereo_top
  import sgm_pkg::*;
#(
  parameter int unsigned IMG_W    = 640,
  parameter int unsigned IMG_H    = 480,
  parameter int unsigned D        = 92,
  parameter int unsigned WIN      = 7,
  parameter int unsigned SECTIONS = 5,
  parameter int unsigned P1       = 2,
  parameter int unsigned P2       = 20,
  parameter int unsigned FRAC     = 5,
  parameter int unsigned CLK_DIV  = 4,
  // VGA raster (640x480 at 60 Hz with a 25 MHz pixel clock)
  parameter int unsigned V_H_ACT  = 640,
  parameter int unsigned V_H_FP   = 16,
  parameter int unsigned V_H_SYNC = 96,
  parameter int unsigned V_H_BP   = 48,
  parameter int unsigned V_V_ACT  = 480,
  parameter int unsigned V_V_FP   = 10,
  parameter int unsigned V_V_SYNC = 2,
  parameter int unsigned V_V_BP   = 33
) (
  input  logic              clk,
  input  logic              rst_n,
  // rectification
  input  logic              remap_start,
  input  logic [ADDR_W-1:0] raw_l_base,
  input  logic [ADDR_W-1:0] raw_r_base,
  input  logic [ADDR_W-1:0] map_l_base,
  input  logic [ADDR_W-1:0] map_r_base,
  input  logic [ADDR_W-1:0] rect_l_base,
  input  logic [ADDR_W-1:0] rect_r_base,
  output logic              remap_busy,
  output logic              remap_done,
  // stereo matching (reads rect_l_base / rect_r_base)
  input  logic              sgm_start,
  input  logic [ADDR_W-1:0] disp_base,
  output logic              sgm_busy,
  output logic              sgm_done,
  // display
  input  logic              vga_enable,
  output logic              hsync,
  output logic              vsync,
  output logic [3:0]        vga_r,
  output logic [3:0]        vga_g,
  output logic [3:0]        vga_b,
  output logic              vga_late,
  // external memory
  output mem_req_t          mem_req [SECTIONS + 3],
  input  mem_rsp_t          mem_rsp [SECTIONS + 3]
);
  localparam int unsigned OFFS     = WIN / 2;
  localparam int unsigned OUT_ROWS = (IMG_H - 2 * OFFS) / SECTIONS;
  localparam int unsigned SEC_H    = OUT_ROWS + 2 * OFFS;
  localparam int unsigned BAND     = OUT_ROWS * IMG_W;

  // ---------------- rectification ----------------
  logic [1:0] rm_busy, rm_done, rm_fin;

  remap_ip #(.W(IMG_W), .H(IMG_H), .FRAC(FRAC)) u_remap_l (
    .clk, .rst_n, .start(remap_start), .map_base(map_l_base), .src_base(raw_l_base),
    .dst_base(rect_l_base), .busy(rm_busy[0]), .done(rm_done[0]),
    .mem_req(mem_req[0]), .mem_rsp(mem_rsp[0]));
  remap_ip #(.W(IMG_W), .H(IMG_H), .FRAC(FRAC)) u_remap_r (
    .clk, .rst_n, .start(remap_start), .map_base(map_r_base), .src_base(raw_r_base),
    .dst_base(rect_r_base), .busy(rm_busy[1]), .done(rm_done[1]),
    .mem_req(mem_req[1]), .mem_rsp(mem_rsp[1]));

  // ---------------- stereo matching sections ----------------
  logic [SECTIONS-1:0] sg_busy, sg_done, sg_fin;

  for (genvar s = 0; s < SECTIONS; s++) begin : g_sec
    sgm_ip #(.W(IMG_W), .SEC_H(SEC_H), .D(D), .WIN(WIN), .P1(P1), .P2(P2)) u_sgm (
      .clk, .rst_n, .start(sgm_start),
      .in_l_base(rect_l_base + ADDR_W'(s * BAND)),
      .in_r_base(rect_r_base + ADDR_W'(s * BAND)),
      .out_base (disp_base   + ADDR_W'(s * BAND)),
      .busy(sg_busy[s]), .done(sg_done[s]),
      .mem_req(mem_req[2 + s]), .mem_rsp(mem_rsp[2 + s]));
  end

  // ---------------- display ----------------
  vga_display #(.IMG_W(IMG_W), .IMG_ROWS(SECTIONS * OUT_ROWS), .CLK_DIV(CLK_DIV),
                .H_ACT(V_H_ACT), .H_FP(V_H_FP), .H_SYNC(V_H_SYNC), .H_BP(V_H_BP),
                .V_ACT(V_V_ACT), .V_FP(V_V_FP), .V_SYNC(V_V_SYNC), .V_BP(V_V_BP)) u_vga (
    .clk, .rst_n, .enable(vga_enable), .fb_base(disp_base),
    .hsync, .vsync, .vga_r, .vga_g, .vga_b, .late(vga_late),
    .mem_req(mem_req[SECTIONS + 2]), .mem_rsp(mem_rsp[SECTIONS + 2]));

  // ---------------- completion ----------------
  assign remap_busy = |rm_busy;
  assign sgm_busy   = |sg_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rm_fin     <= '0;
      sg_fin     <= '0;
      remap_done <= 1'b0;
      sgm_done   <= 1'b0;
    end else begin
      remap_done <= 1'b0;
      sgm_done   <= 1'b0;
      if (remap_start) rm_fin <= '0;
      else if (&(rm_fin | rm_done)) begin
        rm_fin     <= '0;
        remap_done <= 1'b1;
      end else rm_fin <= rm_fin | rm_done;
      if (sgm_start) sg_fin <= '0;
      else if (&(sg_fin | sg_done)) begin
        sg_fin   <= '0;
        sgm_done <= 1'b1;
      end else sg_fin <= sg_fin | sg_done;
    end
  end
endmodule
