// VGA display peripheral: shows the disparity image stored in external memory.
//
// A free-running 640x480 VGA raster (standard 60 Hz timing: 800 x 525 pixel
// clocks per frame, 25 MHz pixel rate) is derived from the system clock with
// one pixel every CLK_DIV clocks. The image is read one line ahead: while
// line y is on screen, line y+1 is fetched from memory into the other half of
// a two-line buffer; line 0 is fetched during the last blanking line. Each
// image byte is shown as a grey level on a 4-bit-per-colour DAC (upper four
// bits; the lower four bits of each buffered byte are not shown, which the
// linter reports as unused bits of the line-buffer output). Lines below
// IMG_ROWS and columns right of IMG_W are black.
//
// Interface: enable starts the raster, fb_base is the address of the image
// (IMG_W bytes per row); hsync/vsync are active low; late pulses when a line
// starts before its fetch has finished (the line then shows stale data).
// One memory port (sgm_pkg::mem_req_t / mem_rsp_t); the display only
// reads, so its write-enable and write-data outputs are constant zero.
// The document only says that this peripheral keeps reading the disparity
// image and drives a VGA monitor; the raster numbers are the common VGA
// standard, and the line buffering and grey mapping are this design's.
module vga_display
  import sgm_pkg::*;
#(
  parameter int unsigned IMG_W    = 640,
  parameter int unsigned IMG_ROWS = 470,
  parameter int unsigned H_ACT    = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACT    = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned CLK_DIV  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [ADDR_W-1:0] fb_base,
  output logic              hsync,
  output logic              vsync,
  output logic [3:0]        vga_r,
  output logic [3:0]        vga_g,
  output logic [3:0]        vga_b,
  output logic              late,
  output mem_req_t          mem_req,
  input  mem_rsp_t          mem_rsp
);
  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW    = $clog2(H_TOT);
  localparam int unsigned VW    = $clog2(V_TOT);
  localparam int unsigned XW    = $clog2(IMG_W + 1);
  localparam int unsigned BW    = $clog2(2 * IMG_W);
  localparam int unsigned DVW   = $clog2(CLK_DIV + 1);

  // ---------------- raster ----------------
  logic [DVW-1:0] div;
  logic           tick, tick_d, tick_d2;
  logic [HW-1:0]  hc;
  logic [VW-1:0]  vc;

  assign tick = enable && (div == DVW'(CLK_DIV - 1));

  // ---------------- line fetch ----------------
  logic           f_busy;      // a line fetch is in progress
  logic [VW-1:0]  f_row;       // image row being fetched
  logic [XW-1:0]  f_issued, f_got;
  logic [VW-1:0]  f_done_row;  // last row whose fetch completed
  logic           f_done_ok;
  logic           f_trig;
  logic [VW-1:0]  f_trig_row;

  logic           lb_we;
  logic [BW-1:0]  lb_waddr, lb_raddr;
  logic [7:0]     lb_rdata;

  sdp_ram #(.DEPTH(2 * IMG_W), .WIDTH(8)) u_line (
    .clk, .we(lb_we), .waddr(lb_waddr), .wdata(mem_rsp.rdata), .raddr(lb_raddr), .rdata(lb_rdata));

  // when the raster moves on to line nv, the fetch of image row nv+1 starts;
  // row 0 is fetched while the last (blank) line of the frame is shown
  logic [VW-1:0] nv;
  logic          wrap;
  assign wrap = tick && hc == HW'(H_TOT - 1);
  assign nv   = (vc == VW'(V_TOT - 1)) ? '0 : vc + 1'b1;

  always_comb begin
    f_trig     = 1'b0;
    f_trig_row = '0;
    if (wrap) begin
      if (nv == VW'(V_TOT - 1)) begin
        f_trig = 1'b1;  f_trig_row = '0;
      end else if (int'(nv) + 1 < int'(IMG_ROWS) && int'(nv) + 1 < int'(V_ACT)) begin
        f_trig = 1'b1;  f_trig_row = nv + 1'b1;
      end
    end
  end

  always_comb begin
    mem_req = '0;
    if (f_busy && f_issued < XW'(IMG_W)) begin
      mem_req.valid = 1'b1;
      mem_req.addr  = fb_base + ADDR_W'(int'(f_row) * int'(IMG_W) + int'(f_issued));
    end
  end

  assign lb_we    = f_busy && mem_rsp.rvalid;
  assign lb_waddr = BW'(int'(f_row[0]) * int'(IMG_W) + int'(f_got));

  // pixel read address for the current raster position
  logic in_img;
  assign in_img   = (int'(hc) < int'(IMG_W)) && (int'(vc) < int'(IMG_ROWS)) && (int'(hc) < int'(H_ACT));
  assign lb_raddr = in_img ? BW'(int'(vc[0]) * int'(IMG_W) + int'(hc)) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div        <= '0;
      tick_d     <= 1'b0;
      tick_d2    <= 1'b0;
      hc         <= '0;
      vc         <= VW'(V_TOT - 2);
      f_busy     <= 1'b0;
      f_row      <= '0;
      f_issued   <= '0;
      f_got      <= '0;
      f_done_row <= '0;
      f_done_ok  <= 1'b0;
      hsync      <= 1'b1;
      vsync      <= 1'b1;
      vga_r      <= '0;
      vga_g      <= '0;
      vga_b      <= '0;
      late       <= 1'b0;
    end else begin
      late   <= 1'b0;
      tick_d  <= tick;
      tick_d2 <= tick_d;
      if (enable) div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        if (hc == HW'(H_TOT - 1)) begin
          hc <= '0;
          vc <= (vc == VW'(V_TOT - 1)) ? '0 : vc + 1'b1;
          // an image line is starting: its data must be in place
          if (int'(nv) < int'(IMG_ROWS) && int'(nv) < int'(V_ACT) &&
              !(f_done_ok && !f_busy && f_done_row == nv))
            late <= 1'b1;
        end else begin
          hc <= hc + 1'b1;
        end
      end
      // fetch engine
      if (f_trig) begin
        f_busy    <= 1'b1;
        f_row     <= f_trig_row;
        f_issued  <= '0;
        f_got     <= '0;
      end else if (f_busy) begin
        if (mem_req.valid && mem_rsp.ready) f_issued <= f_issued + 1'b1;
        if (mem_rsp.rvalid) begin
          f_got <= f_got + 1'b1;
          if (f_got == XW'(IMG_W - 1)) begin
            f_busy     <= 1'b0;
            f_done_ok  <= 1'b1;
            f_done_row <= f_row;
          end
        end
      end
      // outputs, two clocks after the raster position moved (line-buffer
      // read latency), so CLK_DIV must be at least 3
      if (tick_d2) begin
        hsync <= !(int'(hc) >= int'(H_ACT + H_FP) && int'(hc) < int'(H_ACT + H_FP + H_SYNC));
        vsync <= !(int'(vc) >= int'(V_ACT + V_FP) && int'(vc) < int'(V_ACT + V_FP + V_SYNC));
        vga_r <= in_img ? lb_rdata[7:4] : 4'd0;
        vga_g <= in_img ? lb_rdata[7:4] : 4'd0;
        vga_b <= in_img ? lb_rdata[7:4] : 4'd0;
      end
    end
  end
endmodule
