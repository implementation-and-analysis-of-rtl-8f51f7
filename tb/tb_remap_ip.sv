// Test of remap_ip: a small raw image and a map that mixes fractional
// offsets, integer positions and coordinates outside the image (negative and
// beyond the right/bottom edge). The rectified image in memory is compared
// with the behavioural bilinear reference; request counts are checked.
module tb_remap_ip;
  import sgm_pkg::*;
  import sgm_ref_pkg::*;
  localparam int W = 12, H = 9;
  localparam int MB = 'h000, SB = 'h400, DB = 'h800;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  mem_req_t req [1];
  mem_rsp_t rsp [1];

  remap_ip #(.W(W), .H(H), .FRAC(5)) dut (
    .clk, .rst_n, .start, .map_base(ADDR_W'(MB)), .src_base(ADDR_W'(SB)), .dst_base(ADDR_W'(DB)),
    .busy, .done, .mem_req(req[0]), .mem_rsp(rsp[0]));
  ddr_model #(.NPORTS(1), .SIZE(4096), .LAT(3), .STALL(1)) u_mem (.clk, .req, .rsp);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real reset edge before the first clock edge

  int checks = 0, failures = 0;
  int img[], mx[], my[];
  int n_oob = 0;

  initial begin
    img = new[W * H];  mx = new[W * H];  my = new[W * H];
    foreach (img[i]) img[i] = $urandom_range(0, 255);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int i;
        i = r * W + c;
        // a mild "lens" distortion plus random sub-pixel jitter
        mx[i] = c * 32 + (c - W / 2) * 5 + $urandom_range(0, 31) - 16;
        my[i] = r * 32 + (r - H / 2) * 4 + $urandom_range(0, 31) - 16;
        if (i % 17 == 3) mx[i] = -40;             // left of the image
        if (i % 23 == 5) my[i] = (H - 1) * 32 + 7; // bottom neighbour outside
        if (i % 29 == 1) begin mx[i] = c * 32; my[i] = r * 32; end
        if (mx[i] < 0 || (mx[i] >>> 5) + 1 >= W || my[i] < 0 || (my[i] >>> 5) + 1 >= H) n_oob++;
        u_mem.mem[MB + 4 * i]     = 8'(mx[i]);
        u_mem.mem[MB + 4 * i + 1] = 8'(mx[i] >> 8);
        u_mem.mem[MB + 4 * i + 2] = 8'(my[i]);
        u_mem.mem[MB + 4 * i + 3] = 8'(my[i] >> 8);
        u_mem.mem[SB + i] = 8'(img[i]);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    for (int i = 0; i < W * H; i++) begin
      int e;
      e = remap_ref(W, H, img, mx[i], my[i]);
      checks++;
      if (int'(u_mem.mem[DB + i]) != e) begin
        failures++;
        if (failures < 10) $display("pixel %0d: %0d expected %0d (map %0d,%0d)", i, u_mem.mem[DB + i], e, mx[i], my[i]);
      end
    end
    checks++;
    if (u_mem.n_reads != 8 * W * H || u_mem.n_writes != W * H) begin
      failures++;  $display("%0d reads %0d writes", u_mem.n_reads, u_mem.n_writes);
    end
    checks++;
    if (n_oob == 0) begin failures++; $display("no border case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
