// Test of sgm_ip: one image section in a randomly stalling memory with a
// 4-clock read latency. The disparity image written back is compared with
// the behavioural reference, the number of writes is checked, and the
// columns the engine never produces must keep their old contents.
module tb_sgm_ip;
  import sgm_pkg::*;
  import sgm_ref_pkg::*;
  localparam int W = 20, SH = 12, D = 8, WIN = 7, OFFS = WIN / 2;
  localparam int LB = 'h000, RB = 'h400, OB = 'h800;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  mem_req_t req [1];
  mem_rsp_t rsp [1];

  sgm_ip #(.W(W), .SEC_H(SH), .D(D), .WIN(WIN)) dut (
    .clk, .rst_n, .start, .in_l_base(ADDR_W'(LB)), .in_r_base(ADDR_W'(RB)),
    .out_base(ADDR_W'(OB)), .busy, .done, .mem_req(req[0]), .mem_rsp(rsp[0]));
  ddr_model #(.NPORTS(1), .SIZE(4096), .LAT(4), .STALL(1)) u_mem (.clk, .req, .rsp);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real reset edge before the first clock edge

  int checks = 0, failures = 0;
  int il[], ir[], exp_d[];

  initial begin
    il = new[W * SH];  ir = new[W * SH];
    for (int i = 0; i < W * SH; i++) il[i] = $urandom_range(0, 255);
    for (int r = 0; r < SH; r++)
      for (int c = 0; c < W; c++)
        ir[r * W + c] = (c + 4 < W) ? il[r * W + c + 4] : $urandom_range(0, 255);
    for (int i = 0; i < W * SH; i++) begin
      u_mem.mem[LB + i] = 8'(il[i]);
      u_mem.mem[RB + i] = 8'(ir[i]);
      u_mem.mem[OB + i] = 8'hEE;
    end
    exp_d = sgm_ref(W, SH, D, WIN, 2, 20, il, ir);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    for (int r = 0; r <= SH - WIN; r++)
      for (int c = 0; c < W; c++) begin
        int got;
        got = int'(u_mem.mem[OB + r * W + c]);
        checks++;
        if (c < W - OFFS) begin
          if (got != exp_d[r * W + c]) begin
            failures++;
            if (failures < 10) $display("disp(%0d,%0d) = %0d, expected %0d", r, c, got, exp_d[r * W + c]);
          end
        end else if (got != 'hEE) begin
          failures++;  $display("column %0d of row %0d overwritten", c, r);
        end
      end
    checks++;
    if (u_mem.n_writes != (SH - WIN + 1) * (W - OFFS)) begin
      failures++;  $display("%0d writes", u_mem.n_writes);
    end
    checks++;
    if (u_mem.n_reads != 2 * W * SH) begin
      failures++;  $display("%0d reads", u_mem.n_reads);
    end
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
