// SGM peripheral for one horizontal section of the image pair.
//
// Wraps sgm_core with a memory master: it reads the rectified left and right
// images of its section from external memory in row-major order (one left
// and one right byte per pixel), streams them into the engine, and writes
// every disparity the engine produces to the disparity image. Several of
// these peripherals run in parallel on different sections (see stereo_top).
//
// Interface: start pulse with in_l_base / in_r_base pointing at the first
// input row of the section and out_base at its first output row, all held
// stable while busy; done pulses once the last disparity has been written.
// One memory port (sgm_pkg::mem_req_t / mem_rsp_t); writes win over reads
// when both want the port.
// Timing: the reads of the next pixel pair overlap the D-clock disparity
// loop of the current pixel, so with a memory latency below about D clocks
// the section takes as long as sgm_core alone (see sgm_core).
// The engine's own busy output is left open: this wrapper's busy covers the
// engine and the final write-back.
// The base-address registers mirror the document's peripheral registers;
// the arbitration and the in-order read handshake are this design's choice.
module sgm_ip
  import sgm_pkg::*;
#(
  parameter int unsigned W      = 640,
  parameter int unsigned SEC_H  = 100,
  parameter int unsigned D      = 92,
  parameter int unsigned WIN    = 7,
  parameter int unsigned P1     = 2,
  parameter int unsigned P2     = 20,
  parameter int unsigned COST_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] in_l_base,
  input  logic [ADDR_W-1:0] in_r_base,
  input  logic [ADDR_W-1:0] out_base,
  output logic              busy,
  output logic              done,
  output mem_req_t          mem_req,
  input  mem_rsp_t          mem_rsp
);
  localparam int unsigned NPIX = W * SEC_H;
  localparam int unsigned PW   = $clog2(NPIX + 1);

  typedef enum logic [2:0] {R_IDLE, R_REQ_L, R_REQ_R, R_WAIT, R_PUSH, R_DRAIN} rstate_t;
  rstate_t rstate;

  logic [PW-1:0] pidx;
  logic [1:0]    got;
  logic [7:0]    pl, pr;

  logic                     c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  logic [7:0]               c_disp;
  logic [$clog2(SEC_H)-1:0] c_row;
  logic [$clog2(W)-1:0]     c_col;
  logic                     c_done, core_fin;

  sgm_core #(.W(W), .H(SEC_H), .D(D), .WIN(WIN), .P1(P1), .P2(P2), .COST_W(COST_W)) u_core (
    .clk, .rst_n, .start,
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_l(pl), .in_r(pr),
    .out_valid(c_out_valid), .out_ready(c_out_ready), .out_disp(c_disp),
    .out_row(c_row), .out_col(c_col), .busy(), .done(c_done));

  assign c_in_valid = (rstate == R_PUSH);

  // port arbitration: a pending disparity write first, then reads
  always_comb begin
    mem_req     = '0;
    c_out_ready = 1'b0;
    if (c_out_valid) begin
      mem_req.valid = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = out_base + ADDR_W'(int'(c_row) * int'(W) + int'(c_col));
      mem_req.wdata = c_disp;
      c_out_ready   = mem_rsp.ready;
    end else if (rstate == R_REQ_L) begin
      mem_req.valid = 1'b1;
      mem_req.addr  = in_l_base + ADDR_W'(pidx);
    end else if (rstate == R_REQ_R) begin
      mem_req.valid = 1'b1;
      mem_req.addr  = in_r_base + ADDR_W'(pidx);
    end
  end

  logic rd_taken;
  assign rd_taken = !c_out_valid && mem_rsp.ready;
  assign busy     = (rstate != R_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate   <= R_IDLE;
      pidx     <= '0;
      got      <= '0;
      pl       <= '0;
      pr       <= '0;
      done     <= 1'b0;
      core_fin <= 1'b0;
    end else begin
      done <= 1'b0;
      if (c_done) core_fin <= 1'b1;
      if (mem_rsp.rvalid) begin
        if (got == 2'd0) pl <= mem_rsp.rdata;
        else             pr <= mem_rsp.rdata;
        got <= got + 1'b1;
      end
      unique case (rstate)
        R_IDLE: if (start) begin
          rstate   <= R_REQ_L;
          pidx     <= '0;
          got      <= '0;
          core_fin <= 1'b0;
        end
        R_REQ_L: if (rd_taken) rstate <= R_REQ_R;
        R_REQ_R: if (rd_taken) rstate <= R_WAIT;
        R_WAIT:  if (got == 2'd2) rstate <= R_PUSH;
        R_PUSH:  if (c_in_ready) begin
          got <= '0;
          if (pidx == PW'(NPIX - 1)) rstate <= R_DRAIN;
          else begin
            pidx   <= pidx + 1'b1;
            rstate <= R_REQ_L;
          end
        end
        R_DRAIN: if ((core_fin || c_done) && !c_out_valid) begin
          rstate <= R_IDLE;
          done   <= 1'b1;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end
endmodule
