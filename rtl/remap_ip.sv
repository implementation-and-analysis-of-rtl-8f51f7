// Remap (undistortion and rectification) peripheral.
//
// For every pixel (i, j) of the rectified image the peripheral reads the map
// entry (x, y) from external memory, in the same row-major order as the
// image, fetches the four raw-image pixels around (x, y) by random access,
// interpolates them bilinearly and writes the result to the rectified image.
// Map entries are fixed point with FRAC fractional bits, as in the document.
//
// Memory layout (this design's choice): a map entry takes 4 bytes,
// x then y, each a little-endian 16-bit two's-complement number; raw and
// rectified images are W x H bytes, row-major. A neighbour outside the raw
// image counts as 0 (constant black border); its read is still issued, to a
// clamped address, so that every pixel costs the same number of requests.
//
// Interface: start pulse with map_base, src_base, dst_base held stable;
// busy/done; one memory port (sgm_pkg::mem_req_t / mem_rsp_t).
// Timing: per pixel 4 map reads, 4 pixel reads and one write; reads of one
// group are issued back to back, so a pixel takes about 10 clocks plus two
// memory latencies.
module remap_ip
  import sgm_pkg::*;
#(
  parameter int unsigned W    = 640,
  parameter int unsigned H    = 480,
  parameter int unsigned FRAC = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] map_base,
  input  logic [ADDR_W-1:0] src_base,
  input  logic [ADDR_W-1:0] dst_base,
  output logic              busy,
  output logic              done,
  output mem_req_t          mem_req,
  input  mem_rsp_t          mem_rsp
);
  localparam int unsigned NPIX = W * H;
  localparam int unsigned PW   = $clog2(NPIX + 1);

  typedef enum logic [2:0] {M_IDLE, M_MAP, M_MAPW, M_PIX, M_PIXW, M_WR} mstate_t;
  mstate_t state;

  logic [PW-1:0] pidx;       // output pixel index
  logic [2:0]    issued;     // reads issued in this group
  logic [2:0]    got;        // responses received in this group
  logic [7:0]    mbyte [4];  // map entry bytes
  logic [7:0]    nb    [4];  // neighbour pixels
  logic [3:0]    nb_in;     // neighbour lies nb_in the raw image

  logic signed [15:0] mx, my;
  logic signed [16:0] x0, y0;   // integer parts
  logic [FRAC-1:0]    fx, fy;
  logic [7:0]         ipix;

  always_comb begin
    mx = {mbyte[1], mbyte[0]};
    my = {mbyte[3], mbyte[2]};
    x0 = 17'(mx >>> FRAC);
    y0 = 17'(my >>> FRAC);
    fx = mx[FRAC-1:0];
    fy = my[FRAC-1:0];
  end

  // address of neighbour n (0: x0,y0  1: x0+1,y0  2: x0,y0+1  3: x0+1,y0+1)
  function automatic logic in_img(input int x, input int y);
    return x >= 0 && x < int'(W) && y >= 0 && y < int'(H);
  endfunction

  logic [ADDR_W-1:0] nb_addr;
  always_comb begin
    int xx, yy;
    xx = int'(x0) + int'(issued[0]);
    yy = int'(y0) + int'(issued[1]);
    if (xx < 0) xx = 0;
    if (xx > int'(W) - 1) xx = int'(W) - 1;
    if (yy < 0) yy = 0;
    if (yy > int'(H) - 1) yy = int'(H) - 1;
    nb_addr = src_base + ADDR_W'(yy * int'(W) + xx);
  end

  bilinear_interp #(.FRAC(FRAC)) u_interp (
    .p00(nb_in[0] ? nb[0] : 8'd0), .p01(nb_in[1] ? nb[1] : 8'd0),
    .p10(nb_in[2] ? nb[2] : 8'd0), .p11(nb_in[3] ? nb[3] : 8'd0),
    .fx, .fy, .pix(ipix));

  always_comb begin
    mem_req = '0;
    unique case (state)
      M_MAP: begin
        mem_req.valid = 1'b1;
        mem_req.addr  = map_base + ADDR_W'(4 * int'(pidx) + int'(issued));
      end
      M_PIX: begin
        mem_req.valid = 1'b1;
        mem_req.addr  = nb_addr;
      end
      M_WR: begin
        mem_req.valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = dst_base + ADDR_W'(pidx);
        mem_req.wdata = ipix;
      end
      default: ;
    endcase
  end

  assign busy = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= M_IDLE;
      pidx   <= '0;
      issued <= '0;
      got    <= '0;
      nb_in <= '0;
      done   <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        mbyte[i] <= '0;
        nb[i]    <= '0;
      end
    end else begin
      done <= 1'b0;
      if (mem_rsp.rvalid) begin
        if (state == M_MAP || state == M_MAPW) mbyte[got[1:0]] <= mem_rsp.rdata;
        else                                   nb[got[1:0]]    <= mem_rsp.rdata;
        got <= got + 1'b1;
      end
      unique case (state)
        M_IDLE: if (start) begin
          state  <= M_MAP;
          pidx   <= '0;
          issued <= '0;
          got    <= '0;
        end
        M_MAP: if (mem_rsp.ready) begin
          issued <= issued + 1'b1;
          if (issued == 3'd3) state <= M_MAPW;
        end
        M_MAPW: if (got == 3'd4 || (got == 3'd3 && mem_rsp.rvalid)) begin
          state  <= M_PIX;
          issued <= '0;
          got    <= '0;
        end
        M_PIX: if (mem_rsp.ready) begin
          nb_in[issued[1:0]] <= in_img(int'(x0) + int'(issued[0]), int'(y0) + int'(issued[1]));
          issued <= issued + 1'b1;
          if (issued == 3'd3) state <= M_PIXW;
        end
        M_PIXW: if (got == 3'd4) state <= M_WR;
        M_WR: if (mem_rsp.ready) begin
          issued <= '0;
          got    <= '0;
          if (pidx == PW'(NPIX - 1)) begin
            state <= M_IDLE;
            done  <= 1'b1;
          end else begin
            pidx  <= pidx + 1'b1;
            state <= M_MAP;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
