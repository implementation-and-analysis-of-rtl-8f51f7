// SGM engine: census matching with 4-path MGM cost aggregation for one image
// (or one horizontal section of an image) streamed in row-major order.
//
// How it works
//   * Left and right pixels arrive together, one pair per handshake. Each
//     image has a WIN-row line buffer (WIN single-port-read RAMs of W bytes,
//     row r kept in RAM r mod WIN) from which a WIN x WIN window is built.
//   * For every pixel whose window lies inside the section rows (input row
//     R >= WIN-1) the engine walks the disparity range sequentially, one
//     disparity per clock. A copy of the right window is shifted one column
//     to the left in the image per step, fed from the right line buffer, so
//     the census cost of disparity d compares the left window centred on
//     column C-OFFS with the right window centred on column C-OFFS-d.
//   * The census cost is combined with the stored costs of four neighbours
//     (top-left, top, top-right, left), folded into one stored cost vector per
//     pixel (MGM with a single group of four paths). The row above lives in
//     the cost-row RAM (W x D entries) and a min-row RAM (W entries); the
//     three top neighbours and the left neighbour are held in registers,
//     together with their minima. While the engine works on column C it
//     writes the left neighbour's vector (column C-1) back into the cost-row
//     RAM and prefetches column C+2 as the next top-right neighbour, exactly
//     the "move cost_left into the top-left slot" update of the document.
//   * The disparity is the index of the smallest new cost (first one on a
//     tie). Neighbours beyond the image edge, and the row above the first
//     processed row, count as the maximum cost, which makes their smoothing
//     term 0; this replaces clearing the cost RAMs before every frame.
//
// Interface
//   start      pulse: begin a new section; row and column restart at 0.
//   in_*       valid/ready stream of W*H pixel pairs, row-major.
//   out_*      valid/ready stream of disparities with their position in the
//              output image: row R-(WIN-1), column C-OFFS, OFFS=WIN/2; one
//              per input pixel with R >= WIN-1 and C >= OFFS.
//   busy/done  done pulses after the last pixel of the section.
//
// Timing (in_valid and out_ready held high)
//   rows R < WIN-1 take 1 clock per pixel; each later row takes 2*D clocks to
//   load the row-above neighbours plus (D+3) clocks per pixel: accept, build
//   window, D disparity steps, result. The document pipelines only the
//   disparity loop with one disparity per clock, as here.
//
// Document versus own choices: window size, range, penalties, 8-bit costs,
// the four grouped paths, the division by shifting and the storage scheme are
// the document's. The handshakes, the RAM organisation, the output position
// convention and the treatment of pixels outside the image (read as 0) are
// this design's.
module sgm_core #(
  parameter int unsigned W      = 640,
  parameter int unsigned H      = 100,
  parameter int unsigned D      = 92,
  parameter int unsigned WIN    = 7,
  parameter int unsigned P1     = 2,
  parameter int unsigned P2     = 20,
  parameter int unsigned COST_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [7:0]             in_l,
  input  logic [7:0]             in_r,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [7:0]             out_disp,
  output logic [$clog2(H)-1:0]   out_row,
  output logic [$clog2(W)-1:0]   out_col,
  output logic                   busy,
  output logic                   done
);
  localparam int unsigned OFFS  = WIN / 2;
  localparam int unsigned CW    = $clog2(W);
  localparam int unsigned RW    = $clog2(H);
  localparam int unsigned DW    = $clog2(D + 1);
  localparam int unsigned IW    = (D > 1) ? $clog2(D) : 1;   // index into a D-vector
  localparam int unsigned SW    = $clog2(WIN);
  localparam int unsigned CRD   = W * D;
  localparam int unsigned CRAW  = $clog2(CRD);
  localparam int unsigned HAM_W = $clog2(WIN * WIN + 1);
  localparam int unsigned KW    = $clog2(2 * D + 1);
  localparam logic [COST_W-1:0] CMAX = {COST_W{1'b1}};

  typedef enum logic [2:0] {S_IDLE, S_IN, S_ROW, S_WIN, S_DISP, S_END} state_t;
  state_t state;

  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic [SW-1:0] slot;        // row mod WIN: line-buffer RAM of the current row
  logic [DW-1:0] d;           // disparity step
  logic [KW-1:0] k;           // row-phase step
  logic          first_row;   // no row above has been aggregated yet
  logic          row_loaded;  // row phase done for the current row
  logic [7:0]    px_l_q, px_r_q;

  // ---------------- line buffers ----------------
  logic [CW-1:0] lb_waddr, lb_raddr_l, lb_raddr_r;
  logic [7:0]    lb_rdata_l [WIN];
  logic [7:0]    lb_rdata_r [WIN];
  logic          lb_we;

  for (genvar i = 0; i < WIN; i++) begin : g_lb
    sdp_ram #(.DEPTH(W), .WIDTH(8)) u_lb_l (
      .clk, .we(lb_we && slot == SW'(i)), .waddr(lb_waddr), .wdata(in_l),
      .raddr(lb_raddr_l), .rdata(lb_rdata_l[i]));
    sdp_ram #(.DEPTH(W), .WIDTH(8)) u_lb_r (
      .clk, .we(lb_we && slot == SW'(i)), .waddr(lb_waddr), .wdata(in_r),
      .raddr(lb_raddr_r), .rdata(lb_rdata_r[i]));
  end

  // windows: [window row][window column], column WIN-1 is the newest
  logic [7:0] win_l  [WIN][WIN];
  logic [7:0] win_r  [WIN][WIN];
  logic [7:0] win_rs [WIN][WIN];
  logic [7:0] flat_l [WIN*WIN];
  logic [7:0] flat_r [WIN*WIN];
  logic [HAM_W-1:0] ham;

  always_comb begin
    for (int i = 0; i < WIN; i++)
      for (int j = 0; j < WIN; j++) begin
        flat_l[i*WIN+j] = win_l[i][j];
        flat_r[i*WIN+j] = win_rs[i][j];
      end
  end

  census_cost #(.WIN(WIN)) u_census (.win_l(flat_l), .win_r(flat_r), .ham(ham));

  // line-buffer RAM holding window row i (image row R-(WIN-1)+i)
  function automatic logic [SW-1:0] slot_of(input logic [SW-1:0] cur, input int unsigned i);
    return SW'((int'(cur) + 1 + int'(i)) % int'(WIN));
  endfunction

  // ---------------- cost storage ----------------
  logic [COST_W-1:0] v_tl [D];
  logic [COST_W-1:0] v_t  [D];
  logic [COST_W-1:0] v_tr [D];
  logic [COST_W-1:0] v_l  [D];
  logic [COST_W-1:0] v_cur[D];
  logic [COST_W-1:0] v_nx [D];
  logic [COST_W-1:0] m_tl, m_t, m_tr, m_l, m_nx;

  logic              cr_we;
  logic [CRAW-1:0]   cr_waddr, cr_raddr;
  logic [COST_W-1:0] cr_wdata, cr_rdata;
  logic              mr_we;
  logic [CW-1:0]     mr_waddr, mr_raddr;
  logic [COST_W-1:0] mr_wdata, mr_rdata;

  sdp_ram #(.DEPTH(CRD), .WIDTH(COST_W)) u_cost_row (
    .clk, .we(cr_we), .waddr(cr_waddr), .wdata(cr_wdata), .raddr(cr_raddr), .rdata(cr_rdata));
  sdp_ram #(.DEPTH(W), .WIDTH(COST_W)) u_min_row (
    .clk, .we(mr_we), .waddr(mr_waddr), .wdata(mr_wdata), .raddr(mr_raddr), .rdata(mr_rdata));

  // read-return bookkeeping: destination 0 = top, 1 = top-right, 2 = next
  logic          cr_ret, cr_ret_max, mr_ret, mr_ret_max;
  logic [1:0]    cr_ret_sel, mr_ret_sel;
  logic [IW-1:0] cr_ret_idx;
  logic          cr_ret_n, cr_ret_max_n, mr_ret_n, mr_ret_max_n;
  logic [1:0]    cr_ret_sel_n, mr_ret_sel_n;
  logic [IW-1:0] cr_ret_idx_n;
  logic          rs_neg_q, rs_neg_n;   // right column read fell left of the image

  // ---------------- aggregation of the current step ----------------
  logic [COST_W-1:0] a_tl[3], a_t[3], a_tr[3], a_l[3];
  logic [COST_W-1:0] new_cost;
  logic [COST_W-1:0] best_cost;
  logic [7:0]        best_disp;

  function automatic logic [COST_W-1:0] pick(input logic [COST_W-1:0] v [D], input int idx);
    if (idx < 0 || idx >= int'(D)) return CMAX;
    return v[idx];
  endfunction

  always_comb begin
    for (int j = 0; j < 3; j++) begin
      a_tl[j] = pick(v_tl, int'(d) - 1 + j);
      a_t[j]  = pick(v_t,  int'(d) - 1 + j);
      a_tr[j] = pick(v_tr, int'(d) - 1 + j);
      a_l[j]  = pick(v_l,  int'(d) - 1 + j);
    end
  end

  mgm_cost_aggregator #(.COST_W(COST_W), .HAM_W(HAM_W), .P1(P1), .P2(P2)) u_agg (
    .ham, .l_tl(a_tl), .l_t(a_t), .l_tr(a_tr), .l_l(a_l),
    .min_tl(m_tl), .min_t(m_t), .min_tr(m_tr), .min_l(m_l), .cost(new_cost));

  // ---------------- control ----------------
  logic accept, emit;
  assign in_ready = (state == S_IN) && (row < RW'(WIN - 1) || row_loaded);
  assign accept   = in_valid && in_ready;
  assign busy     = (state != S_IDLE);
  assign emit     = (col >= CW'(OFFS));

  // memory port addressing (combinational, from the state)
  always_comb begin
    lb_we       = accept;
    lb_waddr    = col;
    lb_raddr_l  = col;
    lb_raddr_r  = col;
    rs_neg_n    = 1'b0;
    cr_we       = 1'b0;
    cr_waddr    = '0;
    cr_wdata    = '0;
    cr_raddr    = '0;
    mr_we       = 1'b0;
    mr_waddr    = '0;
    mr_wdata    = '0;
    mr_raddr    = '0;
    cr_ret_n    = 1'b0;
    cr_ret_sel_n = 2'd0;
    cr_ret_idx_n = '0;
    cr_ret_max_n = first_row;
    mr_ret_n    = 1'b0;
    mr_ret_sel_n = 2'd0;
    mr_ret_max_n = first_row;
    unique case (state)
      S_ROW: begin
        // steps 0..D-1: store column W-1 of the previous row, load column 0
        // steps D..2D-1: load column 1
        if (k < KW'(D)) begin
          cr_we    = !first_row;
          cr_waddr = CRAW'((W - 1) * D + int'(k));
          cr_wdata = v_l[IW'(k)];
          cr_raddr = CRAW'(k);
          cr_ret_n = 1'b1;  cr_ret_sel_n = 2'd0;  cr_ret_idx_n = IW'(k);
        end else begin
          cr_raddr = CRAW'(D + int'(k) - int'(D));
          cr_ret_n = 1'b1;  cr_ret_sel_n = 2'd1;  cr_ret_idx_n = IW'(int'(k) - int'(D));
        end
        if (k == '0) begin
          mr_we = !first_row;  mr_waddr = CW'(W - 1);  mr_wdata = m_l;
          mr_raddr = '0;  mr_ret_n = 1'b1;  mr_ret_sel_n = 2'd0;
        end else if (k == KW'(1)) begin
          mr_raddr = CW'(1);  mr_ret_n = 1'b1;  mr_ret_sel_n = 2'd1;
        end
      end
      S_WIN: begin
        // first right column for step 1, first prefetch of column C+2
        lb_raddr_r = CW'(int'(col) - int'(WIN));
        rs_neg_n   = int'(col) - int'(WIN) < 0;
        cr_raddr   = CRAW'((int'(col) + 2) * D);
        cr_ret_n   = 1'b1;  cr_ret_sel_n = 2'd2;  cr_ret_idx_n = '0;
        cr_ret_max_n = first_row || (int'(col) + 2 >= int'(W));
        mr_raddr   = CW'(int'(col) + 2);
        mr_ret_n   = 1'b1;  mr_ret_sel_n = 2'd2;
        mr_ret_max_n = first_row || (int'(col) + 2 >= int'(W));
      end
      S_DISP: begin
        lb_raddr_r = CW'(int'(col) - int'(WIN) - 1 - int'(d));
        rs_neg_n   = int'(col) - int'(WIN) - 1 - int'(d) < 0;
        // write the left neighbour (column C-1) into the row store
        cr_we      = (col != '0);
        cr_waddr   = CRAW'((int'(col) - 1) * D + int'(d));
        cr_wdata   = v_l[IW'(d)];
        if (int'(d) + 1 < int'(D)) begin
          cr_raddr   = CRAW'((int'(col) + 2) * D + int'(d) + 1);
          cr_ret_n   = 1'b1;  cr_ret_sel_n = 2'd2;  cr_ret_idx_n = IW'(int'(d) + 1);
          cr_ret_max_n = first_row || (int'(col) + 2 >= int'(W));
        end
        if (d == '0) begin
          mr_we = (col != '0);  mr_waddr = CW'(int'(col) - 1);  mr_wdata = m_l;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row        <= '0;
      col        <= '0;
      slot       <= '0;
      d          <= '0;
      k          <= '0;
      first_row  <= 1'b1;
      row_loaded <= 1'b0;
      px_l_q     <= '0;
      px_r_q     <= '0;
      out_valid  <= 1'b0;
      out_disp   <= '0;
      out_row    <= '0;
      out_col    <= '0;
      done       <= 1'b0;
      cr_ret     <= 1'b0;
      cr_ret_max <= 1'b1;
      cr_ret_sel <= '0;
      cr_ret_idx <= '0;
      mr_ret     <= 1'b0;
      mr_ret_max <= 1'b1;
      mr_ret_sel <= '0;
      rs_neg_q   <= 1'b0;
      best_cost  <= CMAX;
      best_disp  <= '0;
      m_tl <= CMAX;  m_t <= CMAX;  m_tr <= CMAX;  m_l <= CMAX;  m_nx <= CMAX;
      for (int i = 0; i < D; i++) begin
        v_tl[i] <= CMAX;  v_t[i] <= CMAX;  v_tr[i] <= CMAX;
        v_l[i]  <= CMAX;  v_cur[i] <= CMAX; v_nx[i] <= CMAX;
      end
      for (int i = 0; i < WIN; i++)
        for (int j = 0; j < WIN; j++) begin
          win_l[i][j] <= '0;  win_r[i][j] <= '0;  win_rs[i][j] <= '0;
        end
    end else begin
      done     <= 1'b0;
      cr_ret     <= cr_ret_n;
      cr_ret_sel <= cr_ret_sel_n;
      cr_ret_idx <= cr_ret_idx_n;
      cr_ret_max <= cr_ret_max_n;
      mr_ret     <= mr_ret_n;
      mr_ret_sel <= mr_ret_sel_n;
      mr_ret_max <= mr_ret_max_n;
      rs_neg_q   <= rs_neg_n;

      // returned reads from the cost-row and min-row RAMs
      if (cr_ret) begin
        unique case (cr_ret_sel)
          2'd0:    v_t[cr_ret_idx]  <= cr_ret_max ? CMAX : cr_rdata;
          2'd1:    v_tr[cr_ret_idx] <= cr_ret_max ? CMAX : cr_rdata;
          default: v_nx[cr_ret_idx] <= cr_ret_max ? CMAX : cr_rdata;
        endcase
      end
      if (mr_ret) begin
        unique case (mr_ret_sel)
          2'd0:    m_t  <= mr_ret_max ? CMAX : mr_rdata;
          2'd1:    m_tr <= mr_ret_max ? CMAX : mr_rdata;
          default: m_nx <= mr_ret_max ? CMAX : mr_rdata;
        endcase
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            state      <= S_IN;
            row        <= '0;
            col        <= '0;
            slot       <= '0;
            first_row  <= 1'b1;
            row_loaded <= 1'b0;
          end
        end

        S_IN: begin
          if (row >= RW'(WIN - 1) && !row_loaded) begin
            state <= S_ROW;
            k     <= '0;
          end else if (accept) begin
            px_l_q <= in_l;
            px_r_q <= in_r;
            if (row >= RW'(WIN - 1)) begin
              state <= S_WIN;
            end else begin
              if (col == CW'(W - 1)) begin
                col  <= '0;
                row  <= row + 1'b1;
                slot <= (slot == SW'(WIN - 1)) ? '0 : slot + 1'b1;
              end else begin
                col <= col + 1'b1;
              end
            end
          end
        end

        S_ROW: begin
          if (k == KW'(2 * D - 1)) begin
            state      <= S_IN;
            row_loaded <= 1'b1;
            v_l  <= '{default: CMAX};
            v_tl <= '{default: CMAX};
            m_l  <= CMAX;
            m_tl <= CMAX;
          end
          k <= k + 1'b1;
        end

        S_WIN: begin
          // append column C to both windows; at C = 0 the older columns lie
          // left of the image and are cleared
          for (int i = 0; i < WIN; i++) begin
            for (int j = 0; j < WIN - 1; j++) begin
              win_l[i][j]  <= (col == '0) ? 8'd0 : win_l[i][j+1];
              win_r[i][j]  <= (col == '0) ? 8'd0 : win_r[i][j+1];
              win_rs[i][j] <= (col == '0) ? 8'd0 : win_r[i][j+1];
            end
            win_l[i][WIN-1]  <= (i == WIN - 1) ? px_l_q : lb_rdata_l[slot_of(slot, i)];
            win_r[i][WIN-1]  <= (i == WIN - 1) ? px_r_q : lb_rdata_r[slot_of(slot, i)];
            win_rs[i][WIN-1] <= (i == WIN - 1) ? px_r_q : lb_rdata_r[slot_of(slot, i)];
          end
          d     <= '0;
          state <= S_DISP;
        end

        S_DISP: begin
          v_cur[IW'(d)] <= new_cost;
          if (d == '0 || new_cost < best_cost) begin
            best_cost <= new_cost;
            best_disp <= 8'(d);
          end
          // shift the right window one image column to the left
          for (int i = 0; i < WIN; i++) begin
            for (int j = WIN - 1; j > 0; j--) win_rs[i][j] <= win_rs[i][j-1];
            win_rs[i][0] <= rs_neg_q ? 8'd0 : lb_rdata_r[slot_of(slot, i)];
          end
          if (d == DW'(D - 1)) state <= S_END;
          d <= d + 1'b1;
        end

        S_END: begin
          if (!out_valid || out_ready) begin
            out_valid <= emit;
            out_disp  <= best_disp;
            out_row   <= RW'(int'(row) - int'(WIN - 1));
            out_col   <= CW'(int'(col) - int'(OFFS));
            // move the neighbourhood one column to the right
            v_tl <= v_t;
            v_t  <= v_tr;
            v_tr <= v_nx;
            v_l  <= v_cur;
            m_tl <= m_t;
            m_t  <= m_tr;
            m_tr <= m_nx;
            m_l  <= best_cost;
            state <= S_IN;
            if (col == CW'(W - 1)) begin
              col        <= '0;
              row_loaded <= 1'b0;
              first_row  <= 1'b0;
              slot       <= (slot == SW'(WIN - 1)) ? '0 : slot + 1'b1;
              if (row == RW'(H - 1)) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                row <= row + 1'b1;
              end
            end else begin
              col <= col + 1'b1;
            end
          end
        end

        default: state <= S_IDLE;
      endcase

      if (out_valid && out_ready && !(state == S_END && emit)) out_valid <= 1'b0;
    end
  end

  // Handshake rule: a disparity is never dropped or changed while the
  // consumer stalls. Its 'disable iff' samples rst_n synchronously while the
  // flops use it as an asynchronous reset, which the linter reports as a net
  // used both ways (SYNCASYNCNET); that is intended.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_disp));
endmodule
