// MGM cost update for one pixel and one disparity.
//
// The four neighbour paths (top-left, top, top-right, left) are folded into
// one stored cost, as in More Global Matching with all four paths in a single
// group: the four smoothing terms are summed, divided by four with a right
// shift by 2, and added to the census Hamming cost of this pixel. The result
// is clipped to the largest storable cost. Combinational.
// The grouping, the shift and the clip follow the document; clipping at
// 2**COST_W-1 (rather than at the larger bound in the document's code, which
// does not fit the 8-bit cost store) is this design's choice.
module mgm_cost_aggregator #(
  parameter int unsigned COST_W = 8,
  parameter int unsigned HAM_W  = 6,
  parameter int unsigned P1     = 2,
  parameter int unsigned P2     = 20
) (
  input  logic [HAM_W-1:0]  ham,          // census cost C(p,d)
  // neighbour vectors around d, index 0 = d-1, 1 = d, 2 = d+1
  input  logic [COST_W-1:0] l_tl [3],
  input  logic [COST_W-1:0] l_t  [3],
  input  logic [COST_W-1:0] l_tr [3],
  input  logic [COST_W-1:0] l_l  [3],
  input  logic [COST_W-1:0] min_tl,
  input  logic [COST_W-1:0] min_t,
  input  logic [COST_W-1:0] min_tr,
  input  logic [COST_W-1:0] min_l,
  output logic [COST_W-1:0] cost          // new aggregated cost L(p,d)
);
  localparam int unsigned XW = COST_W + 3;
  logic [COST_W-1:0] t_tl, t_t, t_tr, t_l;
  logic [XW-1:0]     sum, total;

  sgm_path_cost #(.COST_W(COST_W), .P1(P1), .P2(P2)) u_tl
    (.l_dm1(l_tl[0]), .l_d(l_tl[1]), .l_dp1(l_tl[2]), .l_min(min_tl), .term(t_tl));
  sgm_path_cost #(.COST_W(COST_W), .P1(P1), .P2(P2)) u_t
    (.l_dm1(l_t[0]),  .l_d(l_t[1]),  .l_dp1(l_t[2]),  .l_min(min_t),  .term(t_t));
  sgm_path_cost #(.COST_W(COST_W), .P1(P1), .P2(P2)) u_tr
    (.l_dm1(l_tr[0]), .l_d(l_tr[1]), .l_dp1(l_tr[2]), .l_min(min_tr), .term(t_tr));
  sgm_path_cost #(.COST_W(COST_W), .P1(P1), .P2(P2)) u_l
    (.l_dm1(l_l[0]),  .l_d(l_l[1]),  .l_dp1(l_l[2]),  .l_min(min_l),  .term(t_l));

  always_comb begin
    sum   = XW'(t_tl) + XW'(t_t) + XW'(t_tr) + XW'(t_l);
    total = XW'(ham) + (sum >> 2);
    cost  = (total > XW'({COST_W{1'b1}})) ? {COST_W{1'b1}} : COST_W'(total);
  end
endmodule
