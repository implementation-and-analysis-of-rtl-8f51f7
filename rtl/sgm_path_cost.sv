// Smoothing term of one SGM path (second part of the SGM recursion).
//
// For a neighbour pixel whose aggregated costs are L(d-1), L(d), L(d+1) and
// whose minimum over all disparities is Lmin, the term is
//   min( L(d), L(d-1)+P1, L(d+1)+P1, Lmin+P2 ) - Lmin
// which always lies in 0..P2. Out-of-range neighbours (d-1 < 0, d+1 >= range,
// pixels beyond the image edge) are presented as the maximum cost by the
// caller. The formula follows the document; the internal width of COST_W+2
// bits, wide enough that no sum overflows, is this design's choice.
// Combinational.
module sgm_path_cost #(
  parameter int unsigned COST_W = 8,
  parameter int unsigned P1     = 2,
  parameter int unsigned P2     = 20
) (
  input  logic [COST_W-1:0] l_dm1,  // L(d-1)
  input  logic [COST_W-1:0] l_d,    // L(d)
  input  logic [COST_W-1:0] l_dp1,  // L(d+1)
  input  logic [COST_W-1:0] l_min,  // min over d of L
  output logic [COST_W-1:0] term
);
  localparam int unsigned XW = COST_W + 2;
  logic [XW-1:0] a, b, c, e, m1, m2, m;

  always_comb begin
    a  = XW'(l_d);
    b  = XW'(l_dm1) + XW'(P1);
    c  = XW'(l_dp1) + XW'(P1);
    e  = XW'(l_min) + XW'(P2);
    m1 = (a < b) ? a : b;
    m2 = (c < e) ? c : e;
    m  = (m1 < m2) ? m1 : m2;
    // m >= l_min whenever l_min really is the minimum of the vector; guard
    // against an inconsistent minimum anyway so the result never wraps.
    term = (m > XW'(l_min)) ? COST_W'(m - XW'(l_min)) : '0;
  end
endmodule
