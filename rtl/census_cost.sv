// Census matching cost of two square windows.
//
// Each window is turned into a census vector: one bit per window pixel, set
// when that pixel is brighter than the window's centre pixel. The matching
// cost is the Hamming distance of the left and right census vectors, so it
// lies in 0..WIN*WIN-1 (the centre bit is always 0). Purely combinational.
// The 7x7 window and the "brighter than centre" rule follow the document;
// windows are flattened row-major, element [r*WIN+c].
module census_cost #(
  parameter int unsigned WIN = 7
) (
  input  logic [7:0]                     win_l [WIN*WIN],
  input  logic [7:0]                     win_r [WIN*WIN],
  output logic [$clog2(WIN*WIN+1)-1:0]   ham
);
  localparam int unsigned N   = WIN * WIN;
  localparam int unsigned CTR = (WIN / 2) * WIN + (WIN / 2);

  logic [N-1:0] cen_l, cen_r, diff;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      cen_l[i] = win_l[i] > win_l[CTR];
      cen_r[i] = win_r[i] > win_r[CTR];
    end
    diff = cen_l ^ cen_r;
    ham  = '0;
    for (int i = 0; i < N; i++) ham = ham + $bits(ham)'(diff[i]);
  end
endmodule
