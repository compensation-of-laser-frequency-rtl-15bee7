// polar_to_cart: converts a sample given as magnitude and phase code to Cartesian form.
//
// x = |r| cos(theta), y = |r| sin(theta), with theta = 2*pi*code/2^N_PSI. The cosine and sine
// come from a 2^N_PSI-entry table of NC-bit signed values round((2^(NC-1)-1) * cos(angle)),
// filled at elaboration by a power-series evaluation (dpll_pkg::cos_value), so no data file
// is needed. The
// products are scaled back by 2^(NC-1), so x and y are in the units of |r|. Purely
// combinational; the blind phase search needs it to measure distances to the 16-QAM grid.
module polar_to_cart
  import dpll_pkg::*;
#(
  parameter int unsigned N_PSI = 7,
  parameter int unsigned N_R   = 11,
  parameter int unsigned NC    = 12
) (
  input  logic        [N_R-1:0]   r_mag,
  input  logic        [N_PSI-1:0] theta,
  output logic signed [N_R+1:0]   x,
  output logic signed [N_R+1:0]   y
);
  localparam int unsigned NT = 1 << N_PSI;
  typedef logic signed [NC-1:0] table_t [NT];

  function automatic table_t cos_table();
    table_t t;
    for (int i = 0; i < int'(NT); i++) t[i] = NC'(cos_value(i, N_PSI, NC));
    return t;
  endfunction

  localparam table_t COS_T = cos_table();

  logic        [N_PSI-1:0]   sin_idx;
  logic signed [N_R+NC:0]    px, py;

  always_comb begin
    sin_idx = theta - N_PSI'(NT / 4);                 // sin(a) = cos(a - pi/2)
    px = $signed({1'b0, r_mag}) * COS_T[theta];
    py = $signed({1'b0, r_mag}) * COS_T[sin_idx];
    x  = (N_R+2)'(px >>> (NC - 1));
    y  = (N_R+2)'(py >>> (NC - 1));
  end

endmodule
