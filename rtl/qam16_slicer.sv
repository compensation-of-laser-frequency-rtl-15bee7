// qam16_slicer: hard decision for one 16-QAM sample in Cartesian form.
//
// The constellation is the square grid {-3,-1,+1,+3} x {-3,-1,+1,+3} times the unit
// amplitude `unit`. Each coordinate is decided on its own against the thresholds
// -2*unit, 0 and +2*unit. The outputs are the level index per axis (0..3 for -3..+3), the
// coordinates of the decided point and the squared Euclidean distance from the sample to it,
// which the blind phase search uses as its metric. The receiver only names a 16-QAM slicer;
// the level-index encoding is this implementation's choice. Purely combinational.
module qam16_slicer #(
  parameter int unsigned WX = 13,  // signed width of x and y
  parameter int unsigned WU = 11   // width of the unit amplitude
) (
  input  logic signed [WX-1:0]   x,
  input  logic signed [WX-1:0]   y,
  input  logic        [WU-1:0]   unit,
  output logic        [1:0]      idx_i,
  output logic        [1:0]      idx_q,
  output logic signed [WX+2:0]   x_hat,
  output logic signed [WX+2:0]   y_hat,
  output logic        [2*WX+5:0] dist2
);
  localparam int unsigned WD = WX + 3;

  function automatic logic [1:0] decide(input logic signed [WD-1:0] v,
                                        input logic signed [WD-1:0] two_u);
    if (v < -two_u)     return 2'd0;
    else if (v < 0)     return 2'd1;
    else if (v < two_u) return 2'd2;
    else                return 2'd3;
  endfunction

  function automatic logic signed [WD-1:0] level(input logic [1:0] idx,
                                                 input logic signed [WD-1:0] u);
    return (WD'(2 * int'(idx) - 3)) * u;
  endfunction

  logic signed [WD-1:0]   u_s, two_u, xs, ys;
  logic signed [2*WD-1:0] ex, ey;

  always_comb begin
    u_s   = WD'($signed({1'b0, unit}));
    two_u = u_s <<< 1;
    xs    = WD'(x);
    ys    = WD'(y);
    idx_i = decide(xs, two_u);
    idx_q = decide(ys, two_u);
    x_hat = level(idx_i, u_s);
    y_hat = level(idx_q, u_s);
    ex    = (2*WD)'(xs - x_hat);
    ey    = (2*WD)'(ys - y_hat);
    dist2 = $unsigned(ex * ex) + $unsigned(ey * ey);
  end

endmodule
