// bps: blind phase search, the feed-forward second stage of the carrier recovery.
//
// Each sample, already derotated by the DPLL, is rotated by B test phases
//   phi_b = (b - B/2) * (pi/2) / B,   b = 0 .. B-1,
// which cover the pi/2 ambiguity range of 16-QAM. For every test phase the rotated sample is
// converted to Cartesian form and sliced, and the squared distance to the decided 16-QAM
// point is kept (saturated to DW bits). The distances are summed over a window of M
// consecutive samples centred on the sample being decided (M odd); the test phase with the
// smallest sum (lowest b on a tie) is the phase estimate psi' of that sample. The window
// runs across block boundaries, so the block in the middle of a three-block history is the
// one decided: it needs the (M-1)/2 samples on each side.
//
// Timing: distances of a block are registered when it arrives (in_valid). A block's decision
// is registered when the next block arrives, so with one block per clock a block presented
// in cycle c leaves in cycle c+3 with out_valid high; theta_d and r_d are that block's
// inputs, aligned with psi_bps. The grid unit amplitude is a run-time input in |r| units.
// With the default N_PSI = 7 and B = 32 the test phases are consecutive phase codes.
// The architecture fixes the algorithm, B = 32 and M = 21; the test-phase grid, the 12-bit
// cosine table, the 20-bit distance saturation, the tie rule and the pipelining are this
// implementation's choices. No unwrapping of the pi/2-periodic estimate is done.
module bps
  import dpll_pkg::*;
#(
  parameter int unsigned P     = P_DEF,
  parameter int unsigned N_PSI = N_PSI_DEF,
  parameter int unsigned N_R   = N_R_DEF,
  parameter int unsigned B     = 32,   // number of test phases
  parameter int unsigned M     = 21,   // window length in samples (odd)
  parameter int unsigned DW    = 20    // width of one saturated squared distance
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N_PSI-1:0] theta   [P],
  input  logic [N_R-1:0]   r_mag   [P],
  input  logic [N_R-1:0]   unit,            // 16-QAM grid unit amplitude
  output logic             out_valid,
  output logic [N_PSI-1:0] theta_d [P],     // inputs of the decided block
  output logic [N_R-1:0]   r_d     [P],
  output logic [N_PSI-1:0] psi_bps [P]      // selected test phase per sample
);
  localparam int unsigned NH = (M - 1) / 2;
  localparam int unsigned SW = DW + bits_for(M);   // window-sum width
  localparam int unsigned WX = N_R + 2;
  localparam int unsigned NE = P + 2 * NH;

  initial begin
    assert (M % 2 == 1 && NH <= P) else $error("bps: M must be odd and (M-1)/2 <= P");
  end

  // Test phase b as a phase code (two's complement, modulo 2*pi).
  function automatic logic [N_PSI-1:0] test_phase(input int b);
    return N_PSI'(((b - int'(B) / 2) * (1 << (N_PSI - 2))) / int'(B));
  endfunction

  // Cosine table shared by all lanes and test phases (sin(a) = cos(a - pi/2)).
  localparam int unsigned NC = 12;
  localparam int unsigned NT = 1 << N_PSI;
  typedef logic signed [NC-1:0] table_t [NT];
  function automatic table_t cos_table();
    table_t t;
    for (int i = 0; i < int'(NT); i++) t[i] = NC'(cos_value(i, N_PSI, NC));
    return t;
  endfunction
  localparam table_t COS_T = cos_table();

  // Distances of the arriving block: rotate, convert to Cartesian, slice.
  logic [DW-1:0] d_new [P][B];
  for (genvar k = 0; k < P; k++) begin : g_lane
    for (genvar b = 0; b < B; b++) begin : g_tp
      logic        [N_PSI-1:0]  rot, rot_s;
      logic signed [N_R+NC:0]   px, py;
      logic signed [WX-1:0]     x, y;
      logic        [1:0]        ii, iq;
      logic signed [WX+2:0]     xh, yh;
      logic        [2*WX+5:0]   d2;
      always_comb begin
        rot   = theta[k] - test_phase(b);
        rot_s = rot - N_PSI'(NT / 4);
        px    = $signed({1'b0, r_mag[k]}) * COS_T[rot];
        py    = $signed({1'b0, r_mag[k]}) * COS_T[rot_s];
        x     = WX'(px >>> (NC - 1));
        y     = WX'(py >>> (NC - 1));
      end
      qam16_slicer #(.WX(WX), .WU(N_R)) u_slc (
        .x(x), .y(y), .unit(unit), .idx_i(ii), .idx_q(iq), .x_hat(xh), .y_hat(yh), .dist2(d2));
      assign d_new[k][b] = (d2 >= (2*WX+6)'({DW{1'b1}})) ? {DW{1'b1}} : DW'(d2);
    end
  end

  // Three-block history: d0 newest, d1 being decided, d2 tail of the oldest.
  logic [DW-1:0]    d0 [P][B];
  logic [DW-1:0]    d1 [P][B];
  logic [DW-1:0]    d2 [NH][B];
  logic [N_PSI-1:0] t0 [P], t1 [P];
  logic [N_R-1:0]   m0 [P], m1 [P];
  logic             v0, v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0;
      v1 <= 1'b0;
      for (int k = 0; k < int'(P); k++) begin
        t0[k] <= '0; t1[k] <= '0; m0[k] <= '0; m1[k] <= '0;
        for (int b = 0; b < int'(B); b++) begin
          d0[k][b] <= '0;
          d1[k][b] <= '0;
        end
      end
      for (int k = 0; k < int'(NH); k++)
        for (int b = 0; b < int'(B); b++) d2[k][b] <= '0;
    end else if (in_valid) begin
      v0 <= 1'b1;
      v1 <= v0;
      d0 <= d_new;
      d1 <= d0;
      for (int k = 0; k < int'(NH); k++) d2[k] <= d1[int'(P) - int'(NH) + k];
      t0 <= theta;
      t1 <= t0;
      m0 <= r_mag;
      m1 <= m0;
    end
  end

  // Window sums and minimum search for the block in d1.
  logic [N_PSI-1:0] psi_sel [P];
  always_comb begin
    logic [DW-1:0] ext [NE][B];
    logic [SW-1:0] acc, best;
    int            best_b;
    for (int i = 0; i < int'(NE); i++)
      for (int b = 0; b < int'(B); b++)
        if (i < int'(NH))               ext[i][b] = d2[i][b];
        else if (i < int'(NH + P))      ext[i][b] = d1[i - int'(NH)][b];
        else                            ext[i][b] = d0[i - int'(NH + P)][b];
    for (int k = 0; k < int'(P); k++) begin
      best   = '1;
      best_b = 0;
      for (int b = 0; b < int'(B); b++) begin
        acc = '0;
        for (int i = 0; i < int'(M); i++) acc = acc + SW'(ext[k + i][b]);
        if (acc < best) begin
          best   = acc;
          best_b = b;
        end
      end
      psi_sel[k] = test_phase(best_b);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < int'(P); k++) begin
        theta_d[k] <= '0; r_d[k] <= '0; psi_bps[k] <= '0;
      end
    end else begin
      out_valid <= in_valid && v1;
      if (in_valid) begin
        theta_d <= t1;
        r_d     <= m1;
        psi_bps <= psi_sel;
      end
    end
  end

endmodule
