// cpr_top: two-stage carrier recovery for a parallel 16-QAM coherent receiver.
//
// Stage 1 is the low-latency parallel DPLL (pdpll_16qam), which tracks carrier frequency
// offset and slow, large frequency fluctuations (e.g. from mechanical vibration) with a loop
// latency of one clock. Its phase is removed from each sample (phase_derotator). Stage 2 is
// a blind phase search (bps), which removes the remaining fast laser phase noise; its
// estimate is removed by a second phase_derotator, and a 16-QAM slicer makes the decisions.
// Samples enter in polar form (phase and magnitude, as the phase-domain DPLL needs them),
// P per clock cycle; lane 0 is the oldest sample of a block.
//
// Timing with one block per clock: the DPLL phases of the block presented in cycle c are
// ready in cycle c+1 (the input is held one cycle to meet them), the first derotation is
// registered into c+2, the BPS decides in c+5, the second derotation is registered into c+6,
// and the decisions sym_i/sym_q follow combinationally with out_valid. A block leaves the
// BPS only when the next block has entered it, so a stream must be followed by one more
// block to flush its last block. Run-time inputs: the ring bounds rho_l < rho_u of the DPLL
// symbol-phase decision and the grid unit amplitude of the BPS and slicer, all in |r| units.
// The chain of stages follows the receiver architecture; polar inputs, phase-domain
// derotation, the valid handshake and the pipeline registers are this implementation's
// choices. The dispersion compensator ahead of it, the rectangular-to-polar conversion and a
// differential quadrant decoder are not part of this block.
module cpr_top
  import dpll_pkg::*;
#(
  parameter int unsigned P     = P_DEF,
  parameter int unsigned N_PSI = N_PSI_DEF,
  parameter int unsigned N_R   = N_R_DEF,
  parameter int unsigned N_K   = N_K_DEF,
  parameter int unsigned B     = 32,
  parameter int unsigned M     = 21
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N_PSI-1:0] theta     [P],   // received phase per lane
  input  logic [N_R-1:0]   r_mag     [P],   // received magnitude per lane
  input  logic [N_R-1:0]   rho_l,           // DPLL lower ring bound
  input  logic [N_R-1:0]   rho_u,           // DPLL upper ring bound
  input  logic [N_R-1:0]   qam_unit,        // 16-QAM grid unit amplitude
  output logic [N_PSI-1:0] psi_dpll  [P],   // DPLL phase (valid with dpll_valid)
  output logic             dpll_valid,
  output logic             out_valid,
  output logic [N_PSI-1:0] theta_out [P],   // fully derotated phase
  output logic [N_R-1:0]   r_out     [P],
  output logic [1:0]       sym_i     [P],   // decided level index, 0..3 = -3,-1,+1,+3
  output logic [1:0]       sym_q     [P]
);
  localparam int unsigned WX = N_R + 2;

  // Stage 1: parallel DPLL, with the input held one cycle to align with its phases.
  logic [N_PSI-1:0] theta_q [P];
  logic [N_R-1:0]   r_q     [P];

  pdpll_16qam #(.P(P), .N_PSI(N_PSI), .N_R(N_R), .N_K(N_K)) u_dpll (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .theta(theta), .r_mag(r_mag),
    .rho_l(rho_l), .rho_u(rho_u), .out_valid(dpll_valid), .psi(psi_dpll));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(P); k++) begin
        theta_q[k] <= '0;
        r_q[k]     <= '0;
      end
    end else if (in_valid) begin
      theta_q <= theta;
      r_q     <= r_mag;
    end
  end

  logic             rot1_valid;
  logic [N_PSI-1:0] theta_1 [P];
  logic [N_R-1:0]   r_1     [P];

  phase_derotator #(.P(P), .N_PSI(N_PSI), .N_R(N_R)) u_rot1 (
    .clk(clk), .rst_n(rst_n), .in_valid(dpll_valid), .theta(theta_q), .r_mag(r_q),
    .psi(psi_dpll), .out_valid(rot1_valid), .theta_out(theta_1), .r_out(r_1));

  // Stage 2: blind phase search and second derotation.
  logic             bps_valid;
  logic [N_PSI-1:0] theta_2 [P];
  logic [N_R-1:0]   r_2     [P];
  logic [N_PSI-1:0] psi_2   [P];

  bps #(.P(P), .N_PSI(N_PSI), .N_R(N_R), .B(B), .M(M)) u_bps (
    .clk(clk), .rst_n(rst_n), .in_valid(rot1_valid), .theta(theta_1), .r_mag(r_1),
    .unit(qam_unit), .out_valid(bps_valid), .theta_d(theta_2), .r_d(r_2), .psi_bps(psi_2));

  phase_derotator #(.P(P), .N_PSI(N_PSI), .N_R(N_R)) u_rot2 (
    .clk(clk), .rst_n(rst_n), .in_valid(bps_valid), .theta(theta_2), .r_mag(r_2),
    .psi(psi_2), .out_valid(out_valid), .theta_out(theta_out), .r_out(r_out));

  // 16-QAM slicer.
  for (genvar k = 0; k < P; k++) begin : g_slice
    logic signed [WX-1:0]   x, y;
    logic signed [WX+2:0]   xh, yh;
    logic        [2*WX+5:0] d2;
    polar_to_cart #(.N_PSI(N_PSI), .N_R(N_R)) u_p2c (
      .r_mag(r_out[k]), .theta(theta_out[k]), .x(x), .y(y));
    qam16_slicer #(.WX(WX), .WU(N_R)) u_slc (
      .x(x), .y(y), .unit(qam_unit), .idx_i(sym_i[k]), .idx_q(sym_q[k]),
      .x_hat(xh), .y_hat(yh), .dist2(d2));
  end

endmodule
