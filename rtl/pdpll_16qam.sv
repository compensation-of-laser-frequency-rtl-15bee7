// pdpll_16qam: low-latency parallel first-order (type I) phase-domain DPLL for 16-QAM.
//
// The receiver runs at one block of P samples per clock (f_clock = 1/(P*T)). Each sample
// enters as its phase theta (N_PSI bits over [0, 2*pi)) and magnitude |r| (N_R bits). The
// phases are reduced modulo pi/2 by keeping their N_PSI-2 low bits, which strips the QPSK
// part of the symbol. The serial loop psi_n = psi_{n-1} + Kp*eps_n with phase error
// eps_n = (phi_tilde_n - psi_{n-1})_{pi/2} - rho_n is unrolled over the block: every lane of a
// block is demodulated with the same phase psi_{n-1}, and lane m gets
//   psi_{n+m} = psi_{n-1} + Kp * sum_{k<=m} eps_{n+k}.
// The symbol-phase estimates rho are computed one cycle ahead, from the NCO phase of the
// previous block, so only adders remain inside the one-cycle loop (nco_branch_last).
// Branch P-1 closes the loop; branches W_0..W_{P-2} (w_branch, each with its own
// rho_accumulator) give the phases of the other lanes.
//
// Timing: a block presented with in_valid in cycle c is registered at the end of cycle c;
// during cycle c+1 psi[] holds its NCO phases (combinationally from the registers) and
// out_valid is high. psi[m] belongs to lane m of that block (lane 0 is the oldest sample).
// Kp = 2^-N_K. Ring bounds rho_l < rho_u are run-time inputs in |r| units. The loop
// structure, widths and default sizes follow the published architecture; in_valid, the
// reset and the per-branch rho sums of W_0..W_{P-2} are this implementation's additions.
module pdpll_16qam
  import dpll_pkg::*;
#(
  parameter int unsigned P     = P_DEF,
  parameter int unsigned N_PSI = N_PSI_DEF,
  parameter int unsigned N_R   = N_R_DEF,
  parameter int unsigned N_K   = N_K_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N_PSI-1:0] theta [P],   // received phases, lane 0 oldest
  input  logic [N_R-1:0]   r_mag [P],   // received magnitudes
  input  logic [N_R-1:0]   rho_l,       // lower ring bound
  input  logic [N_R-1:0]   rho_u,       // upper ring bound
  output logic             out_valid,
  output logic [N_PSI-1:0] psi   [P]    // NCO phase per lane of the registered block
);
  localparam int unsigned W  = N_PSI + N_K;
  localparam int unsigned NQ = N_PSI - 2;

  // Mod pi/2 blocks: keep the N_PSI-2 least significant bits.
  logic [NQ-1:0] phi_tilde [P];
  always_comb
    for (int k = 0; k < int'(P); k++) phi_tilde[k] = theta[k][NQ-1:0];

  logic [W-1:0]     acc, acc_next;
  logic [N_PSI-1:0] psi_prev;
  logic [NQ-1:0]    dem   [P];
  logic [NQ-1:0]    rho_q [P];

  nco_branch_last #(.P(P), .N_PSI(N_PSI), .N_R(N_R), .N_K(N_K)) u_loop (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .phi_in(phi_tilde), .r_in(r_mag), .rho_l(rho_l), .rho_u(rho_u),
    .acc(acc), .psi_prev(psi_prev), .dem(dem), .rho_q(rho_q),
    .acc_next(acc_next), .psi_last(psi[P-1]));

  // Output branches W_0 .. W_{P-2}.
  for (genvar m = 0; m < P - 1; m++) begin : g_w
    logic [NQ-1:0] rho_m [m+1];
    logic [NQ-1:0] dem_m [m+1];
    logic [W-1:0]  rho_bar_m;
    logic [W-1:0]  acc_m;
    for (genvar j = 0; j <= m; j++) begin : g_sel
      assign rho_m[j] = rho_q[j];
      assign dem_m[j] = dem[j];
    end
    rho_accumulator #(.N(m + 1), .N_PSI(N_PSI), .N_K(N_K)) u_rho_sum (
      .rho(rho_m), .rho_bar(rho_bar_m));
    w_branch #(.K(m), .N_PSI(N_PSI), .N_K(N_K)) u_w (
      .acc(acc), .dem(dem_m), .rho_bar(rho_bar_m), .acc_out(acc_m), .psi(psi[m]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

endmodule
