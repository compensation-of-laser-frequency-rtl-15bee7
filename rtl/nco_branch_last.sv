// nco_branch_last: the feedback loop of the parallel DPLL, built around NCO branch P-1.
//
// Each clock cycle carries one block of P samples. The block arriving now (samples
// n+P .. n+2P-1, given as phases modulo pi/2 and magnitudes) goes to the P blocks F_k, which
// estimate the symbol phases rho with the NCO phase psi_{n-1} held in the accumulator, i.e.
// one block older than the phase that will later demodulate these samples (the low-latency
// approximation). The lower carry-save tree sums the P estimates, complements the sum, and
// the result is registered together with the block's phases. In the next cycle the registered
// phases are demodulated by the then-current psi (P overflow adders modulo pi/2) and the
// upper carry-save tree forms Kp^-1 psi of the last lane, which is written back into the
// accumulator: the loop latency is one cycle (L_w = 1). The accumulator holds Kp^-1 psi in
// N_PSI+N_K bits; psi is its top N_PSI bits and psi_bar_q the N_PSI-2 low bits of -psi.
//
// Besides the loop state, the module exports what the other output branches W_0..W_{P-2}
// need: the demodulated phases dem[] and the per-lane registered estimates rho_q[].
// Registers load only when in_valid is high (one block per clock at full rate); rst_n clears
// them, starting the NCO at phase 0. The ring bounds rho_l, rho_u are run-time inputs.
// Register placement and bit widths follow the architecture's drawing of this branch; the
// valid gating, the reset and the extra per-lane rho registers are additions.
module nco_branch_last
  import dpll_pkg::*;
#(
  parameter int unsigned P     = P_DEF,
  parameter int unsigned N_PSI = N_PSI_DEF,
  parameter int unsigned N_R   = N_R_DEF,
  parameter int unsigned N_K   = N_K_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N_PSI-3:0]     phi_in [P],   // phi_tilde_{n+P+k}
  input  logic [N_R-1:0]       r_in   [P],   // |r_{n+P+k}|
  input  logic [N_R-1:0]       rho_l,
  input  logic [N_R-1:0]       rho_u,
  output logic [N_PSI+N_K-1:0] acc,          // Kp^-1 psi_{n-1}
  output logic [N_PSI-1:0]     psi_prev,     // psi_{n-1}
  output logic [N_PSI-3:0]     dem    [P],   // (phi_tilde_{n+k} - psi_{n-1}) mod pi/2
  output logic [N_PSI-3:0]     rho_q  [P],   // rho_{n+k}, registered
  output logic [N_PSI+N_K-1:0] acc_next,     // Kp^-1 psi_{n+P-1}
  output logic [N_PSI-1:0]     psi_last      // psi_{n+P-1}
);
  localparam int unsigned W  = N_PSI + N_K;
  localparam int unsigned NQ = N_PSI - 2;

  logic [NQ-1:0] psi_bar_q;
  logic [NQ-1:0] rho_new  [P];
  logic [NQ-1:0] theta_hat[P];
  logic [NQ-1:0] phi_q    [P];
  logic [W-1:0]  rho_bar_new;
  logic [W-1:0]  rho_bar_q;

  // x Kp (bit shift), then two's complement modulo pi/2.
  assign psi_prev  = acc[W-1:N_K];
  assign psi_bar_q = NQ'(~psi_prev + N_PSI'(1));

  // Blocks F_0 .. F_{P-1}.
  for (genvar k = 0; k < P; k++) begin : g_f
    rho_decision #(.N_PSI(N_PSI), .N_R(N_R)) u_f (
      .phi_tilde(phi_in[k]), .psi_bar_q(psi_bar_q), .r_mag(r_in[k]),
      .rho_l(rho_l), .rho_u(rho_u), .theta_hat(theta_hat[k]), .rho(rho_new[k]));
  end

  // Lower CSA with two's complement modulo 2*pi/Kp.
  rho_accumulator #(.N(P), .N_PSI(N_PSI), .N_K(N_K)) u_rho_sum (
    .rho(rho_new), .rho_bar(rho_bar_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      rho_bar_q <= '0;
      for (int k = 0; k < int'(P); k++) begin
        phi_q[k] <= '0;
        rho_q[k] <= '0;
      end
    end else if (in_valid) begin
      acc       <= acc_next;
      rho_bar_q <= rho_bar_new;
      phi_q     <= phi_in;
      rho_q     <= rho_new;
    end
  end

  // Overflow adders: demodulation of the registered block modulo pi/2.
  always_comb
    for (int k = 0; k < int'(P); k++) dem[k] = phi_q[k] + psi_bar_q;

  // Upper CSA: branch P-1 closes the loop.
  w_branch #(.K(P - 1), .N_PSI(N_PSI), .N_K(N_K)) u_w_last (
    .acc(acc), .dem(dem), .rho_bar(rho_bar_q), .acc_out(acc_next), .psi(psi_last));

endmodule
