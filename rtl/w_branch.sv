// w_branch: output branch W_k of the parallel DPLL, i.e. the NCO phase of lane K.
//
// With every lane of a block demodulated by the same previous NCO phase psi_{n-1}, the
// phase of lane K is
//   Kp^-1 psi_{n+K} = Kp^-1 psi_{n-1} + sum_{j<=K} (phi_tilde_{n+j} - psi_{n-1})_{pi/2}
//                                     - sum_{j<=K} rho_{n+j}       (modulo 2*pi/Kp).
// The block adds the accumulator value acc (Kp^-1 psi_{n-1}), the K+1 demodulated phases
// dem[0..K] (already reduced modulo pi/2) and the complemented rho sum rho_bar in one
// carry-save adder tree of N_PSI+N_K bits. The lane phase psi is the top N_PSI bits, since
// Kp = 2^-N_K makes the multiplication by Kp a right shift. Purely combinational: the
// loop closes in one clock cycle (loop latency L_w = 1). The architecture details the
// adder structure of the last branch only; the other branches reuse it with fewer lanes.
module w_branch
  import dpll_pkg::*;
#(
  parameter int unsigned K     = 0,
  parameter int unsigned N_PSI = N_PSI_DEF,
  parameter int unsigned N_K   = N_K_DEF
) (
  input  logic [N_PSI+N_K-1:0] acc,        // Kp^-1 psi_{n-1}
  input  logic [N_PSI-3:0]     dem [K+1],  // (phi_tilde_{n+j} - psi_{n-1}) mod pi/2, j = 0..K
  input  logic [N_PSI+N_K-1:0] rho_bar,    // -(rho_n + ... + rho_{n+K})
  output logic [N_PSI+N_K-1:0] acc_out,    // Kp^-1 psi_{n+K}
  output logic [N_PSI-1:0]     psi         // psi_{n+K}
);
  localparam int unsigned W = N_PSI + N_K;

  logic [W-1:0] ops [K+3];

  always_comb begin
    ops[0] = acc;
    ops[1] = rho_bar;
    for (int j = 0; j <= int'(K); j++) ops[j+2] = W'(dem[j]);
  end

  csa_tree #(.N_OPS(K + 3), .W(W)) u_csa (.ops(ops), .sum(acc_out));

  assign psi = acc_out[W-1:N_K];

endmodule
