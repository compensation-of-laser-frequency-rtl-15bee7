// rho_accumulator: sum of the estimated symbol phases of a block and its two's complement.
//
// Adds the (N_PSI-2)-bit estimates rho_0 .. rho_{N-1} with a carry-save adder tree and
// returns -(sum) modulo 2^(N_PSI+N_K), the term the NCO adds in place of subtracting the
// sum (the "two's comp. & mod Kp^-1 2pi" box). Because the NCO accumulator is N_PSI+N_K bits
// wide and wraps modulo 2*pi/Kp, the carry out of the complement is dropped. Used with
// N = P ahead of the pipeline register of the NCO branch P-1, and with N = k+1 behind the
// per-lane registers for the output branches W_k. Purely combinational.
module rho_accumulator
  import dpll_pkg::*;
#(
  parameter int unsigned N     = P_DEF,
  parameter int unsigned N_PSI = N_PSI_DEF,
  parameter int unsigned N_K   = N_K_DEF
) (
  input  logic [N_PSI-3:0]     rho [N],
  output logic [N_PSI+N_K-1:0] rho_bar   // -(sum of rho) modulo 2^(N_PSI+N_K)
);
  localparam int unsigned W = N_PSI + N_K;

  logic [W-1:0] ops [N];
  logic [W-1:0] rho_sum;

  always_comb
    for (int i = 0; i < int'(N); i++) ops[i] = W'(rho[i]);

  csa_tree #(.N_OPS(N), .W(W)) u_csa (.ops(ops), .sum(rho_sum));

  assign rho_bar = ~rho_sum + W'(1);

endmodule
