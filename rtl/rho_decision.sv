// rho_decision: block F_k of the parallel 16-QAM DPLL.
//
// For one lane it first forms the demodulated phase reduced to the first quadrant,
//   theta_hat = phi_tilde (+) psi_bar_q ,
// an (N_PSI-2)-bit wrap-around ("overflow") addition of the lane's phase modulo pi/2 and the
// two's complement of the last NCO phase, also modulo pi/2. It then estimates the phase rho
// of the transmitted symbol, reduced to the first quadrant, from the magnitude |r| and
// theta_hat, following the QPSK-partitioning rule:
//   - |r| >= rho_u or |r| <= rho_l (inner and outer ring, diagonal symbols): pi/4;
//   - otherwise (middle ring): atan(1/3) if theta_hat <= pi/4, else atan(3).
// The architecture asks for two comparators, an AND gate and a small look-up table and
// leaves the details open. Here the two magnitude comparators and their AND detect the middle
// ring, a bit test gives theta_hat > pi/4, and the table holds the three angles rounded to
// the nearest (N_PSI-2)-bit code (7, 16 and 25 by default); these details are this
// implementation's choice. The ring bounds are run-time inputs because no values are
// prescribed for them. Purely combinational.
module rho_decision
  import dpll_pkg::*;
#(
  parameter int unsigned N_PSI = N_PSI_DEF,
  parameter int unsigned N_R   = N_R_DEF
) (
  input  logic [N_PSI-3:0] phi_tilde,   // lane phase modulo pi/2
  input  logic [N_PSI-3:0] psi_bar_q,   // (-psi_{n-1}) modulo pi/2
  input  logic [N_R-1:0]   r_mag,       // |r| of the lane
  input  logic [N_R-1:0]   rho_l,       // lower ring bound
  input  logic [N_R-1:0]   rho_u,       // upper ring bound
  output logic [N_PSI-3:0] theta_hat,   // demodulated phase modulo pi/2
  output logic [N_PSI-3:0] rho          // estimated symbol phase modulo pi/2
);
  localparam int unsigned NQ = N_PSI - 2;
  localparam logic [NQ-1:0] CODE_ALPHA0 = NQ'(quarter_code(ATAN_1_3, NQ));
  localparam logic [NQ-1:0] CODE_PI4    = NQ'(1 << (NQ - 1));
  localparam logic [NQ-1:0] CODE_ALPHA1 = NQ'(quarter_code(ATAN_3, NQ));

  logic middle_ring;
  logic upper_half;

  always_comb begin
    theta_hat   = phi_tilde + psi_bar_q;              // modulo pi/2: carry dropped
    middle_ring = (r_mag > rho_l) && (r_mag < rho_u);
    upper_half  = theta_hat > CODE_PI4;
    unique case ({middle_ring, upper_half})
      2'b10:   rho = CODE_ALPHA0;
      2'b11:   rho = CODE_ALPHA1;
      default: rho = CODE_PI4;
    endcase
  end

endmodule
