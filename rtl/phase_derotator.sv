// phase_derotator: removes a carrier-phase estimate from a block of samples.
//
// In the phase domain the complex multiplication r_n * exp(-j*psi_n) is a modulo-2*pi
// subtraction of the phase codes, theta_n - psi_n, with the magnitude |r_n| unchanged. The
// block derotates all P lanes in parallel and registers the result: a block presented with
// in_valid in cycle c appears on the outputs, with out_valid, in cycle c+1. The caller aligns
// theta and psi of the same sample. Used for both derotations of the two-stage carrier
// recovery (after the DPLL and after the blind phase search). The receiver architecture draws
// complex multipliers here; doing it as a phase subtraction, with one register stage, is
// this implementation's choice.
module phase_derotator
  import dpll_pkg::*;
#(
  parameter int unsigned P     = P_DEF,
  parameter int unsigned N_PSI = N_PSI_DEF,
  parameter int unsigned N_R   = N_R_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N_PSI-1:0] theta    [P],
  input  logic [N_R-1:0]   r_mag    [P],
  input  logic [N_PSI-1:0] psi      [P],
  output logic             out_valid,
  output logic [N_PSI-1:0] theta_out[P],  // theta - psi modulo 2*pi
  output logic [N_R-1:0]   r_out    [P]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < int'(P); k++) begin
        theta_out[k] <= '0;
        r_out[k]     <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int k = 0; k < int'(P); k++) begin
          theta_out[k] <= theta[k] - psi[k];
          r_out[k]     <= r_mag[k];
        end
    end
  end

endmodule
