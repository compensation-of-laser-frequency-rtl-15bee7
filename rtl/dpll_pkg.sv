// dpll_pkg: sizes and constants shared by the parallel 16-QAM carrier-recovery blocks.
//
// Phases are unsigned binary angles: an N_PSI-bit code c stands for 2*pi*c/2^N_PSI, so
// modulo-2*pi arithmetic is plain wrap-around arithmetic. Reducing a phase modulo pi/2 keeps
// its N_PSI-2 least significant bits. The default sizes are the synthesized configuration
// of the design: P = 80 lanes, N_PSI = 7 phase bits, N_R = 11 magnitude bits and a loop gain
// Kp = 2^-N_K with N_K = 6. The decision angles atan(1/3), pi/4 and atan(3) of a 16-QAM
// symbol reduced to the first quadrant are rounded to the nearest (N_PSI-2)-bit code.
package dpll_pkg;

  parameter int unsigned P_DEF     = 80;  // parallelization factor
  parameter int unsigned N_PSI_DEF = 7;   // bits of a phase in [0, 2*pi)
  parameter int unsigned N_R_DEF   = 11;  // bits of a sample magnitude |r|
  parameter int unsigned N_K_DEF   = 6;   // Kp = 2^-N_K

  parameter real PI = 3.14159265358979323846;
  parameter real ATAN_1_3 = 0.32175055439664219340;  // atan(1/3)
  parameter real ATAN_3   = 1.24904577239825442582;  // atan(3)

  // Code of an angle in [0, pi/2) on an nbits-bit grid spanning pi/2 (rounded).
  function automatic int unsigned quarter_code(input real angle, input int unsigned nbits);
    return int'($rtoi(angle * real'(1 << nbits) / (PI / 2.0) + 0.5));
  endfunction

  // Number of bits needed to hold the values 0..n (at least 1).
  function automatic int unsigned bits_for(input int unsigned n);
    int unsigned b = 1;
    while ((64'(1) << b) <= 64'(n)) b++;
    return b;
  endfunction

  // Entry i of a 2^n_psi-entry cosine table with nc-bit signed entries:
  // round((2^(nc-1)-1) * cos(2*pi*i/2^n_psi)), evaluated by a power series at elaboration.
  function automatic int cos_value(input int i, input int unsigned n_psi, input int unsigned nc);
    real a    = 2.0 * PI * real'(i) / real'(1 << n_psi);
    real term = 1.0;
    real s    = 1.0;
    real c;
    if (a > PI) a = a - 2.0 * PI;              // keep the series argument in [-pi, pi]
    for (int k = 1; k < 20; k++) begin
      term = -term * a * a / real'((2 * k - 1) * (2 * k));
      s    = s + term;
    end
    c = s * real'((1 << (nc - 1)) - 1);
    return $rtoi(c >= 0.0 ? c + 0.5 : c - 0.5);
  endfunction

endpackage
