// csa_tree: multi-operand adder, modulo 2^W, built as a Wallace tree of carry-save adders.
//
// The N_OPS operands are reduced three at a time by 3:2 carry-save stages (sum = a^b^c,
// carry = majority(a,b,c) shifted left by one) until two words remain; one carry-propagate
// adder then forms the result. The carries out of bit W-1 are dropped, so the result is the
// sum modulo 2^W, which is what the NCO's modulo-2*pi additions need. The number of levels
// grows as log base 3/2 of N_OPS, which keeps the adder shallow for the one-cycle NCO loop.
// The architecture names carry-save / Wallace-tree adders for this sum; the row structure
// used here is the textbook one. Purely combinational.
module csa_tree #(
  parameter int unsigned N_OPS = 4,
  parameter int unsigned W     = 13
) (
  input  logic [W-1:0] ops [N_OPS],
  output logic [W-1:0] sum
);
  // Operand count after l levels of 3:2 reduction.
  function automatic int unsigned count_at(input int unsigned l);
    int unsigned c = N_OPS;
    for (int unsigned i = 0; i < l && c > 2; i++) c = c - c / 3;
    return c;
  endfunction

  function automatic int unsigned n_levels();
    int unsigned l = 0;
    while (count_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned NL = n_levels();

  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    localparam int unsigned C = count_at(l);
    logic [W-1:0] v [C];
    if (l == 0) begin : g_in
      assign v = ops;
    end else begin : g_red
      localparam int unsigned CP = count_at(l - 1);
      localparam int unsigned G  = CP / 3;
      for (genvar g = 0; g < G; g++) begin : g_fa
        wire [W-1:0] a = g_lvl[l-1].v[3*g];
        wire [W-1:0] b = g_lvl[l-1].v[3*g+1];
        wire [W-1:0] c = g_lvl[l-1].v[3*g+2];
        assign v[2*g]   = a ^ b ^ c;
        assign v[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
      end
      for (genvar r = 0; r < CP - 3 * G; r++) begin : g_pass
        assign v[2*G+r] = g_lvl[l-1].v[3*G+r];
      end
    end
  end

  if (count_at(NL) == 1) begin : g_one
    assign sum = g_lvl[NL].v[0];
  end else begin : g_cpa
    assign sum = g_lvl[NL].v[0] + g_lvl[NL].v[1];
  end

endmodule
