// atmr_fig6_modules: the three approximate modules of the
// input-vulnerability-aware ATMR worked example (original function
// G = c'(b' + ad), four inputs a, b, c, d with a as the most significant bit).
//
// Vectors 0000 and 0001 were found vulnerable by test pattern generation and
// are pre-blocked: no module may change G there. The modules are
//   f1 = c'(a + b')   G complemented at 1100 (a b c' d')
//   f2 = c'b'         G complemented at 1101 (a b c' d)
//   f3 = c'(d + b')   G complemented at 0101 (a' b c' d)
// Each unprotected vector is changed in exactly one module, so a majority of
// f1, f2, f3 equals G for every input. The three modules use 3 + 2 + 3 = 8
// literals against 12 for plain triplication of G.
//
// The functions and the reference output G are the document's; the output
// bundle and port names are this design's own. Purely combinational.
module atmr_fig6_modules (
  input  logic [3:0] x,      // {a, b, c, d}
  output logic [2:0] f,      // {f3, f2, f1}: module outputs to the voter
  output logic       g_ref   // original function G, for reference
);

  logic a, b, c, d;

  always_comb begin
    {a, b, c, d} = x;
    f[0]  = ~c & (a | ~b);
    f[1]  = ~c & ~b;
    f[2]  = ~c & (d | ~b);
    g_ref = ~c & (~b | (a & d));
  end

endmodule
