// atmr_fig3_modules: the three approximate modules of the ATMR generation
// worked example (original function G = ac'd + a'b'(d' + c'), four inputs
// a, b, c, d with a as the most significant bit, UIV threshold 18.75 %,
// i.e. three unprotected vectors out of sixteen).
//
//   f1 = ac'd + a'b'        G complemented at 0011 (a' b' c d)
//   f2 = c'(ad + a'b')      G complemented at 0010 (a' b' c d')
//   f3 = a'b'd' + c'd       G complemented at 0101 (a' b c' d)
// Each complemented vector is blocked for the later modules, so a majority of
// f1, f2, f3 equals G everywhere. Literal count 5 + 5 + 5 = 15 against 21 for
// plain triplication.
//
// The functions are the document's; the port names are this design's own.
// Purely combinational.
module atmr_fig3_modules (
  input  logic [3:0] x,      // {a, b, c, d}
  output logic [2:0] f,      // {f3, f2, f1}: module outputs to the voter
  output logic       g_ref   // original function G, for reference
);

  logic a, b, c, d;

  always_comb begin
    {a, b, c, d} = x;
    f[0]  = (a & ~c & d) | (~a & ~b);
    f[1]  = ~c & ((a & d) | (~a & ~b));
    f[2]  = (~a & ~b & ~d) | (~c & d);
    g_ref = (a & ~c & d) | (~a & ~b & (~d | ~c));
  end

endmodule
