// atmr_tt_modules: three ATMR modules of an N-input function, each given as a
// truth table, plus the original function for reference.
//
// Bit i of a table is the module output for input vector i (the input read as
// an unsigned number, first-named input most significant). The defaults are
// the three-input example used to explain the voter (inputs I, J, K;
// G = 1 at 000, 100, 101, 110):
//   AM1 (A) differs from G at 010,
//   AM2 (B) differs from G at 101 and 111,
//   AM3 (C) differs from G at 000,
// so 000, 010, 101 and 111 are the unprotected vectors. Other worked examples
// are obtained by overriding the tables.
//
// The default tables are the document's. The document gives these modules only
// as truth tables, so they are built as table lookups (synthesis minimises
// them). Purely combinational.
module atmr_tt_modules #(
  parameter int unsigned       N    = 3,
  parameter logic [2**N-1:0]   TT_G = 8'b0111_0001,  // original function G
  parameter logic [2**N-1:0]   TT_1 = 8'b0111_0101,  // module 1 (AM1)
  parameter logic [2**N-1:0]   TT_2 = 8'b1101_0001,  // module 2 (AM2)
  parameter logic [2**N-1:0]   TT_3 = 8'b0111_0000   // module 3 (AM3)
) (
  input  logic [N-1:0] x,      // input vector
  output logic [2:0]   f,      // {f3, f2, f1}: module outputs to the voter
  output logic         g_ref   // original function G, for reference
);

  always_comb begin
    f[0]  = TT_1[x];
    f[1]  = TT_2[x];
    f[2]  = TT_3[x];
    g_ref = TT_G[x];
  end

endmodule
