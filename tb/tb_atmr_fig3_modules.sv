// tb_atmr_fig3_modules: exhaustive check of the fig3 ATMR modules.
//
// G = ac'd + a'b'(d'+c'); f1, f2, f3 complement G at 0011, 0010, 0101.
// The reference truth table of G (bit i = G at input i, input {a,b,c,d}) is
// read off the Karnaugh map of the example. The test checks G, each module
// against G with its one complemented vector, that the majority of the three
// modules equals G everywhere, that no vector is changed in two modules, and
// that pre-blocked vectors are left unchanged in every module.
module tb_atmr_fig3_modules;

  localparam logic [15:0] TT_G      = 16'h2207;
  localparam logic [15:0] PREBLOCK  = 16'h0000;
  localparam logic [15:0] COMP1     = 16'(1) << 3;
  localparam logic [15:0] COMP2     = 16'(1) << 2;
  localparam logic [15:0] COMP3     = 16'(1) << 5;

  int checks = 0;
  int failures = 0;

  logic [3:0] x;
  logic [2:0] f;
  logic       g_ref;
  logic       exp_g, vote;
  int         unprotected;

  atmr_fig3_modules dut (.x(x), .f(f), .g_ref(g_ref));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL x=%b %s: got %0b expected %0b", x, what, got, exp);
    end
  endtask

  initial begin
    unprotected = 0;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      exp_g = TT_G[i];
      check("G", g_ref, exp_g);
      check("f1", f[0], exp_g ^ COMP1[i]);
      check("f2", f[1], exp_g ^ COMP2[i]);
      check("f3", f[2], exp_g ^ COMP3[i]);
      vote = (f[0] & f[1]) | (f[0] & f[2]) | (f[1] & f[2]);
      check("majority", vote, exp_g);
      checks++;
      if (((f[0] != exp_g) + (f[1] != exp_g) + (f[2] != exp_g)) > 1) begin
        failures++;
        $display("FAIL x=%b changed in more than one module", x);
      end
      if (PREBLOCK[i]) check("pre-blocked", f == {3{exp_g}}, 1'b1);
      if (f != {3{exp_g}}) unprotected++;
    end
    checks++;
    if (unprotected != 3) begin
      failures++;
      $display("FAIL %0d unprotected vectors, expected 3", unprotected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
