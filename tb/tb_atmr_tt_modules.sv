// tb_atmr_tt_modules: exhaustive check of the truth-table ATMR modules with
// their default tables, against the rows of the three-input example
// (columns G, AM1, AM2, AM3 for inputs I J K = 000 .. 111), and against a
// second instance loaded with the ATMR made of G and two approximate modules.
module tb_atmr_tt_modules;

  // Rows of the example: {G, AM1, AM2, AM3} per input vector 000..111.
  localparam logic [3:0] ROWS_T4 [8] = '{
    4'b1110, 4'b0000, 4'b0100, 4'b0000,
    4'b1111, 4'b1101, 4'b1111, 4'b0010
  };
  // {G, module 1 (= G), f1, f2}
  localparam logic [3:0] ROWS_T2 [8] = '{
    4'b0000, 4'b0001, 4'b1111, 4'b0010,
    4'b1101, 4'b1111, 4'b1111, 4'b0010
  };

  int checks = 0;
  int failures = 0;

  logic [2:0] x;
  logic [2:0] f4, f2;
  logic       g4, g2;
  logic [7:0] unprot4, unprot2;

  atmr_tt_modules dut4 (.x(x), .f(f4), .g_ref(g4));
  atmr_tt_modules #(
    .N(3), .TT_G(8'b0111_0100), .TT_1(8'b0111_0100),
    .TT_2(8'b1110_1100), .TT_3(8'b0111_0110)
  ) dut2 (.x(x), .f(f2), .g_ref(g2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic maj(input logic [2:0] m);
    return (m[0] & m[1]) | (m[0] & m[2]) | (m[1] & m[2]);
  endfunction

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL x=%b %s: got %b expected %b", x, what, got, exp);
    end
  endtask

  initial begin
    unprot4 = '0;
    unprot2 = '0;
    for (int i = 0; i < 8; i++) begin
      x = 3'(i);
      #1;
      check("table 4 row", {g4, f4[0], f4[1], f4[2]}, ROWS_T4[i]);
      check("table 4 vote", {3'b0, maj(f4)}, {3'b0, ROWS_T4[i][3]});
      check("table 2 row", {g2, f2[0], f2[1], f2[2]}, ROWS_T2[i]);
      check("table 2 vote", {3'b0, maj(f2)}, {3'b0, ROWS_T2[i][3]});
      unprot4[i] = (f4 != {3{g4}});
      unprot2[i] = (f2 != {3{g2}});
    end
    check("table 4 unprotected", {3'b0, unprot4 == 8'b1010_0101}, 4'b0001);  // 000,010,101,111
    check("table 2 unprotected", {3'b0, unprot2 == 8'b1001_1010}, 4'b0001);  // 001,011,100,111
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
