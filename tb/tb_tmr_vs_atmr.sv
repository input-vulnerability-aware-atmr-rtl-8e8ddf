// tb_tmr_vs_atmr: the same fault-tolerant voter behind plain TMR and behind
// ATMR, for the three-input example function G (1 at 000, 100, 101, 110).
//
// TMR uses three copies of G; ATMR uses the approximate modules AM1, AM2, AM3
// (unprotected vectors 000, 010, 101, 111). For every input and every single
// voter-input flip:
//   - TMR masks all 24 cases;
//   - ATMR masks the flip on the 4 protected vectors (12 cases) and, on each
//     unprotected vector, only the flip of the module that already disagrees
//     with G (4 cases), so 16 of 24 are masked and 8 are not.
// Without flips both give G, and with every single quadded-transistor fault in
// the voter both still give G. The expected counts are worked out from the
// truth tables, not from the design.
module tb_tmr_vs_atmr;
  import atmr_pkg::*;

  localparam logic [7:0] TT_G = 8'b0111_0001;

  int checks = 0;
  int failures = 0;

  logic [2:0]   x, flip;
  logic [2:0]   f_tmr, f_atmr;
  logic         g_tmr, g_atmr;
  voter_fault_t vflt;
  logic         v_tmr, v_atmr, ok_tmr, ok_atmr;

  atmr_tt_modules #(.N(3), .TT_G(TT_G), .TT_1(TT_G), .TT_2(TT_G), .TT_3(TT_G))
    u_tmr (.x(x), .f(f_tmr), .g_ref(g_tmr));
  atmr_tt_modules u_atmr (.x(x), .f(f_atmr), .g_ref(g_atmr));

  ptl_voter u_v_tmr  (.a(f_tmr[0] ^ flip[0]), .b(f_tmr[1] ^ flip[1]),
                      .c(f_tmr[2] ^ flip[2]), .flt(vflt), .v(v_tmr), .v_valid(ok_tmr));
  ptl_voter u_v_atmr (.a(f_atmr[0] ^ flip[0]), .b(f_atmr[1] ^ flip[1]),
                      .c(f_atmr[2] ^ flip[2]), .flt(vflt), .v(v_atmr), .v_valid(ok_atmr));

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
      $display("FAIL x=%b flip=%b %s: got %0b expected %0b", x, flip, what, got, exp);
    end
  endtask

  int masked_tmr, masked_atmr;
  int fi, t, sv;

  initial begin
    masked_tmr = 0;
    masked_atmr = 0;
    vflt = VOTER_NO_FAULT;
    for (int i = 0; i < 8; i++) begin
      x = 3'(i);
      flip = '0;
      #1;
      check("TMR no fault", ok_tmr && v_tmr == TT_G[i], 1'b1);
      check("ATMR no fault", ok_atmr && v_atmr == TT_G[i], 1'b1);
      for (fi = 0; fi < 3; fi++) begin
        flip = 3'(1 << fi);
        #1;
        if (ok_tmr && v_tmr == TT_G[i]) masked_tmr++;
        if (ok_atmr && v_atmr == TT_G[i]) masked_atmr++;
      end
      flip = '0;
      for (t = 0; t < 16; t++) begin
        for (sv = 1; sv <= 2; sv++) begin
          vflt = VOTER_NO_FAULT;
          vflt.gate[t] = stuck_e'(sv);
          #1;
          check("TMR quad fault", ok_tmr && v_tmr == TT_G[i], 1'b1);
          check("ATMR quad fault", ok_atmr && v_atmr == TT_G[i], 1'b1);
        end
      end
      vflt = VOTER_NO_FAULT;
    end
    $display("single voter-input flips masked: TMR %0d/24, ATMR %0d/24",
             masked_tmr, masked_atmr);
    checks++;
    if (masked_tmr != 24) begin
      failures++;
      $display("FAIL TMR masked %0d of 24", masked_tmr);
    end
    checks++;
    if (masked_atmr != 16) begin
      failures++;
      $display("FAIL ATMR masked %0d of 24, expected 16", masked_atmr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
