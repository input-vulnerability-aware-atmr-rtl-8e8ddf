// tb_quad_switch: exhaustive check of the quadded transistor structure.
//
// For an NMOS and a PMOS instance, every gate value and every combination of
// gate-terminal faults on the four transistors (3^4 cases) is applied. The
// conduction is compared with a per-transistor model written here, and for up
// to three faults the stated tolerance rule is checked: the structure behaves
// like a single fault-free transistor unless two transistors of one parallel
// pair are open, or two closed transistors sit in different pairs.
module tb_quad_switch;
  import atmr_pkg::*;

  int checks = 0;
  int failures = 0;

  logic   g;
  stuck_e flt [4];
  logic   n_up, n_lo, n_on;
  logic   p_up, p_lo, p_on;

  quad_switch #(.IS_PMOS(1'b0)) dut_n (.g(g), .fault(flt),
                                       .on_upper(n_up), .on_lower(n_lo), .on(n_on));
  quad_switch #(.IS_PMOS(1'b1)) dut_p (.g(g), .fault(flt),
                                       .on_upper(p_up), .on_lower(p_lo), .on(p_on));

  // Watchdog.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Switch state of one transistor: 0 normal, 1 open, 2 closed.
  function automatic int sw_state(input stuck_e f, input bit is_p);
    if (f == SA_NONE) return 0;
    if (is_p) return (f == SA_1) ? 1 : 2;
    return (f == SA_0) ? 1 : 2;
  endfunction

  task automatic check_one(input bit is_p, input logic got_on);
    int  st [4];
    int  nfault;
    bit  pair_ok [2];
    bit  exp_on, normal_on, par_open, ser_closed, tolerated;
    normal_on = is_p ? !g : g;
    nfault = 0;
    for (int i = 0; i < 4; i++) begin
      st[i] = sw_state(flt[i], is_p);
      if (st[i] != 0) nfault++;
    end
    for (int p = 0; p < 2; p++) begin
      pair_ok[p] = 0;
      for (int k = 0; k < 2; k++) begin
        if (st[2*p+k] == 2 || (st[2*p+k] == 0 && normal_on)) pair_ok[p] = 1;
      end
    end
    exp_on = pair_ok[0] && pair_ok[1];
    checks++;
    if (got_on !== exp_on) begin
      failures++;
      $display("FAIL is_p=%0b g=%0b faults=%p on=%0b exp=%0b", is_p, g, flt, got_on, exp_on);
    end
    if (nfault <= 3) begin
      par_open   = (st[0] == 1 && st[1] == 1) || (st[2] == 1 && st[3] == 1);
      ser_closed = (st[0] == 2 || st[1] == 2) && (st[2] == 2 || st[3] == 2);
      tolerated  = !par_open && !ser_closed;
      if (tolerated) begin
        checks++;
        if (got_on !== normal_on) begin
          failures++;
          $display("FAIL rule: is_p=%0b g=%0b faults=%p tolerated but on=%0b",
                   is_p, g, flt, got_on);
        end
      end
    end
  endtask

  int single_masked = 0;
  int r, nf;

  initial begin
    for (int gv = 0; gv < 2; gv++) begin
      for (int code = 0; code < 81; code++) begin
        r = code;
        nf = 0;
        for (int i = 0; i < 4; i++) begin
          flt[i] = stuck_e'(r % 3);
          if (r % 3 != 0) nf++;
          r = r / 3;
        end
        g = gv[0];
        #1;
        check_one(1'b0, n_on);
        check_one(1'b1, p_on);
        // Pair outputs agree with the whole structure.
        checks++;
        if ((n_up & n_lo) !== n_on || (p_up & p_lo) !== p_on) begin
          failures++;
          $display("FAIL pair outputs inconsistent");
        end
        if (nf == 1 && n_on == g && p_on == !g) single_masked++;
      end
    end
    // 4 transistors x 2 stuck values x 2 gate values, all masked.
    checks++;
    if (single_masked != 16) begin
      failures++;
      $display("FAIL single faults masked %0d of 16", single_masked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
