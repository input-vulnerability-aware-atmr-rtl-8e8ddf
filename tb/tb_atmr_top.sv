// tb_atmr_top: end-to-end test of the four ATMR channels with their voters.
//
// The reference tables of G and of the three modules of each channel are
// taken from the worked examples and kept here, independent of the design.
// For every input vector of every channel the test applies:
//   - no fault: the voter output must equal G;
//   - a flip of one voter input (a fault on a module output): the output must
//     equal the majority of the flipped module outputs. On a protected vector
//     this is masked; on an unprotected vector flipping one of the two modules
//     that agree with G is not, which is the weakness of ATMR against TMR;
//   - each single gate fault on the sixteen quadded voter transistors: masked;
//   - each gate fault on the mux pair Tp9/Tn9: wrong or undefined exactly when
//     the hand-derived condition on the voter inputs A, B, C holds;
//   - the worked case: the three-input example at 000 with module 1 flipped
//     gives 0 instead of 1.
// Every mechanism is counted and must occur at least once. The top has no
// parameters, so this test also runs the design at its full size.
module tb_atmr_top;
  import atmr_pkg::*;

  localparam int NCH = 4;
  // Channel order: fig6, fig3, tab4, tab2.
  localparam int          NVEC  [NCH] = '{16, 16, 8, 8};
  localparam logic [15:0] TT_G  [NCH] = '{16'h2303, 16'h2207, 16'h0071, 16'h0074};
  localparam logic [15:0] TT_F1 [NCH] = '{16'h2303 ^ 16'h1000, 16'h2207 ^ 16'h0008,
                                          16'h0075, 16'h0074};
  localparam logic [15:0] TT_F2 [NCH] = '{16'h2303 ^ 16'h2000, 16'h2207 ^ 16'h0004,
                                          16'h00D1, 16'h00EC};
  localparam logic [15:0] TT_F3 [NCH] = '{16'h2303 ^ 16'h0020, 16'h2207 ^ 16'h0020,
                                          16'h0070, 16'h0076};
  localparam logic [15:0] PREBLOCK_FIG6 = 16'h0003;

  int checks = 0;
  int failures = 0;

  logic [3:0]   x [NCH];
  logic [2:0]   flip;
  voter_fault_t vflt;
  logic [NCH-1:0] v, v_valid, g;

  atmr_top dut (
    .x_fig6(x[0]),      .flip_fig6(flip), .vflt_fig6(vflt),
    .v_fig6(v[0]),      .v_valid_fig6(v_valid[0]), .g_fig6(g[0]),
    .x_fig3(x[1]),      .flip_fig3(flip), .vflt_fig3(vflt),
    .v_fig3(v[1]),      .v_valid_fig3(v_valid[1]), .g_fig3(g[1]),
    .x_tab4(x[2][2:0]), .flip_tab4(flip), .vflt_tab4(vflt),
    .v_tab4(v[2]),      .v_valid_tab4(v_valid[2]), .g_tab4(g[2]),
    .x_tab2(x[3][2:0]), .flip_tab2(flip), .vflt_tab2(vflt),
    .v_tab2(v[3]),      .v_valid_tab2(v_valid[3]), .g_tab2(g[3])
  );

  // Mechanism counters.
  int n_fault_free, n_flip_masked, n_flip_unmasked, n_preblock_masked;
  int n_quad_masked, n_mux_unmasked, n_mux_masked, n_worked_case;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic maj(input logic [2:0] m);
    return (m[0] & m[1]) | (m[0] & m[2]) | (m[1] & m[2]);
  endfunction

  function automatic logic [2:0] modules(input int ch, input int i);
    return {TT_F3[ch][i], TT_F2[ch][i], TT_F1[ch][i]};
  endfunction

  // Hand-derived failure condition of a mux-transistor gate fault, from the
  // voter inputs A, B, C (S = 1 when A equals B).
  function automatic logic mux_fails(input int kind, input logic [2:0] m);
    logic a, b, c;
    {c, b, a} = m;
    unique case (kind)
      0: return (a == b) && (c != a);  // Tp9 gate s-a-0: always on, fights Tn9
      1: return a != b;                // Tp9 gate s-a-1: output floats
      2: return a == b;                // Tn9 gate s-a-0: output floats
      default: return (a != b) && (c != a);  // Tn9 gate s-a-1: fights Tp9
    endcase
  endfunction

  task automatic apply(input int i);
    for (int ch = 0; ch < NCH; ch++) x[ch] = 4'(i % NVEC[ch]);
    #1;
  endtask

  task automatic check(input int ch, input int i, input string what,
                       input logic exp_ok, input logic exp_v);
    checks++;
    if (exp_ok && (!v_valid[ch] || v[ch] !== exp_v)) begin
      failures++;
      $display("FAIL ch%0d x=%0d %s: v=%0b valid=%0b expected %0b", ch, i, what,
               v[ch], v_valid[ch], exp_v);
    end else if (!exp_ok && v_valid[ch] && v[ch] === TT_G[ch][i]) begin
      failures++;
      $display("FAIL ch%0d x=%0d %s: fault expected to show but output correct",
               ch, i, what);
    end
  endtask

  task automatic count_mech(input string name, input int n);
    checks++;
    $display("  %-34s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  logic [2:0] m;
  logic       exp_v;
  int         fi, sv, kind;

  initial begin
    n_fault_free = 0; n_flip_masked = 0; n_flip_unmasked = 0;
    n_preblock_masked = 0; n_quad_masked = 0; n_mux_unmasked = 0;
    n_mux_masked = 0; n_worked_case = 0;
    flip = '0;
    vflt = VOTER_NO_FAULT;

    for (int i = 0; i < 16; i++) begin
      // no fault
      flip = '0;
      vflt = VOTER_NO_FAULT;
      apply(i);
      for (int ch = 0; ch < NCH; ch++) begin
        if (i < NVEC[ch]) begin
          check(ch, i, "no fault", 1'b1, TT_G[ch][i]);
          checks++;
          if (g[ch] !== TT_G[ch][i]) begin
            failures++;
            $display("FAIL ch%0d x=%0d reference G", ch, i);
          end
          n_fault_free++;
        end
      end

      // one voter input flipped
      for (fi = 0; fi < 3; fi++) begin
        flip = 3'(1 << fi);
        apply(i);
        for (int ch = 0; ch < NCH; ch++) begin
          if (i < NVEC[ch]) begin
            m = modules(ch, i);
            exp_v = maj(m ^ flip);
            check(ch, i, $sformatf("flip input %0d", fi), 1'b1, exp_v);
            if (exp_v == TT_G[ch][i]) n_flip_masked++;
            else begin
              n_flip_unmasked++;
              // only an unprotected vector can lose its vote
              checks++;
              if (m == {3{TT_G[ch][i]}}) begin
                failures++;
                $display("FAIL ch%0d x=%0d protected vector not masked", ch, i);
              end
            end
            if (ch == 0 && PREBLOCK_FIG6[i] && exp_v == TT_G[ch][i]) n_preblock_masked++;
          end
        end
      end
      flip = '0;

      // single faults on quadded transistors
      for (int t = 0; t < 16; t++) begin
        for (sv = 1; sv <= 2; sv++) begin
          vflt = VOTER_NO_FAULT;
          vflt.gate[t] = stuck_e'(sv);
          apply(i);
          for (int ch = 0; ch < NCH; ch++) begin
            if (i < NVEC[ch]) begin
              check(ch, i, $sformatf("transistor %0d stuck %0d", t, sv - 1),
                    1'b1, TT_G[ch][i]);
              n_quad_masked++;
            end
          end
        end
      end

      // faults on the mux pair
      for (kind = 0; kind < 4; kind++) begin
        vflt = VOTER_NO_FAULT;
        if (kind < 2) vflt.gate[TP9] = (kind == 0) ? SA_0 : SA_1;
        else          vflt.gate[TN9] = (kind == 2) ? SA_0 : SA_1;
        apply(i);
        for (int ch = 0; ch < NCH; ch++) begin
          if (i < NVEC[ch]) begin
            m = modules(ch, i);
            check(ch, i, $sformatf("mux fault %0d", kind), !mux_fails(kind, m),
                  TT_G[ch][i]);
            if (mux_fails(kind, m)) n_mux_unmasked++;
            else n_mux_masked++;
          end
        end
      end
      vflt = VOTER_NO_FAULT;
    end

    // worked case: three-input example, input 000, module 1 output flipped
    flip = 3'b001;
    apply(0);
    checks++;
    if (v[2] !== 1'b0 || !v_valid[2]) begin
      failures++;
      $display("FAIL worked case gave %0b", v[2]);
    end else n_worked_case++;
    flip = '0;

    $display("mechanisms exercised:");
    count_mech("fault-free votes", n_fault_free);
    count_mech("voter input flips masked", n_flip_masked);
    count_mech("voter input flips not masked", n_flip_unmasked);
    count_mech("flips masked on pre-blocked vectors", n_preblock_masked);
    count_mech("quad transistor faults masked", n_quad_masked);
    count_mech("mux transistor faults masked", n_mux_masked);
    count_mech("mux transistor faults not masked", n_mux_unmasked);
    count_mech("worked unprotected-vector case", n_worked_case);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
