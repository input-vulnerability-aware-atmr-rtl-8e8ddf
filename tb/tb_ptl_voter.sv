// tb_ptl_voter: self-checking test of the fault-tolerant voter.
//
// 1. Fault-free: V is the majority of A, B, C for all eight inputs.
// 2. Every single gate-terminal stuck-at fault on the sixteen quadded
//    transistors (Tp1..Tp8, Tn1..Tn8) is masked for every input.
// 3. Faults on the non-redundant mux pair Tp9/Tn9 fail exactly on the inputs
//    worked out by hand below.
// 4. Node stuck-at faults: the union of vulnerable input vectors over the six
//    internal nodes is {001, 110, 111} for stuck-at-0 and {011, 100, 101} for
//    stuck-at-1 (input written A B C), so QoC = 1 - 3/8 = 0.625 for both.
//    Node S alone fails at {001, 110} (stuck-at-0) and {011, 100} (stuck-at-1).
// 5. The worked case: inputs 010 with the gate of Tp5 stuck at 1 still give 0.
// An output flagged undefined counts as a fault that was not masked.
module tb_ptl_voter;
  import atmr_pkg::*;

  int checks = 0;
  int failures = 0;

  logic         a, b, c;
  voter_fault_t flt;
  logic         v, v_valid;

  ptl_voter dut (.a(a), .b(b), .c(c), .flt(flt), .v(v), .v_valid(v_valid));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic maj(input logic [2:0] abc);
    return (abc[2] & abc[1]) | (abc[2] & abc[0]) | (abc[1] & abc[0]);
  endfunction

  // Apply all eight inputs; return the set of vectors (bit = {a,b,c}) where
  // the output is wrong or undefined.
  task automatic sweep(output logic [7:0] viv);
    viv = '0;
    for (int k = 0; k < 8; k++) begin
      {a, b, c} = k[2:0];
      #1;
      if (!v_valid || v !== maj(k[2:0])) viv[k] = 1'b1;
    end
  endtask

  task automatic expect_viv(input string what, input logic [7:0] got,
                            input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: vulnerable vectors %b, expected %b", what, got, exp);
    end
  endtask

  logic [7:0] viv, viv_sa0, viv_sa1;
  int         masked_quad;
  int         t, n;

  initial begin
    flt = VOTER_NO_FAULT;
    // 1. fault-free
    sweep(viv);
    expect_viv("fault-free", viv, 8'h00);

    // 2. single faults on quadded transistors
    masked_quad = 0;
    for (t = 0; t < 16; t++) begin
      for (int sv = 1; sv <= 2; sv++) begin
        flt = VOTER_NO_FAULT;
        flt.gate[t] = stuck_e'(sv);
        sweep(viv);
        expect_viv($sformatf("transistor %0d stuck %0d", t, sv - 1), viv, 8'h00);
        if (viv == 8'h00) masked_quad++;
      end
    end
    checks++;
    if (masked_quad != 32) begin
      failures++;
      $display("FAIL only %0d of 32 quad transistor faults masked", masked_quad);
    end

    // 3. mux pair (bit k of the masks is input {a,b,c} = k)
    flt = VOTER_NO_FAULT; flt.gate[TP9] = SA_0;  // Tp9 always on
    sweep(viv); expect_viv("Tp9 gate s-a-0", viv, 8'b0100_0010);  // 110, 001
    flt = VOTER_NO_FAULT; flt.gate[TP9] = SA_1;  // Tp9 always off
    sweep(viv); expect_viv("Tp9 gate s-a-1", viv, 8'b0011_1100);  // 010,011,100,101
    flt = VOTER_NO_FAULT; flt.gate[TN9] = SA_0;  // Tn9 always off
    sweep(viv); expect_viv("Tn9 gate s-a-0", viv, 8'b1100_0011);  // 000,001,110,111
    flt = VOTER_NO_FAULT; flt.gate[TN9] = SA_1;  // Tn9 always on
    sweep(viv); expect_viv("Tn9 gate s-a-1", viv, 8'b0001_1000);  // 011, 100

    // 4. node faults
    viv_sa0 = '0;
    viv_sa1 = '0;
    for (n = 0; n < int'(NUM_VOTER_NODES); n++) begin
      flt = VOTER_NO_FAULT; flt.node[n] = SA_0;
      sweep(viv);
      viv_sa0 |= viv;
      if (n == int'(NODE_S)) expect_viv("S s-a-0", viv, 8'b0100_0010);  // 001, 110
      flt = VOTER_NO_FAULT; flt.node[n] = SA_1;
      sweep(viv);
      viv_sa1 |= viv;
      if (n == int'(NODE_S)) expect_viv("S s-a-1", viv, 8'b0001_1000);  // 011, 100
    end
    expect_viv("node s-a-0 union", viv_sa0, 8'b1100_0010);  // 001, 110, 111
    expect_viv("node s-a-1 union", viv_sa1, 8'b0011_1000);  // 011, 100, 101
    checks++;
    if ($countones(viv_sa0) != 3 || $countones(viv_sa1) != 3) begin
      failures++;
      $display("FAIL QoC not 0.625");
    end
    $display("QoC s-a-0 = %0d/8 invulnerable, s-a-1 = %0d/8 invulnerable",
             8 - $countones(viv_sa0), 8 - $countones(viv_sa1));

    // 5. worked case
    flt = VOTER_NO_FAULT; flt.gate[TP5] = SA_1;
    {a, b, c} = 3'b010;
    #1;
    checks++;
    if (!v_valid || v !== 1'b0) begin
      failures++;
      $display("FAIL 010 with Tp5 gate s-a-1 gave v=%0b valid=%0b", v, v_valid);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
