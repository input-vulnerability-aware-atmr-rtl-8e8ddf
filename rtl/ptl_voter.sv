// ptl_voter: fault-tolerant majority voter for approximate TMR, built from
// pass transistors and quadded transistor redundancy.
//
// How it works. Four quadded structures (quad_switch) form the XNOR of A and B
// on node S:
//   - a PMOS chain Tp1..Tp4 (gated by A) in series with Tp5..Tp8 (gated by B)
//     pulls S to 1 when A = B = 0;
//   - NMOS Tn1..Tn4, gated by B, pass A to S;
//   - NMOS Tn5..Tn8, gated by A, pass B to S.
// S then drives the gates of a two-transistor pass mux: Tn9 passes A to the
// output V when S = 1 (A equals B, so A is the majority), and Tp9 passes C
// when S = 0 (A and B disagree, so C decides). V is the majority of A, B, C.
// Every transistor whose gate is A or B is quadded, so a single gate-terminal
// fault on any of them is masked; the mux pair Tp9/Tn9 is not redundant.
//
// Fault model. 'flt.gate[t]' puts a stuck-at fault on the gate terminal of
// transistor t, 'flt.node[n]' forces internal node n (see atmr_pkg). A forced
// node acts as a source for every conducting path that reaches it. A node is
// resolved from the paths that reach it: one value when all conducting paths
// agree, undefined when paths fight (contention) or when none conducts
// (floating). 'v_valid' is 0 when V is undefined; 'v' is then 0. Signal
// strength (the weak 1 of an NMOS pass device, the weak 0 of a PMOS one) and
// charge storage are not modelled, so an undefined output counts as a fault
// that was not masked.
//
// Interface and timing: purely combinational, no clock. With
// flt = VOTER_NO_FAULT, v = maj(a, b, c) and v_valid = 1 for every input.
//
// The transistor topology, names and the output mux follow the voter's
// schematic and description in the document. The switch-level resolution
// rules and the node naming are this design's own.
module ptl_voter
  import atmr_pkg::*;
(
  input  logic         a,       // voter input A (from module 1)
  input  logic         b,       // voter input B (from module 2)
  input  logic         c,       // voter input C (from module 3)
  input  voter_fault_t flt,     // fault injection, VOTER_NO_FAULT for normal use
  output logic         v,       // voter output
  output logic         v_valid  // 0: output undefined (contention or floating)
);

  // Pair conduction of the four quadded structures.
  logic pa_up, pa_lo, pa_on;  // Tp1/Tp2 (VDD side), Tp3/Tp4, gate A
  logic pb_up, pb_lo, pb_on;  // Tp5/Tp6, Tp7/Tp8 (S side), gate B
  logic nb_up, nb_lo, nb_on;  // Tn1/Tn2 (S side), Tn3/Tn4 (source A), gate B
  logic na_up, na_lo, na_on;  // Tn5/Tn6 (S side), Tn7/Tn8 (source B), gate A

  quad_switch #(.IS_PMOS(1'b1)) u_quad_pa (
    .g(a), .fault('{flt.gate[TP1], flt.gate[TP2], flt.gate[TP3], flt.gate[TP4]}),
    .on_upper(pa_up), .on_lower(pa_lo), .on(pa_on)
  );
  quad_switch #(.IS_PMOS(1'b1)) u_quad_pb (
    .g(b), .fault('{flt.gate[TP5], flt.gate[TP6], flt.gate[TP7], flt.gate[TP8]}),
    .on_upper(pb_up), .on_lower(pb_lo), .on(pb_on)
  );
  quad_switch #(.IS_PMOS(1'b0)) u_quad_nb (
    .g(b), .fault('{flt.gate[TN1], flt.gate[TN2], flt.gate[TN3], flt.gate[TN4]}),
    .on_upper(nb_up), .on_lower(nb_lo), .on(nb_on)
  );
  quad_switch #(.IS_PMOS(1'b0)) u_quad_na (
    .g(a), .fault('{flt.gate[TN5], flt.gate[TN6], flt.gate[TN7], flt.gate[TN8]}),
    .on_upper(na_up), .on_lower(na_lo), .on(na_on)
  );

  // One switch path seen from the node it ends on.
  typedef struct packed {
    logic drive;  // the path conducts from a source to the node
    logic val;    // value it drives
  } path_t;

  function automatic logic forced(input stuck_e f);
    return f != SA_NONE;
  endfunction

  function automatic logic forced_val(input stuck_e f);
    return f == SA_1;
  endfunction

  // Resolve a node from three paths: returns {valid, value}.
  function automatic logic [1:0] resolve3(input path_t p0, input path_t p1,
                                          input path_t p2);
    logic d0, d1;
    d1 = (p0.drive & p0.val) | (p1.drive & p1.val) | (p2.drive & p2.val);
    d0 = (p0.drive & ~p0.val) | (p1.drive & ~p1.val) | (p2.drive & ~p2.val);
    return {d0 ^ d1, d1 & ~d0};
  endfunction

  path_t pu_path, nb_path, na_path, mux_p_path, mux_n_path;
  logic  s_valid, s;
  logic  gate_p9, gate_n9;

  always_comb begin
    // Pull-up chain. Without a forced node it conducts when both quads do;
    // otherwise it is walked from S towards VDD and a forced node ends the walk.
    pu_path = '0;
    if (!forced(flt.node[NODE_P1]) && !forced(flt.node[NODE_P2]) &&
        !forced(flt.node[NODE_P3])) begin
      pu_path = '{drive: pa_on & pb_on, val: 1'b1};
    end else if (pb_lo) begin
      if (forced(flt.node[NODE_P3])) begin
        pu_path = '{drive: 1'b1, val: forced_val(flt.node[NODE_P3])};
      end else if (pb_up) begin
        if (forced(flt.node[NODE_P2])) begin
          pu_path = '{drive: 1'b1, val: forced_val(flt.node[NODE_P2])};
        end else if (pa_lo) begin
          if (forced(flt.node[NODE_P1])) begin
            pu_path = '{drive: 1'b1, val: forced_val(flt.node[NODE_P1])};
          end else if (pa_up) begin
            pu_path = '{drive: 1'b1, val: 1'b1};
          end
        end
      end
    end

    // NMOS quad gated by B, passing A.
    if (forced(flt.node[NODE_NB])) begin
      nb_path = '{drive: nb_up, val: forced_val(flt.node[NODE_NB])};
    end else begin
      nb_path = '{drive: nb_on, val: a};
    end

    // NMOS quad gated by A, passing B.
    if (forced(flt.node[NODE_NA])) begin
      na_path = '{drive: na_up, val: forced_val(flt.node[NODE_NA])};
    end else begin
      na_path = '{drive: na_on, val: b};
    end

    // Node S, the XNOR of A and B.
    if (forced(flt.node[NODE_S])) begin
      s_valid = 1'b1;
      s       = forced_val(flt.node[NODE_S]);
    end else begin
      {s_valid, s} = resolve3(pu_path, nb_path, na_path);
    end

    // Output mux: Tn9 passes A when S = 1, Tp9 passes C when S = 0.
    gate_p9    = apply_stuck(s, flt.gate[TP9]);
    gate_n9    = apply_stuck(s, flt.gate[TN9]);
    mux_p_path = '{drive: ~gate_p9, val: c};
    mux_n_path = '{drive: gate_n9, val: a};

    {v_valid, v} = resolve3(mux_p_path, mux_n_path, path_t'('0));
    // A gate driven by an undefined node leaves the output undefined, unless
    // both mux gates are stuck so that S no longer matters.
    if (!s_valid && (flt.gate[TP9] == SA_NONE || flt.gate[TN9] == SA_NONE)) begin
      v_valid = 1'b0;
      v       = 1'b0;
    end
  end

endmodule
