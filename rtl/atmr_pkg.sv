// atmr_pkg: types and constants shared by the ATMR modules and the
// fault-tolerant voter.
//
// The voter of this design is modelled at switch level so that single
// transistor and single node faults can be injected, as in the voter's
// fault-masking evaluation. A fault on a transistor is a stuck-at on its
// gate terminal (an NMOS gate stuck at 1 or a PMOS gate stuck at 0 leaves
// the switch closed; the opposite values leave it open). A fault on a
// circuit node forces that node to 0 or 1 and makes it a source for every
// switch path that reaches it.
//
// The transistor names Tp1..Tp9 and Tn1..Tn9 and the count of 18 follow the
// voter schematic. The six internal nodes are this design's own naming:
//   NODE_P1, NODE_P2, NODE_P3 - between the four parallel pairs of the
//                               PMOS pull-up chain (VDD side first)
//   NODE_NB - middle of the NMOS quad gated by B that passes A
//   NODE_NA - middle of the NMOS quad gated by A that passes B
//   NODE_S  - the XNOR node that drives the gates of the output mux
package atmr_pkg;

  localparam int unsigned NUM_VOTER_TRANSISTORS = 18;
  localparam int unsigned NUM_VOTER_NODES       = 6;

  // Stuck-at fault on one gate terminal or one node.
  typedef enum logic [1:0] {
    SA_NONE = 2'd0,
    SA_0    = 2'd1,
    SA_1    = 2'd2
  } stuck_e;

  // Transistor indices of the proposed voter.
  typedef enum logic [4:0] {
    TP1 = 5'd0,  TP2 = 5'd1,  TP3 = 5'd2,  TP4 = 5'd3,
    TP5 = 5'd4,  TP6 = 5'd5,  TP7 = 5'd6,  TP8 = 5'd7,
    TN1 = 5'd8,  TN2 = 5'd9,  TN3 = 5'd10, TN4 = 5'd11,
    TN5 = 5'd12, TN6 = 5'd13, TN7 = 5'd14, TN8 = 5'd15,
    TP9 = 5'd16, TN9 = 5'd17
  } voter_transistor_e;

  // Internal node indices of the proposed voter.
  typedef enum logic [2:0] {
    NODE_P1 = 3'd0,
    NODE_P2 = 3'd1,
    NODE_P3 = 3'd2,
    NODE_NB = 3'd3,
    NODE_NA = 3'd4,
    NODE_S  = 3'd5
  } voter_node_e;

  // Fault-injection bundle of one voter. All SA_NONE is the fault-free voter.
  typedef struct packed {
    stuck_e [NUM_VOTER_TRANSISTORS-1:0] gate;
    stuck_e [NUM_VOTER_NODES-1:0]       node;
  } voter_fault_t;

  localparam voter_fault_t VOTER_NO_FAULT = '0;

  // Effective gate value of a transistor whose gate is driven by 'g'.
  function automatic logic apply_stuck(input logic g, input stuck_e f);
    unique case (f)
      SA_0:    return 1'b0;
      SA_1:    return 1'b1;
      default: return g;
    endcase
  endfunction

endpackage
