// quad_switch: quadded transistor redundancy, (A+A)(A+A).
//
// One transistor gated by A is replaced by four transistors gated by A: two
// in parallel, and two such pairs in series. The structure conducts when at
// least one transistor of each pair conducts, so any single transistor fault
// leaves its logic behaviour unchanged. Two open transistors are tolerated
// unless they are the two of one pair; two closed transistors are tolerated
// unless they sit in different pairs.
//
// This is a switch-level model: 'on' tells whether the structure connects its
// two terminals. 'on_upper' and 'on_lower' tell whether each pair conducts on
// its own, so that a caller can model a fault on the node between the pairs.
// Each transistor has its own stuck-at fault on its gate terminal
// (fault[0], fault[1] form the upper pair, fault[2], fault[3] the lower one).
// IS_PMOS selects PMOS transistors, which conduct when their gate is 0.
//
// The structure and its fault-tolerance rules follow the document; the
// ordering of the fault bits and the split into two pair outputs are this
// design's own. Purely combinational.
module quad_switch
  import atmr_pkg::*;
#(
  parameter bit IS_PMOS = 1'b0
) (
  input  logic       g,         // common gate signal
  input  stuck_e     fault [4], // gate-terminal stuck-at fault per transistor
  output logic       on_upper,  // upper parallel pair conducts
  output logic       on_lower,  // lower parallel pair conducts
  output logic       on         // whole structure conducts
);

  logic [3:0] t_on;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      t_on[i] = apply_stuck(g, fault[i]) ^ IS_PMOS;
    end
    on_upper = t_on[0] | t_on[1];
    on_lower = t_on[2] | t_on[3];
    on       = on_upper & on_lower;
  end

endmodule
