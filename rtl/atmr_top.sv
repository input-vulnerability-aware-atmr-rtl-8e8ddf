// atmr_top: approximate triple modular redundancy (ATMR) with the
// fault-tolerant pass-transistor voter.
//
// Four independent ATMR channels stand side by side, one per worked example:
//   fig6 - input-vulnerability-aware ATMR of G = c'(b' + ad), 4 inputs
//          (0000 and 0001 pre-blocked), modules f1/f2/f3;
//   fig3 - ATMR of G = ac'd + a'b'(d' + c'), 4 inputs, modules f1/f2/f3;
//   tab4 - three-input full ATMR AM1/AM2/AM3 used to explain the voter;
//   tab2 - three-input ATMR made of G itself and two approximate modules.
// In each channel the three module outputs go to the voter inputs A, B, C
// (module 1 to A, module 2 to B, module 3 to C). Before the voter each wire
// can be inverted through 'flip_*' to inject a fault on a voter input, and
// 'vflt_*' injects transistor and node faults inside the voter. With no fault
// injected, v_* equals g_* (the original function) for every input vector.
//
// Interface and timing: purely combinational, no clock or reset. Each channel
// has its own input vector, fault controls, voter output, output-valid flag
// (0 when a fault leaves the voter output undefined) and reference G.
//
// The channel contents are the document's examples; grouping them in one top,
// the module-to-voter-input assignment and the fault-injection ports are this
// design's own.
module atmr_top
  import atmr_pkg::*;
(
  // Fig. 6 channel
  input  logic [3:0]   x_fig6,
  input  logic [2:0]   flip_fig6,
  input  voter_fault_t vflt_fig6,
  output logic         v_fig6,
  output logic         v_valid_fig6,
  output logic         g_fig6,
  // Fig. 3 channel
  input  logic [3:0]   x_fig3,
  input  logic [2:0]   flip_fig3,
  input  voter_fault_t vflt_fig3,
  output logic         v_fig3,
  output logic         v_valid_fig3,
  output logic         g_fig3,
  // Table 4 channel
  input  logic [2:0]   x_tab4,
  input  logic [2:0]   flip_tab4,
  input  voter_fault_t vflt_tab4,
  output logic         v_tab4,
  output logic         v_valid_tab4,
  output logic         g_tab4,
  // Table 2 channel
  input  logic [2:0]   x_tab2,
  input  logic [2:0]   flip_tab2,
  input  voter_fault_t vflt_tab2,
  output logic         v_tab2,
  output logic         v_valid_tab2,
  output logic         g_tab2
);

  logic [2:0] f_fig6, f_fig3, f_tab4, f_tab2;
  logic [2:0] vin_fig6, vin_fig3, vin_tab4, vin_tab2;

  atmr_fig6_modules u_mod_fig6 (.x(x_fig6), .f(f_fig6), .g_ref(g_fig6));
  atmr_fig3_modules u_mod_fig3 (.x(x_fig3), .f(f_fig3), .g_ref(g_fig3));
  atmr_tt_modules   u_mod_tab4 (.x(x_tab4), .f(f_tab4), .g_ref(g_tab4));
  // G itself is module 1, then the two approximate modules.
  atmr_tt_modules #(
    .N(3),
    .TT_G(8'b0111_0100),
    .TT_1(8'b0111_0100),
    .TT_2(8'b1110_1100),
    .TT_3(8'b0111_0110)
  ) u_mod_tab2 (.x(x_tab2), .f(f_tab2), .g_ref(g_tab2));

  assign vin_fig6 = f_fig6 ^ flip_fig6;
  assign vin_fig3 = f_fig3 ^ flip_fig3;
  assign vin_tab4 = f_tab4 ^ flip_tab4;
  assign vin_tab2 = f_tab2 ^ flip_tab2;

  ptl_voter u_voter_fig6 (.a(vin_fig6[0]), .b(vin_fig6[1]), .c(vin_fig6[2]),
                          .flt(vflt_fig6), .v(v_fig6), .v_valid(v_valid_fig6));
  ptl_voter u_voter_fig3 (.a(vin_fig3[0]), .b(vin_fig3[1]), .c(vin_fig3[2]),
                          .flt(vflt_fig3), .v(v_fig3), .v_valid(v_valid_fig3));
  ptl_voter u_voter_tab4 (.a(vin_tab4[0]), .b(vin_tab4[1]), .c(vin_tab4[2]),
                          .flt(vflt_tab4), .v(v_tab4), .v_valid(v_valid_tab4));
  ptl_voter u_voter_tab2 (.a(vin_tab2[0]), .b(vin_tab2[1]), .c(vin_tab2[2]),
                          .flt(vflt_tab2), .v(v_tab2), .v_valid(v_valid_tab2));

endmodule
