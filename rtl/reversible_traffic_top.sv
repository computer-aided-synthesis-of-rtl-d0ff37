// reversible_traffic_top -- the reversible-logic design set, side by side.
//
// Three independent parts share this top, each with its own ports:
//  * the example asynchronous automaton (race_free_automaton): four states,
//    four input vectors, race-free 3-bit state coding, next-state logic made
//    only of Toffoli and Feynman gates derived from Reed-Muller polynomials;
//    clocked feedback elements with per-variable enables (fb_en) let the
//    state variables switch in any order;
//  * a Reed-Muller transform unit (rm_transform) turning a 16-entry truth
//    vector of four variables into its fixed-polarity Reed-Muller
//    coefficients (rm_pol selects positive or negative expansion per
//    variable), combinational;
//  * one Fredkin (controlled swap) gate and one Peres gate, the two library
//    gates the automaton does not use, brought out on their own ports.
// Only the automaton is clocked; reset is asynchronous, active low, and puts
// it in state 1. RM_VARS defaults to four variables, the size of the
// document's example. Grouping the parts into one top is this design's
// choice; the document presents them as separate pieces of one flow.
module reversible_traffic_top
  import rev_pkg::*;
#(
  parameter int unsigned RM_VARS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Automaton
  input  in_t                   x,
  input  code_t                 fb_en,
  output code_t                 y,
  output logic [1:0]            state_id,
  output logic                  is_state,
  output logic                  stable,
  // Reed-Muller transform
  input  logic [2**RM_VARS-1:0] rm_wp,
  input  logic [RM_VARS-1:0]    rm_pol,
  output logic [2**RM_VARS-1:0] rm_wrm,
  // Fredkin and Peres gates
  input  lines3_t               fk_in,
  output lines3_t               fk_out,
  input  lines3_t               pg_in,
  output lines3_t               pg_out
);
  race_free_automaton u_automaton (
    .clk(clk), .rst_n(rst_n), .x(x), .fb_en(fb_en), .y(y),
    .state_id(state_id), .is_state(is_state), .stable(stable)
  );

  rm_transform #(.N(RM_VARS)) u_rm (.w_p(rm_wp), .pol(rm_pol), .w_rm(rm_wrm));

  fredkin_gate u_fredkin (
    .A(fk_in.a), .B(fk_in.b), .C(fk_in.c),
    .P(fk_out.a), .Q(fk_out.b), .R(fk_out.c)
  );

  peres_gate u_peres (
    .A(pg_in.a), .B(pg_in.b), .C(pg_in.c),
    .P(pg_out.a), .Q(pg_out.b), .R(pg_out.c)
  );
endmodule
