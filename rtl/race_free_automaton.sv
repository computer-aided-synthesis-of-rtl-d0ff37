// race_free_automaton -- the example automaton with its race-free state
// coding, state held in three feedback elements.
//
// The excitation logic (automaton_excitation) computes the next code Y from
// the input vector x and the present code y. Each of the three state
// variables is held in a flip-flop standing in for the feedback delay of an
// asynchronous circuit. A variable takes its new value only on a clock edge
// where its enable fb_en[b] is 1. With fb_en = 111 every variable follows Y
// together and a transition takes one clock. Holding some enables low makes
// the state variables switch in any order the caller picks, as they would
// with unequal delays in an asynchronous realisation; because the coding is
// free of critical races the automaton still ends in the successor state,
// possibly after passing through an unused (transient) code.
//
// Outputs: y (present code), state_id (0..3 for states 1..4, valid only when
// is_state is 1), is_state (y is one of the four state codes) and stable
// (Y == y: no variable wants to change). Reset, asynchronous and active low,
// puts the automaton in state 1.
// The transition table and the codes follow the document; the clocked
// feedback elements, their enables, the reset and the outputs are this
// design's own choices, since the document gives no timing or outputs.
module race_free_automaton
  import rev_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  in_t         x,
  input  code_t       fb_en,
  output code_t       y,
  output logic [1:0]  state_id,
  output logic        is_state,
  output logic        stable
);
  code_t y_next;

  automaton_excitation u_exc (.x(x), .y(y), .Y(y_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= code_t'(S1);
    else        y <= (y & ~fb_en) | (y_next & fb_en);
  end

  always_comb begin
    is_state = 1'b1;
    state_id = 2'd0;
    unique case (y)
      code_t'(S1): state_id = 2'd0;
      code_t'(S2): state_id = 2'd1;
      code_t'(S3): state_id = 2'd2;
      code_t'(S4): state_id = 2'd3;
      default:     is_state = 1'b0;
    endcase
    stable = (y_next == y);
  end
endmodule
