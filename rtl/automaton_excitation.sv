// automaton_excitation -- next-state (excitation) logic of the example
// asynchronous automaton, built from reversible gates.
//
// Inputs are the applied input vector x (X1..X4 encoded as x = 0..3) and the
// present state code y (state 1 = 111, 2 = 100, 3 = 001, 4 = 010). Output Y
// is the code the state variables are driven towards. For a state code Y is
// the code of the successor named in the automaton's transition table. For
// the four unused codes Y is the target of the transition that can pass
// through that code while its state variables switch one at a time; the
// race-free coding guarantees there is exactly one such target per input
// vector, so no critical race can send the automaton to a wrong state.
//
// Each bit Y[b] is a Boolean function of the 5 variables {x[1:0], y[2:0]}.
// Its truth vector is computed at elaboration from the table, turned into
// Reed-Muller coefficients with the positive-polarity transform and realised
// by an rm_reversible_net (Toffoli products summed by Feynman gates).
// Purely combinational. The table and the codes follow the document; the
// input encoding, the values at unused codes and the choice of positive
// polarity are this design's own.
module automaton_excitation
  import rev_pkg::*;
(
  input  in_t   x,
  input  code_t y,
  output code_t Y
);
  logic [EXC_VARS-1:0] v;
  assign v = {x, y};

  for (genvar b = 0; b < CODE_W; b++) begin : g_bit
    localparam logic [255:0]           RM_FULL = rm_pos(256'(excitation_truth(2'(b))), EXC_VARS);
    localparam logic [2**EXC_VARS-1:0] RM      = RM_FULL[2**EXC_VARS-1:0];
    rm_reversible_net #(.N(EXC_VARS), .COEFF(RM)) u_net (.x(v), .f(Y[b]));
  end
endmodule
