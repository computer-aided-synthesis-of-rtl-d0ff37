// rev_pkg -- shared types, constants and elaboration-time functions.
//
// Holds three things the modules share:
//  * the state table of the example asynchronous automaton (4 states, 4
//    input vectors X1..X4) and the race-free state codes obtained for it by
//    the method of elementary conditions: state 1 = 111, state 2 = 100,
//    state 3 = 001, state 4 = 010;
//  * a function that turns that table into the truth vector of each
//    excitation (next-state) bit over the 5 variables {x[1:0], y[2:0]},
//    including the transient codes a multi-bit state change passes through;
//  * the positive-polarity Reed-Muller transform W_RM = (f x W_p) mod 2, with
//    f the Kronecker power of [[1,0],[1,1]], used at elaboration time to get
//    the polynomial coefficients that the reversible networks are built from.
// The table and the codes follow the document. The binary input encoding
// (X_k applied as x = k-1) and the handling of transient codes are this
// design's own choices.
package rev_pkg;

  // Number of automaton states, input vectors and state variables.
  localparam int unsigned NUM_STATES = 4;
  localparam int unsigned NUM_INPUTS = 4;
  localparam int unsigned CODE_W     = 3;
  localparam int unsigned IN_W       = 2;
  // Variables of the excitation functions: {x[1:0], y[2:0]}.
  localparam int unsigned EXC_VARS   = IN_W + CODE_W;

  typedef logic [CODE_W-1:0] code_t;
  typedef logic [IN_W-1:0]   in_t;

  // Three lines into or out of a three-line reversible gate.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
  } lines3_t;

  // Race-free codes of the four states.
  typedef enum logic [CODE_W-1:0] {
    S1 = 3'b111,
    S2 = 3'b100,
    S3 = 3'b001,
    S4 = 3'b010
  } state_code_e;

  // Successor of state s (1..4) under input vector X_(x+1); 1-based numbers,
  // exactly the rows of the automaton's transition table.
  function automatic int unsigned next_state_num(int unsigned s, in_t x);
    int unsigned row [NUM_INPUTS];
    case (s)
      1:       row = '{1, 4, 1, 2};
      2:       row = '{2, 2, 1, 2};
      3:       row = '{1, 2, 3, 4};
      default: row = '{2, 4, 3, 4};
    endcase
    return row[x];
  endfunction

  function automatic code_t code_of(int unsigned s);
    case (s)
      1:       return S1;
      2:       return S2;
      3:       return S3;
      default: return S4;
    endcase
  endfunction

  // Next code for every (input, present code) pair. A state code goes to the
  // code of its successor. A code c that lies on the way from code(s) to
  // code(t) (it agrees with code(s) in every bit that does not change) goes
  // straight to code(t), so whichever state variable switches first the
  // automaton keeps heading for t. Codes on no such path stay where they are.
  function automatic code_t next_code(in_t x, code_t c);
    code_t res, cs, ct;
    res = c;
    for (int unsigned s = 1; s <= NUM_STATES; s++) begin
      cs = code_of(s);
      ct = code_of(next_state_num(s, x));
      if (((c ^ cs) & ~(cs ^ ct)) == '0) res = ct;
    end
    // A state code always goes to its own successor.
    for (int unsigned s = 1; s <= NUM_STATES; s++) begin
      cs = code_of(s);
      if (c == cs) res = code_of(next_state_num(s, x));
    end
    return res;
  endfunction

  // Truth vector of excitation bit b; bit i holds Y_b for {x, y} = i.
  function automatic logic [2**EXC_VARS-1:0] excitation_truth(logic [1:0] b);
    logic [2**EXC_VARS-1:0] tv;
    for (int unsigned i = 0; i < 2**EXC_VARS; i++) begin
      code_t nc;
      nc = next_code(in_t'(i >> CODE_W), code_t'(i));
      tv[i] = nc[b];
    end
    return tv;
  endfunction

  // Positive-polarity Reed-Muller transform of a truth vector of n variables
  // (n <= 8). Bit k of the result is the coefficient of the product of the
  // variables whose index bits are set in k.
  function automatic logic [255:0] rm_pos(logic [255:0] tv, int unsigned n);
    logic [255:0] v;
    v = tv;
    for (int unsigned j = 0; j < n; j++)
      for (int unsigned i = 0; i < 2**n; i++)
        if (((i >> j) & 1) == 1) v[i] = v[i] ^ v[i & ~(1 << j)];
    return v;
  endfunction

endpackage
