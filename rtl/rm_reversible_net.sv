// rm_reversible_net -- reversible gate network evaluating a Reed-Muller
// polynomial.
//
// A positive-polarity Reed-Muller polynomial is an exclusive-OR of AND terms
// of uncomplemented variables. This block builds it from the document's
// reversible gates only:
//  * each product term with coefficient 1 is formed on ancilla lines that
//    start at 0: a Feynman gate copies the term's first variable onto one,
//    and each further variable is ANDed in by a Toffoli gate whose controls
//    are the partial product and the variable and whose target is a fresh
//    0 ancilla;
//  * the terms are summed on an output line that starts at 0 by one Feynman
//    gate per term (control = the term line, target = the sum line);
//  * the constant term "1" is a Feynman gate whose control is tied to 1.
// The copies of the inputs and the term lines are the garbage outputs of the
// reversible network and are not brought out.
//
// Parameters: N input variables and COEFF, the 2**N coefficients (bit k is
// the coefficient of the product of the variables whose bits are set in k).
// The defaults give the polynomial of next-state bit Y1 of the example
// automaton (5 variables {x1, x0, y2, y1, y0}, 8 terms).
// Purely combinational. The use of Toffoli gates for products and Feynman
// gates for the XOR sum follows the reversible form the document aims for;
// the exact cascade (one ancilla per term, no gate sharing) is this design's
// own, plain choice.
module rm_reversible_net #(
  parameter int unsigned     N     = rev_pkg::EXC_VARS,
  parameter logic [2**N-1:0] COEFF = (2**N)'(rev_pkg::rm_pos(256'(rev_pkg::excitation_truth(2'd1)), N))
) (
  input  logic [N-1:0] x,
  output logic         f
);
  localparam int unsigned T = 2**N;

  // acc[m] is the sum line after the terms 0..m-1 have been added.
  logic [T:0] acc;
  assign acc[0] = 1'b0;

  for (genvar m = 0; m < T; m++) begin : g_term
    if (COEFF[m] && m == 0) begin : g_one
      // Constant term: a Feynman gate whose control is tied to 1.
      logic one;
      assign one = 1'b1;
      feynman_gate u_sum (.A(one), .B(acc[m]), .P(), .Q(acc[m+1]));
    end else if (COEFF[m]) begin : g_on
      // p[j] is the term line after variables 0..j-1 have been handled.
      logic [N:0] p;
      assign p[0] = 1'b0;
      for (genvar j = 0; j < N; j++) begin : g_var
        if (((m >> j) & 1) == 0) begin : g_skip
          assign p[j+1] = p[j];
        end else if ((m & ((1 << j) - 1)) == 0) begin : g_copy
          // First variable of the term: copy it onto the zero ancilla.
          feynman_gate u_copy (.A(x[j]), .B(p[j]), .P(), .Q(p[j+1]));
        end else begin : g_and
          // Later variables: AND them in with a Toffoli gate.
          logic zero;
          assign zero = 1'b0;
          toffoli_gate u_and (.A(p[j]), .B(x[j]), .C(zero), .P(), .Q(), .R(p[j+1]));
        end
      end
      feynman_gate u_sum (.A(p[N]), .B(acc[m]), .P(), .Q(acc[m+1]));
    end else begin : g_off
      assign acc[m+1] = acc[m];
    end
  end

  assign f = acc[T];
endmodule
