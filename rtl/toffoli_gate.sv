// toffoli_gate -- three-line reversible double-controlled NOT (Toffoli) gate.
//
// Lines A and B are controls and pass through (P = A, Q = B); the target
// line C is inverted only when both controls are 1 (R = A.B xor C). With the
// target fed a constant 0 the gate yields the AND of its controls, which is
// how the Reed-Muller networks in this design form their product terms.
// Purely combinational. Function and port names follow the document.
module toffoli_gate (
  input  logic A,
  input  logic B,
  input  logic C,
  output logic P,
  output logic Q,
  output logic R
);
  logic ab;
  always_comb begin
    ab = A & B;
    P  = A;
    Q  = B;
    R  = ab ^ C;
  end
endmodule
