// feynman_gate -- two-line reversible controlled-NOT (Feynman) gate.
//
// The control line A passes through unchanged (P = A); the target line is
// inverted when the control is 1 (Q = A xor B). The mapping (A,B) -> (P,Q) is
// a bijection, so no information is lost. Purely combinational, no clock.
// The function and the port names A, B, P, Q follow the document; nothing in
// this block is a design choice of its own.
module feynman_gate (
  input  logic A,
  input  logic B,
  output logic P,
  output logic Q
);
  always_comb begin
    P = A;
    Q = A ^ B;
  end
endmodule
