// peres_gate -- three-line reversible Peres gate.
//
// P = A, Q = A xor B, R = A.B xor C: a Toffoli gate followed by a Feynman
// gate on the first two lines, merged into one cell. With C = 0 it gives both
// the XOR and the AND of A and B (a reversible half adder). Purely
// combinational. Function and port names follow the document.
module peres_gate (
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
    Q  = A ^ B;
    R  = ab ^ C;
  end
endmodule
