// fredkin_gate -- three-line reversible controlled-swap (Fredkin) gate.
//
// A is the control and passes through (P = A). When A is 0 the two target
// lines pass straight (Q = B, R = C); when A is 1 they are exchanged
// (Q = C, R = B). Written, as the document writes it, as sum-of-products
// with an exclusive OR: Q = A'B xor AC and R = AB xor A'C (the two products
// are never 1 together, so xor and or agree). Purely combinational.
module fredkin_gate (
  input  logic A,
  input  logic B,
  input  logic C,
  output logic P,
  output logic Q,
  output logic R
);
  logic a_n;
  always_comb begin
    a_n = ~A;
    P   = A;
    Q   = (a_n & B) ^ (A & C);
    R   = (A & B) ^ (a_n & C);
  end
endmodule
