// rm_transform -- truth vector to Reed-Muller coefficient vector.
//
// Computes W_RM = (f x W_p) mod 2, where f is the N-fold Kronecker power of
// the 2x2 matrix [[1,0],[1,1]]. The matrix product is done as N butterfly
// stages, one per variable: a pair of entries (f0, f1) that differ only in
// variable j becomes (f0, f0 xor f1) -- the positive Davio expansion. Each
// variable may instead be given negative polarity (pol[j] = 1), in which case
// the pair becomes (f1, f0 xor f1) -- the negative Davio expansion, giving
// terms in the complemented variable. With pol = 0 the transform is its own
// inverse, so the same block also turns coefficients back into a truth vector.
//
// Interface: w_p[i] is the function value for the input combination whose
// binary value is i (variable j = bit j of i). w_rm[k] is the coefficient of
// the product of the variables whose bits are set in k. Purely
// combinational: N levels of 2-input XOR, no clock, zero cycles of latency.
// The matrix method and the per-variable positive/negative Davio choice
// follow the document; N = 4 is the size its example uses. Making the
// polarity a run-time input is this design's choice.
module rm_transform #(
  parameter int unsigned N = 4
) (
  input  logic [2**N-1:0] w_p,
  input  logic [N-1:0]    pol,
  output logic [2**N-1:0] w_rm
);
  localparam int unsigned W = 2**N;

  // stage[j] is the vector after the expansions of variables 0..j-1.
  logic [N:0][W-1:0] stage;

  assign stage[0] = w_p;

  for (genvar j = 0; j < N; j++) begin : g_var
    for (genvar i = 0; i < W; i++) begin : g_pair
      if (((i >> j) & 1) == 0) begin : g_lo
        // Constant-part line of the pair: f0 (positive) or f1 (negative).
        assign stage[j+1][i] = pol[j] ? stage[j][i + (1 << j)] : stage[j][i];
      end else begin : g_hi
        // Line of the term in variable j: f0 xor f1 for both polarities.
        assign stage[j+1][i] = stage[j][i - (1 << j)] ^ stage[j][i];
      end
    end
  end

  assign w_rm = stage[N];
endmodule
