// tb_rm_reversible_net -- checks the reversible Reed-Muller network.
// Several networks with fixed coefficient vectors (including the constant
// term, single variables and the full 4-variable product) are evaluated
// exhaustively and compared with a direct evaluation of the polynomial:
// f(x) = xor of COEFF[k] over all k whose variables are all 1 in x.
// The instance with default parameters must give next-state bit Y1 of the
// example automaton, whose truth table over {x1, x0, y2, y1, y0} is written
// out below from the automaton's next-code table.
module tb_rm_reversible_net;
  int checks = 0;
  int failures = 0;

  localparam int unsigned NC = 4;
  localparam logic [15:0] C4 [NC] = '{16'h0001, 16'h8000, 16'hB6E1, 16'h7449};
  localparam logic [31:0] C5 = 32'hDEAD_BEEF;
  // Y1 for x = X4, X3, X2, X1 (one byte each, bit y of the byte = code y).
  localparam logic [31:0] Y1_TRUTH = 32'h0FF0_CCAA;

  logic [3:0]    x4;
  logic [4:0]    x5;
  logic [NC-1:0] f4;
  logic          f5;
  logic          f5_c;

  for (genvar n = 0; n < NC; n++) begin : g_net
    rm_reversible_net #(.N(4), .COEFF(C4[n])) dut (.x(x4), .f(f4[n]));
  end
  rm_reversible_net dut5_default_n (.x(x5), .f(f5));
  rm_reversible_net #(.N(5), .COEFF(C5)) dut5 (.x(x5), .f(f5_c));

  function automatic logic eval_poly(logic [31:0] c, int n, int x);
    logic r = 1'b0;
    for (int k = 0; k < 2**n; k++)
      if ((k & ~x) == 0) r ^= c[k];
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      x4 = 4'(x);
      #1;
      for (int n = 0; n < NC; n++) begin
        checks++;
        if (f4[n] !== eval_poly(32'(C4[n]), 4, x)) begin
          failures++;
          $display("FAIL net%0d x=%b got %b", n, x4, f4[n]);
        end
      end
    end
    for (int x = 0; x < 32; x++) begin
      x5 = 5'(x);
      #1;
      checks += 2;
      if (f5 !== Y1_TRUTH[x]) begin
        failures++;
        $display("FAIL default (Y1) network x=%b got %b", x5, f5);
      end
      if (f5_c !== eval_poly(C5, 5, x)) begin
        failures++;
        $display("FAIL 5-var x=%b got %b", x5, f5_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
