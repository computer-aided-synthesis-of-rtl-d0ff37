// tb_automaton_excitation -- checks the automaton's next-state logic.
// The reference is the automaton's transition table and state codes, typed
// in here independently of the design:
//  * for every state and input vector, the excitation at the state's code is
//    the successor's code (a stable state maps onto itself);
//  * for every unstable transition s -> t, every code the state variables can
//    pass through when the differing bits switch one at a time in any order
//    also maps to code(t): no critical race;
//  * every one of the 32 (input, code) pairs has been covered at least once.
module tb_automaton_excitation;
  int checks = 0;
  int failures = 0;

  // Successor table, rows = present state 1..4, columns = X1..X4.
  localparam int unsigned SUCC [4][4] = '{'{1, 4, 1, 2},
                                          '{2, 2, 1, 2},
                                          '{1, 2, 3, 4},
                                          '{2, 4, 3, 4}};
  localparam logic [2:0] CODE [4] = '{3'b111, 3'b100, 3'b001, 3'b010};

  logic [1:0] x;
  logic [2:0] y, Y;
  logic [31:0] covered;

  automaton_excitation dut (.x(x), .y(y), .Y(Y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    covered = '0;
    for (int xi = 0; xi < 4; xi++)
      for (int s = 0; s < 4; s++) begin
        logic [2:0] cs, ct, diff;
        cs = CODE[s];
        ct = CODE[SUCC[s][xi] - 1];
        diff = cs ^ ct;
        // Every subset of the changing bits already switched.
        for (int sub = 0; sub < 8; sub++) begin
          if ((3'(sub) & ~diff) != 0) continue;
          if (3'(sub) == diff && diff != 0) continue;  // that is the target itself
          x = 2'(xi);
          y = cs ^ 3'(sub);
          #1;
          checks++;
          covered[{x, y}] = 1'b1;
          if (Y !== ct) begin
            failures++;
            $display("FAIL X%0d state %0d via code %b: Y=%b want %b", xi + 1, s + 1, y, Y, ct);
          end
        end
      end
    #1;
    checks++;
    if (!(&covered)) begin
      failures++;
      $display("FAIL not every (input, code) pair reached:", covered);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
