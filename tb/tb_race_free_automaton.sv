// tb_race_free_automaton -- runs the automaton through random input
// sequences with random orders of state-variable switching.
// The reference model is the transition table (state numbers 1..4) and the
// state codes, typed in here. For each new input vector the testbench lets
// the state variables switch under random feedback enables until the
// automaton reports a stable state code, then checks that:
//  * the state reached is the table's successor of the previous state;
//  * on the way no code of a third state was visited;
//  * with all enables high, a change of state takes exactly one clock.
// It also counts transitions through transient (unused) codes and requires
// that each of the 8 unstable table entries was exercised.
module tb_race_free_automaton;
  int checks = 0;
  int failures = 0;

  localparam int unsigned SUCC [4][4] = '{'{1, 4, 1, 2},
                                          '{2, 2, 1, 2},
                                          '{1, 2, 3, 4},
                                          '{2, 4, 3, 4}};
  localparam logic [2:0] CODE [4] = '{3'b111, 3'b100, 3'b001, 3'b010};

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] x;
  logic [2:0] fb_en;
  logic [2:0] y;
  logic [1:0] state_id;
  logic       is_state, stable;

  race_free_automaton dut (.clk(clk), .rst_n(rst_n), .x(x), .fb_en(fb_en), .y(y),
                           .state_id(state_id), .is_state(is_state), .stable(stable));

  always #5 clk = ~clk;

  // Table entries (state, input) whose successor is another state.
  function automatic logic [15:0] unstable_entries();
    logic [15:0] m = '0;
    for (int s = 0; s < 4; s++)
      for (int xi = 0; xi < 4; xi++)
        if (SUCC[s][xi] != s + 1) m[s * 4 + xi] = 1'b1;
    return m;
  endfunction

  int unsigned model;          // present state 1..4
  int          transient_visits = 0;
  logic [15:0] entry_hit;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    entry_hit = '0;
    rst_n = 1'b0;
    x = 2'd0;
    fb_en = 3'b111;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y !== CODE[0] || state_id !== 2'd0 || !is_state) begin
      failures++;
      $display("FAIL reset code %b", y);
    end
    rst_n = 1'b1;
    model = 1;
    for (int step = 0; step < 600; step++) begin
      int unsigned nxt;
      int cycles;
      logic skew;
      @(negedge clk);
      x = 2'($urandom);
      nxt = SUCC[model - 1][x];
      skew = (step % 2) == 1;
      cycles = 0;
      if (nxt != model) entry_hit[(model - 1) * 4 + x] = 1'b1;
      // Let the state variables settle.
      while (!(stable && is_state) || cycles == 0) begin
        fb_en = skew ? 3'($urandom) : 3'b111;
        @(posedge clk);
        #1;
        cycles++;
        if (!is_state) transient_visits++;
        else if (y != CODE[model - 1] && y != CODE[nxt - 1]) begin
          checks++;
          failures++;
          $display("FAIL X%0d %0d->%0d passed through code %b", x + 1, model, nxt, y);
        end
        if (cycles > 200) break;
      end
      checks++;
      if (y !== CODE[nxt - 1] || state_id !== 2'(nxt - 1)) begin
        failures++;
        $display("FAIL X%0d from %0d: reached %b, want %b", x + 1, model, y, CODE[nxt - 1]);
      end
      if (!skew && nxt != model) begin
        checks++;
        if (cycles != 1) begin
          failures++;
          $display("FAIL transition took %0d clocks", cycles);
        end
      end
      model = nxt;
    end
    checks++;
    if (transient_visits == 0) begin
      failures++;
      $display("FAIL no transient code was ever visited");
    end
    checks++;
    if (entry_hit != unstable_entries()) begin
      failures++;
      $display("FAIL unstable entries hit: %b", entry_hit);
    end
    $display("transient code visits: %0d", transient_visits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
