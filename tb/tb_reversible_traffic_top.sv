// tb_reversible_traffic_top -- end-to-end test of the whole design at its
// default sizes.
// Automaton: after reset it is driven through a directed walk that takes
// every unstable entry of the transition table, then through random input
// vectors, alternately with all feedback enables high (each change of state
// must take one clock) and with random enables (the state variables switch
// in random order and may pass through transient codes). The state reached
// is compared with the transition table after every input vector.
// Reed-Muller unit: the published 4-variable example, then random vectors
// transformed and transformed back (positive polarity is an involution).
// Fredkin and Peres gates: random inputs against their defining equations.
// Each mechanism (single-clock change, skewed change through a transient
// code, input vector that keeps the state, mixed-polarity transform, inverse
// transform, Fredkin swap, Fredkin pass) is counted; one that never happens
// is a failure.
module tb_reversible_traffic_top;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  localparam int unsigned SUCC [4][4] = '{'{1, 4, 1, 2},
                                          '{2, 2, 1, 2},
                                          '{1, 2, 3, 4},
                                          '{2, 4, 3, 4}};
  localparam logic [2:0] CODE [4] = '{3'b111, 3'b100, 3'b001, 3'b010};

  logic        clk = 1'b0;
  logic        rst_n;
  logic [1:0]  x;
  logic [2:0]  fb_en;
  logic [2:0]  y;
  logic [1:0]  state_id;
  logic        is_state, stable;
  logic [15:0] rm_wp, rm_wrm;
  logic [3:0]  rm_pol;
  lines3_t     fk_in, fk_out, pg_in, pg_out;

  reversible_traffic_top dut (
    .clk(clk), .rst_n(rst_n), .x(x), .fb_en(fb_en), .y(y), .state_id(state_id),
    .is_state(is_state), .stable(stable), .rm_wp(rm_wp), .rm_pol(rm_pol),
    .rm_wrm(rm_wrm), .fk_in(fk_in), .fk_out(fk_out), .pg_in(pg_in), .pg_out(pg_out)
  );

  always #5 clk = ~clk;

  int n_fast = 0, n_skewed_transient = 0, n_hold = 0;
  int n_rm_mixed = 0, n_rm_inverse = 0, n_swap = 0, n_pass = 0;
  int unsigned model;
  // Directed walk (input vector numbers) through all unstable table entries.
  localparam int unsigned WALK [15] = '{2, 1, 3, 4, 3, 2, 3, 1, 2, 3, 2, 3, 2, 3, 4};

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply input vector xi and wait for a stable state code.
  task automatic apply(input int unsigned xi, input logic skew);
    int unsigned nxt;
    int cycles = 0;
    logic saw_transient = 1'b0;
    @(negedge clk);
    x = 2'(xi);
    nxt = SUCC[model - 1][xi];
    while (!(stable && is_state) || cycles == 0) begin
      fb_en = skew ? 3'($urandom) : 3'b111;
      @(posedge clk);
      #1;
      cycles++;
      if (!is_state) saw_transient = 1'b1;
      else if (y != CODE[model - 1] && y != CODE[nxt - 1]) begin
        checks++;
        failures++;
        $display("FAIL X%0d %0d->%0d passed through state code %b", xi + 1, model, nxt, y);
      end
      if (cycles > 200) break;
    end
    checks++;
    if (y !== CODE[nxt - 1] || state_id !== 2'(nxt - 1)) begin
      failures++;
      $display("FAIL X%0d from state %0d reached %b, want %b", xi + 1, model, y, CODE[nxt - 1]);
    end
    if (nxt == model) n_hold++;
    else if (!skew) begin
      n_fast++;
      checks++;
      if (cycles != 1) begin
        failures++;
        $display("FAIL change of state took %0d clocks", cycles);
      end
    end else if (saw_transient) n_skewed_transient++;
    model = nxt;
  endtask

  function automatic logic [15:0] from_text(logic [15:0] s);
    return {<<{s}};
  endfunction

  initial begin
    rst_n = 1'b0;
    x = 2'd0;
    fb_en = 3'b111;
    rm_wp = '0;
    rm_pol = '0;
    fk_in = '0;
    pg_in = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y !== CODE[0]) begin
      failures++;
      $display("FAIL reset code %b", y);
    end
    rst_n = 1'b1;
    model = 1;

    // Directed walk, then random input vectors.
    foreach (WALK[i]) apply(WALK[i] - 1, 1'b0);
    for (int i = 0; i < 400; i++) apply($urandom % 4, i[0]);

    // Reed-Muller transform: published example, mixed polarity.
    rm_wp = from_text(16'b0110100010001101);
    rm_pol = 4'b1110;
    #1;
    checks++;
    if (rm_wrm !== from_text(16'b0111010001001001)) begin
      failures++;
      $display("FAIL Reed-Muller example: %b", {<<{rm_wrm}});
    end else n_rm_mixed++;
    // Positive polarity, forward and back.
    for (int i = 0; i < 200; i++) begin
      logic [15:0] v, c;
      v = 16'($urandom);
      rm_wp = v;
      rm_pol = '0;
      #1;
      c = rm_wrm;
      // Reference: coefficient k = xor of v[i] over i inside k.
      for (int k = 0; k < 16; k++) begin
        logic r;
        r = 1'b0;
        for (int j = 0; j < 16; j++) if ((j & ~k) == 0) r ^= v[j];
        checks++;
        if (c[k] !== r) begin
          failures++;
          $display("FAIL Reed-Muller v=%h coefficient %0d", v, k);
        end
      end
      rm_wp = c;
      #1;
      checks++;
      if (rm_wrm !== v) begin
        failures++;
        $display("FAIL inverse transform v=%h got %h", v, rm_wrm);
      end else n_rm_inverse++;
    end

    // Fredkin and Peres gates.
    for (int i = 0; i < 64; i++) begin
      lines3_t f, p;
      f = 3'($urandom);
      p = 3'($urandom);
      fk_in = f;
      pg_in = p;
      #1;
      checks += 2;
      if (fk_out !== (f.a ? lines3_t'({f.a, f.c, f.b}) : f)) begin
        failures++;
        $display("FAIL Fredkin %b -> %b", f, fk_out);
      end
      if (f.a && f.b != f.c) n_swap++;
      else n_pass++;
      if (pg_out !== lines3_t'({p.a, p.a ^ p.b, (p.a & p.b) ^ p.c})) begin
        failures++;
        $display("FAIL Peres %b -> %b", p, pg_out);
      end
    end

    $display("single-clock changes %0d, skewed changes through transient codes %0d, holds %0d",
             n_fast, n_skewed_transient, n_hold);
    $display("mixed-polarity transforms %0d, inverse transforms %0d, swaps %0d, passes %0d",
             n_rm_mixed, n_rm_inverse, n_swap, n_pass);
    checks++;
    if (n_fast == 0 || n_skewed_transient == 0 || n_hold == 0 || n_rm_mixed == 0 ||
        n_rm_inverse == 0 || n_swap == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
