// tb_peres_gate -- exhaustive check of peres_gate against its published truth table.
// Every input combination is applied and the outputs are compared with the
// table row written out below (inputs, then expected outputs).
module tb_peres_gate;
  int checks = 0;
  int failures = 0;
  localparam int OUT_W = 3;
  // {A, B, C, P, Q, R}
  localparam logic [5:0] table_rows [8] = '{6'b000_000, 6'b001_001, 6'b010_010, 6'b011_011, 6'b100_110, 6'b101_111, 6'b110_101, 6'b111_100};
  logic A, B, C, P, Q, R;
  peres_gate dut (.A(A), .B(B), .C(C), .P(P), .Q(Q), .R(R));
  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < $size(table_rows); r++) begin
      {A, B, C} = table_rows[r][5:3];
      #1;
      checks++;
      if ({P, Q, R} !== table_rows[r][2:0]) begin
        failures++;
        $display("FAIL ABC=%b%b%b got PQR=%b%b%b want %b", A, B, C, P, Q, R, table_rows[r][2:0]);
      end
    end
    // Reversibility: the outputs of all rows are distinct.
    for (int r = 0; r < $size(table_rows); r++)
      for (int s = r + 1; s < $size(table_rows); s++) begin
        checks++;
        if (table_rows[r][OUT_W-1:0] == table_rows[s][OUT_W-1:0]) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
