// tb_feynman_gate -- exhaustive check of feynman_gate against its published truth table.
// Every input combination is applied and the outputs are compared with the
// table row written out below (inputs, then expected outputs).
module tb_feynman_gate;
  int checks = 0;
  int failures = 0;
  localparam int OUT_W = 2;
  // {A, B, P, Q}
  localparam logic [3:0] table_rows [4] = '{4'b00_00, 4'b01_01, 4'b10_11, 4'b11_10};
  logic A, B, P, Q;
  feynman_gate dut (.A(A), .B(B), .P(P), .Q(Q));
  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < $size(table_rows); r++) begin
      {A, B} = table_rows[r][3:2];
      #1;
      checks++;
      if ({P, Q} !== table_rows[r][1:0]) begin
        failures++;
        $display("FAIL A=%b B=%b got PQ=%b%b want %b", A, B, P, Q, table_rows[r][1:0]);
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
