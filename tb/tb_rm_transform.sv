// tb_rm_transform -- checks the Reed-Muller transform.
//  * the published 4-variable example: truth vector 0110100010001101 with
//    variables X1..X3 expanded negatively and X4 positively must give the
//    coefficient vector 0111010001001001 (both written first entry first,
//    X1 the most significant index bit);
//  * the 2-variable matrix f2 = [[1,0,0,0],[1,1,0,0],[1,0,1,0],[1,1,1,1]]
//    applied to every truth vector of a 2-input slice;
//  * random vectors and polarities against a direct sum-over-subsets
//    reference: coefficient k = xor of f(i xor pol) over all i inside k;
//  * positive polarity is its own inverse.
module tb_rm_transform;
  localparam int unsigned N = 4;
  localparam int unsigned W = 2**N;
  int checks = 0;
  int failures = 0;

  logic [W-1:0] w_p, w_rm, w_back;
  logic [N-1:0] pol;
  logic [W-1:0] w_p2, w_rm2;

  rm_transform #(.N(N)) dut (.w_p(w_p), .pol(pol), .w_rm(w_rm));
  rm_transform #(.N(N)) dut_inv (.w_p(w_rm), .pol('0), .w_rm(w_back));
  // 2-variable instance for the f2 matrix check.
  logic [3:0] v2, r2;
  rm_transform #(.N(2)) dut2 (.w_p(v2), .pol(2'b00), .w_rm(r2));

  function automatic logic [W-1:0] ref_rm(logic [W-1:0] tv, logic [N-1:0] p);
    logic [W-1:0] r;
    for (int k = 0; k < W; k++) begin
      r[k] = 1'b0;
      for (int i = 0; i < W; i++)
        if ((i & ~k) == 0) r[k] ^= tv[i ^ int'(p)];
    end
    return r;
  endfunction

  // Vector written first-entry-first as a bit string -> bit i = entry i.
  function automatic logic [W-1:0] from_text(logic [W-1:0] s);
    return {<<{s}};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published example.
    w_p = from_text(16'b0110100010001101);
    pol = 4'b1110;
    #1;
    checks++;
    if (w_rm !== from_text(16'b0111010001001001)) begin
      failures++;
      $display("FAIL example: got %b", {<<{w_rm}});
    end
    // f2 matrix, rows as printed: W_RM[r] = xor of W_p[c] where f2[r][c] = 1.
    for (int t = 0; t < 16; t++) begin
      logic [3:0] exp2;
      v2 = 4'(t);
      exp2[0] = v2[0];
      exp2[1] = v2[0] ^ v2[1];
      exp2[2] = v2[0] ^ v2[2];
      exp2[3] = v2[0] ^ v2[1] ^ v2[2] ^ v2[3];
      #1;
      checks++;
      if (r2 !== exp2) begin
        failures++;
        $display("FAIL f2 v=%b got %b want %b", v2, r2, exp2);
      end
    end
    // Random vectors and polarities.
    for (int t = 0; t < 400; t++) begin
      w_p = W'($urandom);
      pol = (t < 200) ? '0 : N'($urandom);
      #1;
      checks++;
      if (w_rm !== ref_rm(w_p, pol)) begin
        failures++;
        $display("FAIL random v=%h pol=%b got %h want %h", w_p, pol, w_rm, ref_rm(w_p, pol));
      end
      if (pol == '0) begin
        checks++;
        if (w_back !== w_p) begin
          failures++;
          $display("FAIL inverse v=%h back=%h", w_p, w_back);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
