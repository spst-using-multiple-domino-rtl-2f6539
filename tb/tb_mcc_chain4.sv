// tb_mcc_chain4: exhaustive check of the four-output domino carry chain.
// Every G, P, hin (512 cases) in both clock phases. The expected outputs use
// the expanded (non-recursive) carry sum:
//   h_k = G_k | P_k G_{k-1} | P_k P_{k-1} G_{k-2} | ... | P_k ... P_0 hin.
module tb_mcc_chain4;
  logic       eval, hin;
  logic [3:0] G, P, h;
  int checks = 0, failures = 0;

  mcc_chain4 dut (.eval(eval), .G(G), .P(P), .hin(hin), .h(h));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] expanded(logic [3:0] gg, logic [3:0] pp, logic ci);
    logic [3:0] r;
    for (int k = 0; k < 4; k++) begin
      logic term, prod;
      term = 1'b0;
      for (int j = 0; j <= k; j++) begin
        prod = gg[j];
        for (int m = j + 1; m <= k; m++) prod = prod & pp[m];
        term = term | prod;
      end
      prod = ci;
      for (int m = 0; m <= k; m++) prod = prod & pp[m];
      r[k] = term | prod;
    end
    return r;
  endfunction

  initial begin
    for (int ph = 0; ph < 2; ph++) begin
      for (int v = 0; v < 512; v++) begin
        logic [3:0] exp_h;
        eval = ph[0];
        {hin, P, G} = 9'(v);
        #1;
        exp_h = eval ? expanded(G, P, hin) : 4'b0;
        checks++;
        if (h !== exp_h) begin
          failures++;
          if (failures < 10)
            $display("FAIL eval=%0b G=%b P=%b hin=%b: h=%b exp=%b", eval, G, P, hin, h, exp_h);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
