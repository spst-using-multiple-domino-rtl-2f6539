// tb_mcc_adder8: exhaustive check of the 8-bit double-carry-chain adder.
// All 2^17 operand/carry-in combinations are evaluated (eval = 1); the sum is
// compared with integer addition and every carry c_i with bit i+1 of the sum
// of the low i+1 operand bits plus carry-in. A sample of cases is also
// checked in the precharge phase, where every carry must be 0.
module tb_mcc_adder8;
  logic       eval, cin, cout;
  logic [7:0] a, b, s, c;
  int checks = 0, failures = 0;

  mcc_adder8 dut (.eval(eval), .a(a), .b(b), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic [8:0] full;
      logic [7:0] exp_c;
      {cin, b, a} = 17'(v);
      eval = 1'b1;
      #1;
      full = 9'(a) + 9'(b) + 9'(cin);
      for (int i = 0; i < 8; i++) begin
        logic [8:0] part;
        part = 9'(a & 8'((1 << (i + 1)) - 1)) + 9'(b & 8'((1 << (i + 1)) - 1)) + 9'(cin);
        exp_c[i] = part[i+1];
      end
      checks++;
      if (s !== full[7:0] || c !== exp_c || cout !== full[8]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%b: s=%h c=%b cout=%b exp s=%h c=%b", a, b, cin, s, c, cout,
                   full[7:0], exp_c);
      end
      if (v % 97 == 0) begin
        eval = 1'b0;
        #1;
        checks++;
        if (c !== 8'h00 || cout !== 1'b0) begin
          failures++;
          $display("FAIL precharge a=%h b=%h: c=%b", a, b, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
