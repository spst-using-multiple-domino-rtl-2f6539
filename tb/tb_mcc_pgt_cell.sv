// tb_mcc_pgt_cell: exhaustive check of the domino generate/propagate cell.
// All 8 combinations of eval, a, b; expected values are written out from the
// definitions g = a&b, p = a^b, t = a|b, all 0 while precharging (eval = 0).
module tb_mcc_pgt_cell;
  logic eval, a, b, g, p, t;
  int checks = 0, failures = 0;

  mcc_pgt_cell dut (.eval(eval), .a(a), .b(b), .g(g), .p(p), .t(t));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic eg, ep, et;
      {eval, a, b} = 3'(v);
      #1;
      // truth table: g only for 11, p for 01/10, t for all but 00
      eg = eval && a && b;
      ep = eval && (a != b);
      et = eval && (a || b);
      checks++;
      if ({g, p, t} !== {eg, ep, et}) begin
        failures++;
        $display("FAIL eval=%0b a=%0b b=%0b: got g=%0b p=%0b t=%0b", eval, a, b, g, p, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
