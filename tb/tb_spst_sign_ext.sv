// tb_spst_sign_ext: the sign-extension unit passes the pseudo-sum while the
// MSP runs and, while it is shut off, outputs one of the four values an MSP
// of sign-extension operands can produce: 0, 1, -1 or -2 (two's complement),
// selected by sign and carr_ctrl.
module tb_spst_sign_ext;
  logic       close, sign, carr_ctrl;
  logic [7:0] pseudo_sum, sum, expected;
  int checks = 0, failures = 0;

  spst_sign_ext dut (.close, .sign, .carr_ctrl, .pseudo_sum, .sum);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 800; n++) begin
      pseudo_sum = 8'($urandom);
      {close, sign, carr_ctrl} = 3'(n);
      #1;
      if (!close)                 expected = pseudo_sum;
      else if (!sign && !carr_ctrl) expected = 8'd0;
      else if (!sign)             expected = 8'd1;
      else if (carr_ctrl)         expected = 8'hff;   // -1
      else                        expected = 8'hfe;   // -2
      checks++;
      if (sum !== expected) begin
        failures++;
        $display("FAIL close=%b sign=%b cc=%b ps=%h: sum=%h exp=%h", close, sign, carr_ctrl,
                 pseudo_sum, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
