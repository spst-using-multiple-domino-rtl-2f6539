// tb_spst_latch: the AND-gate operand latch passes data when close = 0 and
// outputs zero when close = 1. Random operands, both settings.
module tb_spst_latch;
  logic       close;
  logic [7:0] d, q;
  int checks = 0, failures = 0;

  spst_latch dut (.close(close), .d(d), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 512; n++) begin
      d     = 8'($urandom);
      close = n[0];
      #1;
      checks++;
      if (q !== (close ? 8'h00 : d)) begin
        failures++;
        $display("FAIL close=%b d=%h q=%h", close, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
