// tb_mcc_adder: wide adders built from the 8-bit module.
// Checks the default (64-bit) adder and the 8-, 16-, 32-bit sizes the adder
// family is built in, plus 7- and 9-bit adders (partial top slice). Operands
// are random, with a share of long-propagate patterns (a = ~b) that ripple a
// carry through every slice, and some cases in the precharge phase.
module tb_mcc_adder;
  logic        eval, cin, strobe;
  logic [63:0] a, b;
  int checks = 0, failures = 0;
  int full_ripple = 0;

  mcc_adder_chk #(.W(64), .DEFAULT_SIZE(1)) u64 (.eval, .a_in(a), .b_in(b), .cin, .strobe);
  mcc_adder_chk #(.W(32)) u32 (.eval, .a_in(a), .b_in(b), .cin, .strobe);
  mcc_adder_chk #(.W(16)) u16 (.eval, .a_in(a), .b_in(b), .cin, .strobe);
  mcc_adder_chk #(.W(8))  u8  (.eval, .a_in(a), .b_in(b), .cin, .strobe);
  mcc_adder_chk #(.W(9))  u9  (.eval, .a_in(a), .b_in(b), .cin, .strobe);
  mcc_adder_chk #(.W(7))  u7  (.eval, .a_in(a), .b_in(b), .cin, .strobe);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    strobe = 0;
    for (int n = 0; n < 20000; n++) begin
      a   = {$urandom, $urandom};
      b   = {$urandom, $urandom};
      cin = 1'($urandom);
      case ($urandom_range(0, 3))
        0: begin b = ~a; cin = 1'b1; end          // carry through all bits
        1: b = ~a;                                // all propagate, no carry
        default: ;
      endcase
      if (b == ~a && cin) full_ripple++;
      eval = (n % 50) != 7;
      #1 strobe = 1;
      #1 strobe = 0;
    end
    checks   = u64.checks + u32.checks + u16.checks + u8.checks + u9.checks + u7.checks;
    failures += u64.failures + u32.failures + u16.failures + u8.failures + u9.failures + u7.failures;
    checks++;
    if (full_ripple == 0) failures++;
    $display("full-length carry ripples: %0d", full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
