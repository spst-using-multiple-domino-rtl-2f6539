// tb_spst_detect: detection logic and its glitch-filtering registers.
// Operands are drawn from three classes (all zeros, all ones, random) so every
// closed case occurs. The expected decision is worked out from arithmetic:
// close when both MSP operands are all zeros or all ones, and then sign /
// carr_ctrl must equal the top bit / bit 0 of the true MSP sum a + b + C_LSP;
// otherwise both are 0. Operand changes between close_clk edges (glitches)
// must not reach the outputs, and reset must clear them.
module tb_spst_detect;
  import spst_pkg::*;
  logic       close_clk = 0, rst_n = 0, c_lsp;
  logic [7:0] a, b;
  logic       a_and, b_and;
  spst_ctrl_t ctrl;
  int checks = 0, failures = 0;
  int closed_cnt = 0, open_cnt = 0, glitch_cnt = 0, reset_cnt = 0;

  spst_detect dut (.close_clk, .rst_n, .a_msp(a), .b_msp(b), .c_lsp, .ctrl, .a_and, .b_and);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pick();
    case ($urandom_range(0, 2))
      0: return 8'h00;
      1: return 8'hff;
      default: return 8'($urandom);
    endcase
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h c=%b ctrl=%b", what, a, b, c_lsp, ctrl);
    end
  endtask

  initial begin
    a = 0; b = 0; c_lsp = 0;
    #5 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [7:0] s;
      logic       exp_close;
      spst_ctrl_t held;
      a = pick(); b = pick(); c_lsp = 1'($urandom);
      #2 close_clk = 1;
      #1;
      s = a + b + 8'(c_lsp);
      exp_close = (a == 8'h00 || a == 8'hff) && (b == 8'h00 || b == 8'hff);
      check("close", ctrl.close == exp_close);
      check("a_and/b_and", a_and == (a == 8'hff) && b_and == (b == 8'hff));
      if (exp_close) begin
        closed_cnt++;
        check("sign", ctrl.sign == s[7]);
        check("carr_ctrl", ctrl.carr_ctrl == s[0]);
      end else begin
        open_cnt++;
        check("sign/carr_ctrl zero when open", !ctrl.sign && !ctrl.carr_ctrl);
      end
      // glitch: operands change with no close_clk edge
      held = ctrl;
      a = ~a; b = 8'($urandom); c_lsp = ~c_lsp;
      #1;
      check("glitch filtered", ctrl == held);
      glitch_cnt++;
      #1 close_clk = 0;
      if (n % 500 == 250) begin
        rst_n = 0;
        #1;
        check("reset", ctrl == '0);
        reset_cnt++;
        rst_n = 1;
      end
      #2;
    end
    check("closed cases seen", closed_cnt > 0);
    check("open cases seen", open_cnt > 0);
    check("glitches applied", glitch_cnt > 0);
    check("resets applied", reset_cnt > 0);
    $display("closed=%0d open=%0d glitches=%0d resets=%0d", closed_cnt, open_cnt, glitch_cnt, reset_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
