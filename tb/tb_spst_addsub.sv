// tb_spst_addsub: end-to-end test of the SPST adder/subtractor.
//
// Runs the default 16-bit design (8-bit MSP, 8-bit LSP, no parameter
// overrides) and the 15-bit (8/7) and 17-bit (8/9) splits side by side. The
// three clocks follow the intended timing:
//   t=0 clk rises, operands glitch     t=1 eval rises (domino evaluate),
//       final operands applied         t=3 close_clk rises (decision latched)
//   t=7 result checked                 t=9 eval falls (precharge)
//   t=10 precharge level checked       (period 11)
// The result must be correct in the same cycle. Once mid-run rst_n is held
// low for a cycle (MSP forced on, result still correct). Every mechanism must
// occur: MSP shut off and turned back on, each closed operand/carry case,
// carry-out rebuilt by the bypass, subtraction, operand glitches, reset,
// domino precharge.
module tb_spst_addsub;
  logic clk = 0, close_clk = 0, eval = 0, chk = 0, pre = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cycle = 0;
  localparam int CYCLES = 30000;

  spst_addsub_chk #(.DEFAULT_SIZE(1))       u16 (.clk, .close_clk, .eval, .chk, .pre, .rst_n);
  spst_addsub_chk #(.MSP_W(8), .LSP_W(7))   u15 (.clk, .close_clk, .eval, .chk, .pre, .rst_n);
  spst_addsub_chk #(.MSP_W(8), .LSP_W(9))   u17 (.clk, .close_clk, .eval, .chk, .pre, .rst_n);

  initial begin : watchdog
    #(13 * (CYCLES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  task automatic mechanisms(string tag, int off, int on, int tof, int ton, int bypass,
                            int sb, int gl, int rs, int pc, int cases[8]);
    $display("%s: off=%0d on=%0d turn_off=%0d turn_on=%0d bypass_cout=%0d sub=%0d glitch=%0d reset=%0d precharge=%0d",
             tag, off, on, tof, ton, bypass, sb, gl, rs, pc);
    need({tag, " MSP off"}, off);
    need({tag, " MSP on"}, on);
    need({tag, " turn off"}, tof);
    need({tag, " turn on"}, ton);
    need({tag, " carry-out bypass"}, bypass);
    need({tag, " subtract"}, sb);
    need({tag, " glitch"}, gl);
    need({tag, " reset"}, rs);
    need({tag, " precharge"}, pc);
    for (int i = 0; i < 8; i++) need($sformatf("%s closed case %0d", tag, i), cases[i]);
  endtask

  initial begin
    #2 rst_n = 1;
    for (cycle = 0; cycle < CYCLES; cycle++) begin
      #1 clk = 1; pre = 0;   // t=0 (relative)
      #1 eval = 1;           // t=1
      #2 close_clk = 1;      // t=3
      #2 clk = 0;            // t=5
      #2 chk = 1;            // t=7
      #1 close_clk = 0; chk = 0;
      #1 eval = 0;           // t=9
      #1 pre = 1;            // t=10, precharge check
      if (cycle == CYCLES / 2) rst_n = 0;
      if (cycle == CYCLES / 2 + 1) rst_n = 1;
    end
    checks   = u16.checks + u15.checks + u17.checks;
    failures += u16.failures + u15.failures + u17.failures;
    mechanisms("16b", u16.n_off, u16.n_on, u16.n_turn_off, u16.n_turn_on, u16.n_bypass_cout,
               u16.n_sub, u16.n_glitch, u16.n_reset, u16.n_precharge, u16.n_case);
    mechanisms("15b", u15.n_off, u15.n_on, u15.n_turn_off, u15.n_turn_on, u15.n_bypass_cout,
               u15.n_sub, u15.n_glitch, u15.n_reset, u15.n_precharge, u15.n_case);
    mechanisms("17b", u17.n_off, u17.n_on, u17.n_turn_off, u17.n_turn_on, u17.n_bypass_cout,
               u17.n_sub, u17.n_glitch, u17.n_reset, u17.n_precharge, u17.n_case);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
