// spst_addsub_chk: one SPST adder/subtractor with its stimulus and checker.
//
// Per cycle of the shared clocks: at the rising edge of clk a throw-away
// operand pair is applied (a glitch), at the rising edge of eval the real
// pair, which then stays stable across the close_clk edge; at the rising edge
// of chk the result is compared with a + b + cin (or a - b - cin) computed on
// N+1-bit integers. Operands are mostly sign-extended small values, so the
// MSP is often shut off. Counters record how often each mechanism occurred;
// the enclosing testbench reads them. At the rising edge of pre (eval low)
// every carry inside both adders must be 0, the domino precharge level.
module spst_addsub_chk #(
  parameter int MSP_W = 8,
  parameter int LSP_W = 8,
  parameter bit DEFAULT_SIZE = 0   // 1: instantiate spst_addsub with its defaults
) (
  input logic clk,
  input logic close_clk,
  input logic eval,
  input logic chk,
  input logic pre,      // strobe during the precharge phase
  input logic rst_n
);
  localparam int N = MSP_W + LSP_W;

  logic [N-1:0] a, b, sum;
  logic         sub, cin, cout, msp_off;
  int checks = 0, failures = 0;
  int n_off = 0, n_on = 0, n_sub = 0, n_glitch = 0, n_bypass_cout = 0, n_reset = 0;
  int n_turn_on = 0, n_turn_off = 0, n_precharge = 0;
  logic [N-1:0] carries;  // every carry of the LSP and MSP adders
  int n_case[8];        // closed cases by {A all ones, B all ones, C_LSP}
  logic prev_off = 0;

  if (DEFAULT_SIZE) begin : g_def
    spst_addsub dut (.close_clk, .rst_n, .eval, .sub, .a, .b, .cin, .sum, .cout, .msp_off);
    assign carries = {dut.u_msp.c, dut.u_lsp.c};
  end else begin : g_par
    spst_addsub #(.MSP_W(MSP_W), .LSP_W(LSP_W)) dut (
      .close_clk, .rst_n, .eval, .sub, .a, .b, .cin, .sum, .cout, .msp_off);
    assign carries = {dut.u_msp.c, dut.u_lsp.c};
  end

  function automatic logic [N-1:0] operand();
    logic [LSP_W-1:0] lo;
    lo = LSP_W'({$urandom, $urandom});
    case ($urandom_range(0, 5))
      0, 1: return {{MSP_W{1'b0}}, lo};             // small positive
      2, 3: return {{MSP_W{1'b1}}, lo};             // small negative
      default: return N'({$urandom, $urandom});    // full range
    endcase
  endfunction

  initial for (int i = 0; i < 8; i++) n_case[i] = 0;

  always @(posedge clk) begin
    a = operand(); b = operand();
    n_glitch++;
  end

  always @(posedge eval) begin
    a   = operand();
    b   = operand();
    sub = 1'($urandom);
    cin = 1'($urandom);
  end

  // While precharging, every domino carry of both adders must be low.
  always @(posedge pre) begin
    checks++;
    n_precharge++;
    if (eval || carries !== '0) begin
      failures++;
      $display("FAIL %0d/%0d precharge: carries=%h", MSP_W, LSP_W, carries);
    end
  end

  always @(posedge chk) begin
    logic [N-1:0]     bb;
    logic [N:0]       full;
    logic [LSP_W:0]   low;
    logic             c0, exp_off, a1, b1;
    bb   = sub ? ~b : b;
    c0   = cin ^ sub;
    full = {1'b0, a} + {1'b0, bb} + (N+1)'(c0);
    low  = {1'b0, a[LSP_W-1:0]} + {1'b0, bb[LSP_W-1:0]} + (LSP_W+1)'(c0);
    a1   = &a[N-1:LSP_W];
    b1   = &bb[N-1:LSP_W];
    exp_off = rst_n && (a1 || a[N-1:LSP_W] == '0) && (b1 || bb[N-1:LSP_W] == '0);

    checks++;
    if (sum !== full[N-1:0] || cout !== full[N] || msp_off !== exp_off) begin
      failures++;
      if (failures < 6)
        $display("FAIL %0d/%0d a=%h b=%h sub=%b cin=%b: sum=%h cout=%b off=%b exp %h %b %b",
                 MSP_W, LSP_W, a, b, sub, cin, sum, cout, msp_off, full[N-1:0], full[N], exp_off);
    end
    if (!rst_n) n_reset++;
    if (sub) n_sub++;
    if (msp_off) begin
      n_off++;
      n_case[{a1, b1, low[LSP_W]}]++;
      if (cout) n_bypass_cout++;
    end else n_on++;
    if (msp_off && !prev_off) n_turn_off++;
    if (!msp_off && prev_off) n_turn_on++;
    prev_off = msp_off;
  end
endmodule
