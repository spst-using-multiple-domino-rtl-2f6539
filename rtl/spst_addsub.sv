// spst_addsub: low-power adder/subtractor with spurious-power suppression.
//
// An N-bit (N = MSP_W + LSP_W) two's-complement adder/subtractor split into a
// least significant part (LSP, always computed) and a most significant part
// (MSP). Most data in DSP datapaths are small, so both MSP operands are often
// mere sign extensions (all zeros or all ones). The MSP sum is then known from
// the operand classes and the LSP carry alone, and computing it would only
// burn power in spurious carry transitions. The detection logic (spst_detect)
// spots these cases; its registered decision `close` forces the MSP operands
// and MSP carry-in to zero through AND-gate latches (spst_latch), and the
// sign-extension unit (spst_sign_ext) rebuilds the MSP sum from the predicted
// sign and carr_ctrl bits. Both parts use the domino double-carry-chain adder
// (mcc_adder).
//
// Carry-out: with the MSP shut off its adder's carry is 0, so the carry-out is
// rebuilt by bypass gates from the operand classes:
//   cout = cout_msp | A_and & B_and | (A_and | B_and) & C_LSP
// (the MSP of a sum of -1 and an operand with carry-in c overflows unsigned
// when c = 1, and -1 + -1 always does). The signals used (A_and, B_and, C_in,
// MSP carry) are those of the original design's block diagram; the expression is
// derived from the arithmetic.
//
// Subtraction: sub = 1 inverts b before both parts and adds one through the
// LSP carry-in, so the detection logic sees the operand actually added. The
// carry-in port then acts as a borrow: sum = a - b - cin. The subtract
// mechanism and the sense of cin in it are this design's own choices.
//
// Timing (three clocks): the operands change after the rising edge of the
// system clock; close_clk, a delayed copy of it, captures the decision after
// the operands and C_LSP have settled; the domino adders evaluate while
// eval = 1 and are precharged while eval = 0. sum/cout are valid in the same
// cycle once the adders have evaluated after the close_clk edge.
// msp_off reports the registered decision.
module spst_addsub
  import spst_pkg::*;
#(
  parameter int MSP_W = 8,
  parameter int LSP_W = 8
) (
  input  logic                   close_clk, // delayed clock of the decision registers
  input  logic                   rst_n,     // asynchronous, active low
  input  logic                   eval,      // domino clock of the adders
  input  logic                   sub,       // 0: a + b + cin, 1: a - b - cin
  input  logic [MSP_W+LSP_W-1:0] a,
  input  logic [MSP_W+LSP_W-1:0] b,
  input  logic                   cin,
  output logic [MSP_W+LSP_W-1:0] sum,
  output logic                   cout,
  output logic                   msp_off    // 1: MSP was shut off this cycle
);
  localparam int N = MSP_W + LSP_W;

  logic [N-1:0]     b_op;
  logic [LSP_W-1:0] sum_lsp, c_lsp_all;
  logic             c_lsp;
  logic [MSP_W-1:0] a_msp, b_msp, a_gated, b_gated, psum, sum_msp, c_msp_all;
  logic             cin_msp, cout_msp;
  logic             a_and, b_and;
  spst_ctrl_t       ctrl;

  assign b_op  = b ^ {N{sub}};
  assign a_msp = a[N-1:LSP_W];
  assign b_msp = b_op[N-1:LSP_W];

  // LSP adder
  mcc_adder #(.W(LSP_W)) u_lsp (
    .eval (eval), .a(a[LSP_W-1:0]), .b(b_op[LSP_W-1:0]), .cin(cin ^ sub),
    .s    (sum_lsp), .c(c_lsp_all), .cout(c_lsp)
  );

  // Detection logic with its glitch-filtering registers
  spst_detect #(.MSP_W(MSP_W)) u_detect (
    .close_clk (close_clk), .rst_n(rst_n), .a_msp(a_msp), .b_msp(b_msp),
    .c_lsp     (c_lsp), .ctrl(ctrl), .a_and(a_and), .b_and(b_and)
  );

  // Latch-A, Latch-B and the gated MSP carry-in
  spst_latch #(.W(MSP_W)) u_latch_a (.close(ctrl.close), .d(a_msp), .q(a_gated));
  spst_latch #(.W(MSP_W)) u_latch_b (.close(ctrl.close), .d(b_msp), .q(b_gated));
  assign cin_msp = c_lsp & ~ctrl.close;

  // MSP adder
  mcc_adder #(.W(MSP_W)) u_msp (
    .eval (eval), .a(a_gated), .b(b_gated), .cin(cin_msp),
    .s    (psum), .c(c_msp_all), .cout(cout_msp)
  );

  // Sign-extension unit
  spst_sign_ext #(.W(MSP_W)) u_se (
    .close (ctrl.close), .sign(ctrl.sign), .carr_ctrl(ctrl.carr_ctrl),
    .pseudo_sum(psum), .sum(sum_msp)
  );

  assign sum     = {sum_msp, sum_lsp};
  assign cout    = cout_msp | (a_and & b_and) | ((a_and | b_and) & c_lsp);
  assign msp_off = ctrl.close;

  // While the MSP is off its adder must see only zeros.
  always_comb begin
    if (ctrl.close) assert (a_gated == '0 && b_gated == '0 && !cin_msp);
  end
endmodule
