// spst_detect: detection-logic unit of the SPST adder/subtractor.
//
// Looks at the two MSP operands and the carry coming out of the LSP and
// decides whether the MSP addition can be skipped. Each operand is classified
// by an AND of all its bits (A_and: all ones, i.e. a sign extension of a
// negative LSP value) and a NOR of all its bits (A_nor: all zeros). When both
// operands are all-zeros or all-ones the MSP sum is known in advance:
//   close     = (A_and | A_nor) & (B_and | B_nor)
// and its bits are rebuilt from two predicted signals. sign and carr_ctrl are
// the Karnaugh maps of the original design written as sum-of-products over
// (C_LSP, A_and, A_nor, B_and, B_nor):
//   B all zeros: carr_ctrl = A_and & ~C | A_nor & C     sign = A_and & ~C
//   B all ones : carr_ctrl = A_nor & ~C | A_and & C     sign = A_nor & ~C | A_and
//   otherwise  : both 0
// (carr_ctrl is sum bit 0 of the MSP and sign its upper bits.)
//
// Glitch filtering: close, sign and carr_ctrl are not used straight from the
// gates. Three 1-bit registers clocked by close_clk, a delayed copy of the
// system clock whose edge falls after the operands and C_LSP have settled,
// hold them, so transients of the gates never reach the MSP latches. Reset
// (rst_n low, asynchronous) clears all three, leaving the MSP switched on.
// a_and and b_and are also output unregistered for the carry-out bypass.
//
// The classification, the maps, the three registers, close_clk and rst_n are
// the original design's; the reset values and the asynchronous reset are this
// design's choice. Timing: decisions change on the rising edge of close_clk.
module spst_detect
  import spst_pkg::*;
#(
  parameter int MSP_W = 8
) (
  input  logic             close_clk, // delayed clock of the decision registers
  input  logic             rst_n,
  input  logic [MSP_W-1:0] a_msp,
  input  logic [MSP_W-1:0] b_msp,
  input  logic             c_lsp,     // carry out of the LSP adder
  output spst_ctrl_t       ctrl,      // registered close / sign / carr_ctrl
  output logic             a_and,     // A_MSP all ones (combinational)
  output logic             b_and      // B_MSP all ones (combinational)
);
  logic a_nor, b_nor;
  logic a_one, a_zero, b_one, b_zero;
  spst_ctrl_t ctrl_d;

  always_comb begin
    a_and  = &a_msp;
    a_nor  = ~|a_msp;
    b_and  = &b_msp;
    b_nor  = ~|b_msp;
    // one-hot operand classes, as the Karnaugh maps distinguish them
    a_one  = a_and & ~a_nor;
    a_zero = a_nor & ~a_and;
    b_one  = b_and & ~b_nor;
    b_zero = b_nor & ~b_and;

    ctrl_d.close     = (a_and | a_nor) & (b_and | b_nor);
    ctrl_d.carr_ctrl = (b_zero & ((a_one & ~c_lsp) | (a_zero & c_lsp)))
                     | (b_one  & ((a_zero & ~c_lsp) | (a_one & c_lsp)));
    ctrl_d.sign      = (b_zero & a_one & ~c_lsp)
                     | (b_one  & ((a_zero & ~c_lsp) | a_one));
  end

  always_ff @(posedge close_clk or negedge rst_n) begin
    if (!rst_n) ctrl <= '0;
    else        ctrl <= ctrl_d;
  end
endmodule
