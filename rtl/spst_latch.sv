// spst_latch: MSP operand latch of the SPST adder/subtractor.
//
// Built, as in the original design, from plain AND gates rather than storage
// elements: while the MSP is needed (close = 0) the operand passes unchanged;
// while the MSP is shut off (close = 1) the MSP adder sees all zeros, so no
// transition of the operand reaches it. Because close only changes on the
// delayed clock close_clk, the gated operand changes at most once per cycle.
//
// Timing: combinational.
module spst_latch #(
  parameter int W = 8
) (
  input  logic         close,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  assign q = d & {W{~close}};
endmodule
