// spst_sign_ext: sign-extension (SE) unit of the SPST adder/subtractor.
//
// Chooses the MSP part of the sum. While the MSP computes (close = 0) it
// passes the MSP adder's result (the "pseudo-sum"). While the MSP is shut off
// (close = 1) the MSP sum can only be 0...0, 0...01, 1...1 or 1...10, and it is
// rebuilt from the two predicted bits of the detection logic: bit 0 is
// carr_ctrl and every higher bit is sign.
//
// The unit's place and inputs are the original design's; the bit assignment is read
// from the detection logic's Karnaugh maps (it reproduces the true MSP sum in
// all closed cases). Timing: combinational.
module spst_sign_ext #(
  parameter int W = 8
) (
  input  logic         close,
  input  logic         sign,
  input  logic         carr_ctrl,
  input  logic [W-1:0] pseudo_sum,
  output logic [W-1:0] sum
);
  always_comb begin
    if (close) sum = {{(W-1){sign}}, carr_ctrl};
    else       sum = pseudo_sum;
  end
endmodule
