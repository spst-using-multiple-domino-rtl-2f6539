// mcc_chain4: four-output domino Manchester carry chain.
//
// One shared chain produces four pseudo-carries in parallel:
//   h[0] = G[0] | P[0] & hin
//   h[k] = G[k] | P[k] & h[k-1]     (k = 1..3)
// which is the recursive form of the expanded carry sums of the original design
// (a multi-output domino gate whose longest pull-down stack is the four
// propagate transistors plus the chain input). The proposed 8-bit adder uses two of
// these: one fed with the even-position and one with the odd-position new
// generate/propagate terms, both with the adder carry-in as `hin`.
//
// Domino behaviour: all outputs are 0 while eval = 0 (precharge); while
// eval = 1 they show the function above. Chain length 4 follows the
// original design's limit on series transistors.
//
// Timing: combinational, outputs valid while eval = 1.
module mcc_chain4 (
  input  logic       eval, // domino clock: 0 = precharge, 1 = evaluate
  input  logic [3:0] G,    // new generate terms, lowest position first
  input  logic [3:0] P,    // new propagate terms
  input  logic       hin,  // chain input (carry-in of the adder)
  output logic [3:0] h     // pseudo-carries
);
  always_comb begin
    logic node;
    node = hin;
    for (int k = 0; k < 4; k++) begin
      node = G[k] | (P[k] & node);
      h[k] = eval & node;
    end
  end
endmodule
