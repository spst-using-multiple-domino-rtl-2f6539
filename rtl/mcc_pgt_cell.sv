// mcc_pgt_cell: per-bit generate / propagate cell of the domino adder.
//
// Computes, for one bit position, the three signals every carry equation of
// the adder is built from: the generate g = a & b, the exclusive-OR propagate
// p = a ^ b and the inclusive-OR propagate t = a | b. Each is a footed domino
// gate: while the clock `eval` is low the dynamic node is precharged and the
// gate output (after its output inverter) is 0; while `eval` is high the output
// shows the logic function. The model gives that logic level behaviour; the
// keeper and charge-sharing effects of the transistor circuit are not modelled.
//
// The three functions and the precharge/evaluate behaviour follow the
// original design. The exclusive-OR gate needs both rails of a and b (a dual-rail
// input in the transistor circuit); here the complements are formed
// internally. Inputs must be stable while eval is high (domino monotonicity).
//
// Timing: purely combinational, outputs valid while eval = 1.
module mcc_pgt_cell (
  input  logic eval,  // domino clock: 0 = precharge, 1 = evaluate
  input  logic a,
  input  logic b,
  output logic g,     // generate
  output logic p,     // exclusive-OR propagate
  output logic t      // inclusive-OR propagate
);
  always_comb begin
    g = eval & (a & b);
    p = eval & ((a & ~b) | (~a & b));
    t = eval & (a | b);
  end
endmodule
