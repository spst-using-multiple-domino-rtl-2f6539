// mcc_adder: W-bit adder built from the 8-bit double-carry-chain module.
//
// The operands are cut into 8-bit slices, each added by one mcc_adder8; the
// carry-out of a slice is the carry-in of the next, so the block carry ripples
// from slice to slice while the carries inside each slice come from its two
// parallel chains. Wider adders built this way (8, 16, 32 and 64 bits) are the
// use the original design makes of the 8-bit module. W need not be a multiple of 8:
// the top slice is padded with zero bits and the carry-out is taken at bit W-1
// (this padding is this design's own choice, so that the 7- and 9-bit parts of
// a split adder can use the same module).
//
// Interface: a, b, cin in; s, the carry of every bit c (c[W-1] = cout).
// Timing: combinational; valid while the domino clock eval = 1, precharged
// while eval = 0.
module mcc_adder #(
  parameter int W = 64
) (
  input  logic         eval,  // domino clock: 0 = precharge, 1 = evaluate
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] c,
  output logic         cout
);
  localparam int NS = (W + 7) / 8;    // number of 8-bit slices
  localparam int WP = NS * 8;         // padded width

  logic [WP-1:0] ap, bp, sp, cp;
  logic [NS:0]   bc;                  // block carries

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign bc[0] = cin;

  for (genvar k = 0; k < NS; k++) begin : g_slice
    mcc_adder8 u_add8 (
      .eval (eval),
      .a    (ap[8*k +: 8]),
      .b    (bp[8*k +: 8]),
      .cin  (bc[k]),
      .s    (sp[8*k +: 8]),
      .c    (cp[8*k +: 8]),
      .cout (bc[k+1])
    );
  end

  assign s    = sp[W-1:0];
  assign c    = cp[W-1:0];
  assign cout = (W == WP) ? bc[NS] : cp[W-1];
endmodule
