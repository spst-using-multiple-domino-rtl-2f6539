// mcc_adder8: 8-bit adder module with two independent 4-bit carry chains.
//
// The carries of an 8-bit addition are split by parity. With the bit signals
// g_i = a_i b_i, p_i = a_i ^ b_i, t_i = a_i | b_i (from mcc_pgt_cell) and the
// new terms
//   G_i = g_i | g_{i-1}          P_i = p_i & p_{i-1} & t_{i-2}
// the pseudo-carries obey h_i = G_i | P_i & h_{i-2}, so the even ones
// (h0, h2, h4, h6) and the odd ones (h1, h3, h5, h7) come from two separate
// 4-long chains (mcc_chain4) that run side by side, each starting from the
// carry-in. The chain starts are h0 = g0 | cin and h1 = (g1 | g0) | p1 p0 cin.
// The true carries are c_i = t_i & h_i and the sum bits s_i = p_i ^ c_{i-1}
// with c_{-1} = cin. Each chain is as long as one conventional 4-bit
// Manchester chain yet covers 8 bits, which is where the speed gain comes from.
//
// All of the above equations are the original design's (position 7 uses t_5, as the
// definition of P_i requires). The generate/propagate and
// chain gates are domino gates evaluated while `eval` = 1 and precharged (all
// 0) while `eval` = 0; the sum XOR is static, so during precharge s, c and
// cout are not an addition result (s[0] shows cin, the rest 0).
//
// Interface: a, b, cin in; s (sum), c (all eight carries, c[7] = cout).
// Timing: combinational; the result is valid while eval = 1.
module mcc_adder8 (
  input  logic       eval,  // domino clock: 0 = precharge, 1 = evaluate
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,   // c_{-1}
  output logic [7:0] s,
  output logic [7:0] c,     // carry out of every bit position
  output logic       cout
);
  logic [7:0] g, p, t;
  logic [3:0] ge, pe, go, po;   // even / odd chain inputs
  logic [3:0] he, ho;           // even / odd pseudo-carries
  logic [7:0] h;

  for (genvar i = 0; i < 8; i++) begin : g_bit
    mcc_pgt_cell u_cell (.eval(eval), .a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]), .t(t[i]));
  end

  // New generate and propagate terms of the even chain (positions 0,2,4,6).
  // Position 0 takes cin as g_{-1}: h0 = g0 | cin.
  assign ge = {g[6] | g[5], g[4] | g[3], g[2] | g[1], g[0]};
  assign pe = {p[6] & p[5] & t[4], p[4] & p[3] & t[2], p[2] & p[1] & t[0], 1'b1};
  // Odd chain (positions 1,3,5,7); position 1 has no t_{-1} term.
  assign go = {g[7] | g[6], g[5] | g[4], g[3] | g[2], g[1] | g[0]};
  assign po = {p[7] & p[6] & t[5], p[5] & p[4] & t[3], p[3] & p[2] & t[1], p[1] & p[0]};

  mcc_chain4 u_even (.eval(eval), .G(ge), .P(pe), .hin(cin), .h(he));
  mcc_chain4 u_odd  (.eval(eval), .G(go), .P(po), .hin(cin), .h(ho));

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      h[2*k]   = he[k];
      h[2*k+1] = ho[k];
    end
    c    = t & h;
    s    = p ^ {c[6:0], cin};
    cout = c[7];
  end
endmodule
