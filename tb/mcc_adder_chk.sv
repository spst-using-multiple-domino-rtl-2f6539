// mcc_adder_chk: one mcc_adder of width W with its own checker.
// On every rising edge of `strobe` it compares the adder's sum, carries and
// carry-out (eval = 1) with an independent model: the low W bits of a, b are
// added as unsigned numbers, and carry c_i is bit i+1 of the sum of the low
// i+1 bits plus carry-in. Counts are read by the enclosing testbench.
module mcc_adder_chk #(
  parameter int W = 64,
  parameter bit DEFAULT_SIZE = 0   // 1: instantiate mcc_adder with its default W
) (
  input logic        eval,
  input logic [63:0] a_in,
  input logic [63:0] b_in,
  input logic        cin,
  input logic        strobe
);
  logic [W-1:0] a, b, s, c;
  logic         cout;
  int checks = 0, failures = 0;

  assign a = a_in[W-1:0];
  assign b = b_in[W-1:0];

  if (DEFAULT_SIZE) begin : g_def
    mcc_adder dut (.eval(eval), .a(a), .b(b), .cin(cin), .s(s), .c(c), .cout(cout));
  end else begin : g_par
    mcc_adder #(.W(W)) dut (.eval(eval), .a(a), .b(b), .cin(cin), .s(s), .c(c), .cout(cout));
  end

  always @(posedge strobe) begin
    logic [W:0]   full;
    logic [W-1:0] exp_c;
    logic [W:0]   part;
    full = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    for (int i = 0; i < W; i++) begin
      logic [W-1:0] mask;
      mask = (i == W - 1) ? '1 : ((W)'(1) << (i + 1)) - 1'b1;
      part = {1'b0, a & mask} + {1'b0, b & mask} + (W+1)'(cin);
      exp_c[i] = part[i+1];
    end
    checks++;
    if (!eval) begin
      if (c !== '0 || cout !== 1'b0) begin
        failures++;
        $display("FAIL W=%0d precharge: c=%h", W, c);
      end
    end else if (s !== full[W-1:0] || c !== exp_c || cout !== full[W]) begin
      failures++;
      if (failures < 5)
        $display("FAIL W=%0d a=%h b=%h cin=%b: s=%h c=%h cout=%b exp s=%h c=%h cout=%b",
                 W, a, b, cin, s, c, cout, full[W-1:0], exp_c, full[W]);
    end
  end
endmodule
