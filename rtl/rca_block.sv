// rca_block: ripple carry adder block of M full adders.
//
// Each full adder takes the carry of the one below it, so the carry output
// settles after M carry delays. In the CI-CSKA the first stage's block gets
// the adder's carry input; every other stage's block gets a constant 0 and its
// sum bits are the stage's intermediate results Z (concatenation scheme).
// Purely combinational.
module rca_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout
);

  logic [M:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < M; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[M];

endmodule
