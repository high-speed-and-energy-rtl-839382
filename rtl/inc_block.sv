// inc_block: incrementation block of a CI-CSKA stage.
//
// A chain of M half adders adds the previous stage's carry to the
// intermediate results Z of the stage's RCA block: s = Z + carry. The
// carry out of the chain is deliberately not produced; the stage carry comes
// from the skip gate instead, which is faster.
// The skip chain delivers the carry complemented after an AOI gate, so with
// CIN_INV = 1 the block takes ~carry and restores it (this design's choice of
// where the inversion sits). Purely combinational.
module inc_block #(
  parameter int unsigned M       = 4,
  parameter bit          CIN_INV = 1'b0
) (
  input  logic [M-1:0] z,
  input  logic         cin,
  output logic [M-1:0] s
);

  logic [M-1:0] c;   // carry into half adder i

  assign c[0] = CIN_INV ? ~cin : cin;

  for (genvar i = 0; i < M; i++) begin : g_ha
    assign s[i] = z[i] ^ c[i];
    if (i + 1 < M) begin : g_carry
      assign c[i+1] = z[i] & c[i];
    end
  end

endmodule
