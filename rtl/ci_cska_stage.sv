// ci_cska_stage: one stage (j >= 2) of the concatenation-incrementation CSKA.
//
// The stage's RCA block adds its operand bits with a carry input of 0, so it
// works at the same time as every other stage and produces the intermediate
// results Z and its carry Cj. The incrementation block then adds the carry
// arriving from the previous stage to Z. The skip gate forms the stage carry
// from Cj, the product of Z and the previous carry:
//   CO,j = Cj | (&Z & CO,j-1)
// When Cj = 0, &Z = 1 exactly when every bit propagates, so this is the usual
// skip condition. The carry of the incrementation chain is not used.
// OAI = 0: AOI skip gate, co_prev true, co complemented.
// OAI = 1: OAI skip gate, co_prev complemented, co true.
// skip reports &Z for observation. Purely combinational.
module ci_cska_stage #(
  parameter int unsigned M   = 4,
  parameter bit          OAI = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         co_prev,
  output logic [M-1:0] s,
  output logic         co,
  output logic         skip
);

  logic [M-1:0] z;
  logic         c_blk;

  rca_block #(.M(M)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .s   (z),
    .cout(c_blk)
  );

  inc_block #(.M(M), .CIN_INV(OAI)) u_inc (
    .z  (z),
    .cin(co_prev),
    .s  (s)
  );

  assign skip = &z;

  cska_skip #(.OAI(OAI)) u_skip (
    .c_blk  (c_blk),
    .p      (skip),
    .co_prev(co_prev),
    .co     (co)
  );

endmodule
