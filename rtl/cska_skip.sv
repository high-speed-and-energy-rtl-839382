// cska_skip: carry skip compound gate of a CI-CSKA stage.
//
// The stage carry is CO,j = Cj | (P & CO,j-1): a carry generated inside the
// stage's zero-carry RCA block sets it, otherwise the previous carry passes
// when the stage would propagate it (P = 1), else it is 0.
// Instead of a multiplexer the gate is an inverting compound gate, and the
// polarity alternates along the chain so no inverter is needed:
//   OAI = 0 (AOI form): co_prev is the true carry, co = ~(c_blk | p & co_prev)
//   OAI = 1 (OAI form): co_prev is the complemented carry,
//                       co = ~((~p | co_prev) & ~c_blk), the true carry.
// c_blk and p are always given in true polarity; the OAI form takes their
// complements itself. Purely combinational.
module cska_skip #(
  parameter bit OAI = 1'b0
) (
  input  logic c_blk,
  input  logic p,
  input  logic co_prev,
  output logic co
);

  if (OAI) begin : g_oai
    assign co = ~((~p | co_prev) & ~c_blk);
  end else begin : g_aoi
    assign co = ~((p & co_prev) | c_blk);
  end

endmodule
