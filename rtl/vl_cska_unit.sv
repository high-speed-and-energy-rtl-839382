// vl_cska_unit: hybrid variable latency CSKA with its hold logic.
//
// Operands are captured into an operand register when in_valid and in_ready
// are both high. The hybrid_cska datapath then works on the registered
// operands, and its predictor decides the latency:
//   pred = 0: the sum is captured into the result register at the next
//             clock edge (one cycle of evaluation);
//   pred = 1: the hold logic lets the datapath settle for a second cycle
//             (in_ready low) and captures the sum one edge later.
// So an operation accepted at clock edge k has its result in s/cout, with
// out_valid high for one cycle, after edge k+1 (short) or edge k+2 (long);
// out_long tells which. A new operand can be
// accepted in the same cycle the previous result is captured, so short
// operations stream at one per cycle. The clock period is meant to cover only
// the short paths; the two-cycle case covers the long one. Reset (active-low,
// synchronous) clears the valid and hold flags; data registers are not reset.
// The handshake and the exact latency are this design's choices.
module vl_cska_unit
  import cska_pkg::*;
#(
  parameter int unsigned N         = WIDTH,
  parameter int unsigned Q         = HY_Q,
  parameter stage_sizes_t SIZES     = HY_SIZES,
  parameter int unsigned P_IDX     = HY_P_IDX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         out_valid,
  output logic [N-1:0] s,
  output logic         cout,
  output logic         out_long
);

  logic [N-1:0] a_q, b_q;
  logic         cin_q;
  logic         busy_q;   // operand register holds an operation
  logic         hold_q;   // second evaluation cycle of a long operation
  logic [N-1:0] sum;
  logic         carry;
  logic         pred;
  logic         finish;

  hybrid_cska #(.N(N), .Q(Q), .SIZES(SIZES), .P_IDX(P_IDX)) u_add (
    .a   (a_q),
    .b   (b_q),
    .cin (cin_q),
    .s   (sum),
    .cout(carry),
    .pred(pred)
  );

  assign finish   = busy_q && (!pred || hold_q);
  assign in_ready = !busy_q || finish;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      hold_q    <= 1'b0;
      out_valid <= 1'b0;
      out_long  <= 1'b0;
    end else begin
      out_valid <= finish;
      if (finish) begin
        out_long <= hold_q;
      end
      if (in_valid && in_ready) begin
        busy_q <= 1'b1;
      end else if (finish) begin
        busy_q <= 1'b0;
      end
      hold_q <= busy_q && pred && !hold_q;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      a_q   <= a;
      b_q   <= b;
      cin_q <= cin;
    end
    if (finish) begin
      s    <= sum;
      cout <= carry;
    end
  end

  // a long operation holds the operand register for exactly two cycles
  a_hold_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    hold_q |-> finish);
  a_no_accept_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (busy_q && pred && !hold_q) |-> !in_ready);

endmodule
