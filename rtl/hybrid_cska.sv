// hybrid_cska: datapath of the hybrid variable latency CSKA.
//
// The same stage chain as ci_cska, except that stage P_IDX (the nucleus, the
// largest stage, in the middle of the chain) is a bk_nucleus: a modified
// Brent-Kung parallel prefix adder. Its all-propagate signal is both the
// nucleus skip select and the output pred. pred = 0 means the carry chain
// cannot run from the low stages through the nucleus into the high stages,
// so the two halves of the long path (SLP1: input bit 0 to the nucleus sums;
// SLP2: nucleus inputs to the top sum bit) are never both active and the sum
// settles within the shorter delay. pred = 1 warns that the long path may be
// active and the result needs a second clock cycle (see vl_cska_unit).
// Skip gates alternate AOI/OAI from stage 1 on, the nucleus included.
// The split (SIZES, P_IDX) is this design's choice; SIZES[P_IDX] must be a
// power of two and SIZES must sum to N. Purely combinational.
module hybrid_cska
  import cska_pkg::*;
#(
  parameter int unsigned N         = WIDTH,
  parameter int unsigned Q         = HY_Q,
  parameter stage_sizes_t SIZES     = HY_SIZES,
  parameter int unsigned P_IDX     = HY_P_IDX
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout,
  output logic         pred
);

  function automatic int unsigned offset(int unsigned j);
    int unsigned sum = 0;
    for (int unsigned r = 0; r < j; r++) sum += SIZES[r];
    return sum;
  endfunction

  if (offset(Q) != N) begin : g_bad_sizes
    $error("hybrid_cska: SIZES sum to %0d, not N=%0d", offset(Q), N);
  end
  if (P_IDX == 0 || P_IDX >= Q) begin : g_bad_nucleus
    $error("hybrid_cska: nucleus index %0d must be a middle stage", P_IDX);
  end

  // cc[j]: carry out of stage j, true for even j, complemented for odd j
  logic [Q-1:0] cc;

  for (genvar j = 0; j < Q; j++) begin : g_stage
    localparam int unsigned LO = offset(j);
    localparam int unsigned M  = SIZES[j];
    if (j == 0) begin : g_first
      rca_block #(.M(M)) u_rca (
        .a   (a[LO +: M]),
        .b   (b[LO +: M]),
        .cin (cin),
        .s   (s[LO +: M]),
        .cout(cc[j])
      );
    end else if (j == P_IDX) begin : g_nucleus
      logic g_all_unused;
      bk_nucleus #(.M(M), .OAI(j % 2 == 0)) u_ppa (
        .a      (a[LO +: M]),
        .b      (b[LO +: M]),
        .co_prev(cc[j-1]),
        .s      (s[LO +: M]),
        .co     (cc[j]),
        .p_all  (pred),
        .g_all  (g_all_unused)
      );
    end else begin : g_ci
      logic skip_unused;
      ci_cska_stage #(.M(M), .OAI(j % 2 == 0)) u_stage (
        .a      (a[LO +: M]),
        .b      (b[LO +: M]),
        .co_prev(cc[j-1]),
        .s      (s[LO +: M]),
        .co     (cc[j]),
        .skip   (skip_unused)
      );
    end
  end

  assign cout = ((Q - 1) % 2 == 1) ? ~cc[Q-1] : cc[Q-1];

endmodule
