// ci_cska: concatenation-incrementation carry skip adder (CI-CSKA).
//
// The N-bit adder is split into Q stages of SIZES[j] bits (stage 0 holds the
// least significant bits). Stage 0 is a plain ripple carry block fed by the
// carry input. Every later stage is a ci_cska_stage: its RCA block starts
// from a carry of 0, so all stages add their bits at once; the carry coming
// from below is then added by the stage's half adder chain, and the carry
// passed upward is formed by one compound gate per stage. The skip gates
// alternate AOI (stage 1, 3, ...) and OAI (stage 2, 4, ...), so the carry
// travels complemented out of AOI stages and in true form out of OAI stages,
// and no inverter sits on the skip chain. If the last stage is an AOI stage
// one inverter restores cout.
//
// With unequal SIZES (default, small at both ends, largest in the middle)
// this is the variable stage size form; equal SIZES give the fixed stage
// size form. The split itself is this design's choice. SIZES must sum to N.
// Purely combinational: s and cout follow a, b and cin.
module ci_cska
  import cska_pkg::*;
#(
  parameter int unsigned N         = WIDTH,
  parameter int unsigned Q         = CI_Q,
  parameter stage_sizes_t SIZES     = CI_SIZES
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  // bit position of the least significant bit of stage j
  function automatic int unsigned offset(int unsigned j);
    int unsigned sum = 0;
    for (int unsigned r = 0; r < j; r++) sum += SIZES[r];
    return sum;
  endfunction

  if (offset(Q) != N) begin : g_bad_sizes
    $error("ci_cska: SIZES sum to %0d, not N=%0d", offset(Q), N);
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
