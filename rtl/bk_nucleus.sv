// bk_nucleus: nucleus stage of the hybrid variable latency CSKA, a modified
// Brent-Kung parallel prefix adder with carry skip output.
//
// Preprocessing forms p_i = a_i ^ b_i and g_i = a_i & b_i. The Brent-Kung
// prefix network (an up-sweep of log2(M) levels, then a down-sweep of
// log2(M)-1 levels) forms the group signals G[i:0], P[i:0] with no carry
// input; the whole-stage pair G[M-1:0] (g_all) and P[M-1:0] (p_all) comes out
// of the up-sweep, ahead of the others. p_all drives the skip gate and is
// also the variable latency predictor. Only after the network is the
// previous stage's carry brought in: c_i = G[i-1:0] | P[i-1:0] & carry, and
// postprocessing gives s_i = p_i ^ c_i. This mirrors the concatenation and
// incrementation idea of the CI-CSKA stages. The stage carry comes from the
// same AOI/OAI skip gate as in the other stages, CO,p = g_all | p_all & CO,p-1,
// with the polarity convention of ci_cska_stage (OAI = 1: co_prev
// complemented, co true). M must be a power of two. Purely combinational.
module bk_nucleus #(
  parameter int unsigned M   = 8,
  parameter bit          OAI = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         co_prev,
  output logic [M-1:0] s,
  output logic         co,
  output logic         p_all,
  output logic         g_all
);

  localparam int unsigned L = $clog2(M);

  logic [M-1:0] pi, gi;      // preprocessing
  logic [M-1:0] gp, pp;      // prefix results G[i:0], P[i:0]
  logic [M-1:0] c;           // intermediate carries
  logic         cin_t;       // previous stage carry, true polarity

  assign pi = a ^ b;
  assign gi = a & b;

  // Brent-Kung prefix network, computed level by level on a working copy.
  always_comb begin
    logic [M-1:0] g, p;
    g = gi;
    p = pi;
    // up-sweep: node i (i+1 a multiple of 2^(l+1)) absorbs node i - 2^l
    for (int l = 0; l < int'(L); l++) begin
      for (int i = (2 << l) - 1; i < int'(M); i += (2 << l)) begin
        g[i] = g[i] | (p[i] & g[i - (1 << l)]);
        p[i] = p[i] & p[i - (1 << l)];
      end
    end
    // down-sweep: fill in the remaining prefixes from the finished ones
    for (int l = int'(L) - 2; l >= 0; l--) begin
      for (int i = 3 * (1 << l) - 1; i < int'(M); i += (2 << l)) begin
        g[i] = g[i] | (p[i] & g[i - (1 << l)]);
        p[i] = p[i] & p[i - (1 << l)];
      end
    end
    gp = g;
    pp = p;
  end

  assign g_all = gp[M-1];
  assign p_all = pp[M-1];

  // carries after the prefix network, then postprocessing
  assign cin_t = OAI ? ~co_prev : co_prev;
  for (genvar i = 0; i < M; i++) begin : g_post
    if (i == 0) begin : g_first
      assign c[i] = cin_t;
    end else begin : g_rest
      assign c[i] = gp[i-1] | (pp[i-1] & cin_t);
    end
    assign s[i] = pi[i] ^ c[i];
  end

  cska_skip #(.OAI(OAI)) u_skip (
    .c_blk  (g_all),
    .p      (p_all),
    .co_prev(co_prev),
    .co     (co)
  );

  if ((1 << L) != M) begin : g_bad_size
    $error("bk_nucleus: M=%0d is not a power of two", M);
  end

endmodule
