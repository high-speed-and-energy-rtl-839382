// cska_top: the two proposed adders side by side.
//
//   ci_*  a 32-bit variable stage size CI-CSKA (combinational): the
//         concatenation-incrementation carry skip adder with alternating
//         AOI/OAI skip gates.
//   vl_*  the hybrid variable latency extension: the same stage chain with a
//         Brent-Kung parallel prefix nucleus stage whose all-propagate signal
//         predicts whether a result needs one or two clock cycles, plus the
//         hold logic and a valid/ready handshake (see vl_cska_unit).
// The two share nothing but the word width. clk and rst_n (active-low,
// synchronous) serve only the variable latency unit.
module cska_top
  import cska_pkg::*;
#(
  parameter int unsigned N = WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  // CI-CSKA
  input  logic [N-1:0] ci_a,
  input  logic [N-1:0] ci_b,
  input  logic         ci_cin,
  output logic [N-1:0] ci_s,
  output logic         ci_cout,
  // hybrid variable latency CSKA
  input  logic         vl_in_valid,
  output logic         vl_in_ready,
  input  logic [N-1:0] vl_a,
  input  logic [N-1:0] vl_b,
  input  logic         vl_cin,
  output logic         vl_out_valid,
  output logic [N-1:0] vl_s,
  output logic         vl_cout,
  output logic         vl_out_long
);

  ci_cska #(.N(N)) u_ci (
    .a   (ci_a),
    .b   (ci_b),
    .cin (ci_cin),
    .s   (ci_s),
    .cout(ci_cout)
  );

  vl_cska_unit #(.N(N)) u_vl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (vl_in_valid),
    .in_ready (vl_in_ready),
    .a        (vl_a),
    .b        (vl_b),
    .cin      (vl_cin),
    .out_valid(vl_out_valid),
    .s        (vl_s),
    .cout     (vl_cout),
    .out_long (vl_out_long)
  );

endmodule
