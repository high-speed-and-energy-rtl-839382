// tb_vl_cska_unit: drives the variable latency unit with a random stream of
// operations (random gaps in in_valid, propagate-heavy operands) and checks,
// in order, each result against a 33-bit integer sum. It also checks the
// latency of every operation: a result must appear one edge after acceptance
// plus one more edge when the nucleus of the operands propagates in every bit
// (the long case), and out_long must say which. Short operations, long
// operations, refused offers (in_ready low) and back-to-back acceptances must
// each occur.
module tb_vl_cska_unit;
  localparam int unsigned N = 32;
  localparam int unsigned NUC_LO = 12, NUC_M = 8;
  localparam int unsigned NUM_CYCLES = 20000;

  typedef struct {
    logic [N:0] sum;
    logic       long_op;
    int         cycle;
  } exp_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, cin = 1'b0;
  logic [N-1:0] a = '0, b = '0, s;
  logic         out_valid, cout, out_long;
  int checks = 0, failures = 0;
  int cycle = 0, n_short = 0, n_long = 0, n_stall = 0, n_b2b = 0;
  bit last_accept = 1'b0;
  exp_t expq[$];

  vl_cska_unit dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .cin(cin), .out_valid(out_valid), .s(s), .cout(cout),
    .out_long(out_long)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NUM_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: sample pre-edge values at each rising edge
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        exp_t e;
        logic [N-1:0] prop;
        prop      = a ^ b;
        e.sum     = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
        e.long_op = &prop[NUC_LO +: NUC_M];
        e.cycle   = cycle;
        expq.push_back(e);
        if (last_accept) n_b2b++;
      end
      if (in_valid && !in_ready) n_stall++;
      last_accept <= in_valid && in_ready;
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL result with no operation outstanding");
        end else begin
          exp_t e;
          int lat;
          e   = expq.pop_front();
          lat = cycle - e.cycle;
          if (e.long_op) n_long++; else n_short++;
          if ({cout, s} !== e.sum || out_long !== e.long_op || lat != (e.long_op ? 3 : 2)) begin
            failures++;
            if (failures < 10)
              $display("FAIL got %h long=%0d lat=%0d exp %h long=%0d", {cout, s}, out_long, lat, e.sum, e.long_op);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < NUM_CYCLES; c++) begin
      @(negedge clk);
      // keep an offer unchanged until it is taken
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom_range(9) < 8);
        a   = $urandom();
        cin = 1'($urandom());
        case ($urandom_range(2))
          0: b = $urandom();
          1: b = ~a;
          default: begin
            b = ~a;
            begin
              int pos = $urandom_range(N - 1);
              a[pos] = 1'b1; b[pos] = 1'b1;
            end
          end
        endcase
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks += 5;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    if (n_short == 0) begin failures++; $display("FAIL no short operation"); end
    if (n_long == 0)  begin failures++; $display("FAIL no long operation"); end
    if (n_stall == 0) begin failures++; $display("FAIL no refused offer"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back acceptance"); end
    $display("short=%0d long=%0d stalls=%0d back_to_back=%0d", n_short, n_long, n_stall, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
