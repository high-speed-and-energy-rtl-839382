// tb_cska_top: end-to-end test of cska_top at its default parameters.
//
// Both adders run at once from the same clock. Every cycle the CI-CSKA gets
// new operands and its sum is checked against a 33-bit integer sum; the
// variable latency unit gets a random stream and each result is checked in
// order, with its latency (2 sampled edges short, 3 long). The test also
// counts, from the operands alone, that each mechanism of the design occurred:
//   - a carry skipped across a stage by an AOI gate and by an OAI gate
//     (incoming carry 1 and the whole stage propagating),
//   - a carry generated inside a stage and sent on by its skip gate,
//   - a carry skipped over every stage above the first,
//   - short and long (predictor set) operations of the variable latency unit,
//   - an offer refused during a long operation, and back-to-back acceptance.
// A mechanism that never happened counts as a failure.
module tb_cska_top;
  localparam int unsigned N = 32;
  localparam int unsigned CI_Q = 9;
  localparam int unsigned CI_SZ [CI_Q] = '{1, 2, 3, 4, 5, 6, 5, 4, 2};
  localparam int unsigned NUC_LO = 12, NUC_M = 8;
  localparam int unsigned NUM_CYCLES = 50000;

  typedef struct {
    logic [N:0] sum;
    logic       long_op;
    int         cycle;
  } exp_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] ci_a = '0, ci_b = '0, ci_s;
  logic         ci_cin = 1'b0, ci_cout;
  logic         vl_in_valid = 1'b0, vl_in_ready, vl_cin = 1'b0;
  logic [N-1:0] vl_a = '0, vl_b = '0, vl_s;
  logic         vl_out_valid, vl_cout, vl_out_long;

  int checks = 0, failures = 0, cycle = 0;
  int n_skip_aoi = 0, n_skip_oai = 0, n_gen = 0, n_full_skip = 0;
  int n_short = 0, n_long = 0, n_stall = 0, n_b2b = 0;
  bit last_accept = 1'b0;
  exp_t expq[$];

  cska_top dut (
    .clk(clk), .rst_n(rst_n),
    .ci_a(ci_a), .ci_b(ci_b), .ci_cin(ci_cin), .ci_s(ci_s), .ci_cout(ci_cout),
    .vl_in_valid(vl_in_valid), .vl_in_ready(vl_in_ready),
    .vl_a(vl_a), .vl_b(vl_b), .vl_cin(vl_cin),
    .vl_out_valid(vl_out_valid), .vl_s(vl_s), .vl_cout(vl_cout),
    .vl_out_long(vl_out_long)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NUM_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] pattern(logic [N-1:0] a);
    logic [N-1:0] b;
    case ($urandom_range(3))
      0: b = $urandom();
      1: b = ~a;
      default: begin
        int pos = $urandom_range(N - 1);
        b = ~a;
        b[pos] = a[pos];   // one generate or kill position
      end
    endcase
    return b;
  endfunction

  // CI-CSKA check and stage-level event counting, from the operands only
  task automatic check_ci();
    logic [N:0] exp_sum;
    int lo, carry, all_skip;
    exp_sum = {1'b0, ci_a} + {1'b0, ci_b} + {{N{1'b0}}, ci_cin};
    checks++;
    if ({ci_cout, ci_s} !== exp_sum) begin
      failures++;
      if (failures < 10) $display("FAIL ci a=%h b=%h cin=%0d got %h exp %h", ci_a, ci_b, ci_cin, {ci_cout, ci_s}, exp_sum);
    end
    lo = 0;
    carry = int'(ci_cin);
    all_skip = 1;
    for (int j = 0; j < int'(CI_Q); j++) begin
      int m, sa, sb, t;
      m  = int'(CI_SZ[j]);
      sa = int'((ci_a >> lo) & ((N'(1) << m) - 1));
      sb = int'((ci_b >> lo) & ((N'(1) << m) - 1));
      t  = sa + sb;
      if (j > 0) begin
        if (t == (1 << m) - 1 && carry == 1) begin
          if (j % 2 == 1) n_skip_aoi++; else n_skip_oai++;
        end else begin
          all_skip = 0;
        end
        if (t >= (1 << m)) n_gen++;
      end
      carry = (sa + sb + carry) >> m;
      lo += m;
    end
    if (all_skip == 1) n_full_skip++;
  endtask

  // variable latency scoreboard: sample pre-edge values at each rising edge
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (vl_in_valid && vl_in_ready) begin
        exp_t e;
        logic [N-1:0] prop;
        prop      = vl_a ^ vl_b;
        e.sum     = {1'b0, vl_a} + {1'b0, vl_b} + {{N{1'b0}}, vl_cin};
        e.long_op = &prop[NUC_LO +: NUC_M];
        e.cycle   = cycle;
        expq.push_back(e);
        if (last_accept) n_b2b++;
      end
      if (vl_in_valid && !vl_in_ready) n_stall++;
      last_accept <= vl_in_valid && vl_in_ready;
      if (vl_out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL vl result with no operation outstanding");
        end else begin
          exp_t e;
          int lat;
          e   = expq.pop_front();
          lat = cycle - e.cycle;
          if (e.long_op) n_long++; else n_short++;
          if ({vl_cout, vl_s} !== e.sum || vl_out_long !== e.long_op || lat != (e.long_op ? 3 : 2)) begin
            failures++;
            if (failures < 10)
              $display("FAIL vl got %h long=%0d lat=%0d exp %h long=%0d", {vl_cout, vl_s}, vl_out_long, lat, e.sum, e.long_op);
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
      ci_a   = $urandom();
      ci_b   = pattern(ci_a);
      ci_cin = 1'($urandom());
      #1 check_ci();
      if (!(vl_in_valid && !vl_in_ready)) begin
        vl_in_valid = ($urandom_range(9) < 8);
        vl_a   = $urandom();
        vl_b   = pattern(vl_a);
        vl_cin = 1'($urandom());
      end
    end
    @(negedge clk) vl_in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks += 9;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d vl results missing", expq.size()); end
    if (n_skip_aoi == 0)  begin failures++; $display("FAIL no skip through an AOI stage"); end
    if (n_skip_oai == 0)  begin failures++; $display("FAIL no skip through an OAI stage"); end
    if (n_gen == 0)       begin failures++; $display("FAIL no carry generated in a stage"); end
    if (n_full_skip == 0) begin failures++; $display("FAIL no carry skipped over every stage"); end
    if (n_short == 0)     begin failures++; $display("FAIL no short operation"); end
    if (n_long == 0)      begin failures++; $display("FAIL no long operation"); end
    if (n_stall == 0)     begin failures++; $display("FAIL no refused offer"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back acceptance"); end
    $display("skip_aoi=%0d skip_oai=%0d generate=%0d full_skip=%0d short=%0d long=%0d stalls=%0d back_to_back=%0d",
             n_skip_aoi, n_skip_oai, n_gen, n_full_skip, n_short, n_long, n_stall, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
