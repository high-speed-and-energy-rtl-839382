// tb_ci_cska: checks the 32-bit variable stage size CI-CSKA (default stage
// split) against a + b + cin computed as a 33-bit integer sum. Two further
// instances check the fixed stage size form (4 x 8 bits) and a second even
// number of stages (the last skip gate is then an AOI gate, whose complemented
// carry is inverted once at the output; the default has 9 stages and ends on
// an OAI gate). Operands are random,
// plus patterns built to make carries skip across many stages: b = ~a (every
// bit propagates) with a few bits forced to generate or kill.
module tb_ci_cska;
  localparam int unsigned N = 32;
  localparam int unsigned NUM_VECTORS = 200000;
  logic [N-1:0] a, b, s, s_f, s_e;
  logic         cin, cout, cout_f, cout_e;
  int checks = 0, failures = 0;

  ci_cska dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  ci_cska #(.N(N), .Q(4), .SIZES('{0: 8, 1: 8, 2: 8, 3: 8, default: 0})) dut_fss
    (.a(a), .b(b), .cin(cin), .s(s_f), .cout(cout_f));
  ci_cska #(.N(N), .Q(6), .SIZES('{0: 2, 1: 4, 2: 6, 3: 8, 4: 7, 5: 5, default: 0})) dut_even
    (.a(a), .b(b), .cin(cin), .s(s_e), .cout(cout_e));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [N:0] exp_sum;
    #1;
    exp_sum = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
    checks += 3;
    if ({cout, s} !== exp_sum) begin
      failures++;
      if (failures < 10) $display("FAIL vss a=%h b=%h cin=%0d got %h exp %h", a, b, cin, {cout, s}, exp_sum);
    end
    if ({cout_f, s_f} !== exp_sum) begin
      failures++;
      if (failures < 10) $display("FAIL fss a=%h b=%h cin=%0d got %h exp %h", a, b, cin, {cout_f, s_f}, exp_sum);
    end
    if ({cout_e, s_e} !== exp_sum) begin
      failures++;
      if (failures < 10) $display("FAIL even a=%h b=%h cin=%0d got %h exp %h", a, b, cin, {cout_e, s_e}, exp_sum);
    end
  endtask

  initial begin
    // corner cases
    a = '0; b = '0; cin = 1'b0; check_one();
    a = '1; b = '0; cin = 1'b1; check_one();
    a = '1; b = '1; cin = 1'b1; check_one();
    a = 32'h5555_5555; b = 32'hAAAA_AAAA; cin = 1'b1; check_one();
    for (int v = 0; v < NUM_VECTORS; v++) begin
      a   = $urandom();
      cin = 1'($urandom());
      case (v % 4)
        0: b = $urandom();
        1: b = ~a;
        default: begin
          b = ~a;
          // force a generate (1,1) or a kill (0,0) at up to two places
          for (int k = 0; k < 2; k++) begin
            int pos = $urandom_range(N - 1);
            if ($urandom_range(1) == 1) begin a[pos] = 1'b1; b[pos] = 1'b1; end
            else                        begin a[pos] = 1'b0; b[pos] = 1'b0; end
          end
        end
      endcase
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
