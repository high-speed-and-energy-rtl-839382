// tb_hybrid_cska: checks the combinational hybrid CSKA (default 32-bit split
// with the 8-bit Brent-Kung nucleus at bits 19:12) against a 33-bit integer
// sum, and checks the predictor: pred must be 1 exactly when every nucleus
// bit propagates (a ^ b all ones over bits 19:12). Operands are random and
// propagate-heavy patterns, so both predictor values occur often.
module tb_hybrid_cska;
  localparam int unsigned N = 32;
  localparam int unsigned NUC_LO = 12, NUC_M = 8;
  localparam int unsigned NUM_VECTORS = 200000;
  logic [N-1:0] a, b, s;
  logic         cin, cout, pred;
  int checks = 0, failures = 0, n_pred = 0;

  hybrid_cska dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .pred(pred));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [N:0] exp_sum;
    logic [N-1:0] prop;
    logic exp_pred;
    #1;
    exp_sum  = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
    prop     = a ^ b;
    exp_pred = &prop[NUC_LO +: NUC_M];
    if (exp_pred) n_pred++;
    checks += 2;
    if ({cout, s} !== exp_sum) begin
      failures++;
      if (failures < 10) $display("FAIL sum a=%h b=%h cin=%0d got %h exp %h", a, b, cin, {cout, s}, exp_sum);
    end
    if (pred !== exp_pred) begin
      failures++;
      if (failures < 10) $display("FAIL pred a=%h b=%h got %0d", a, b, pred);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; check_one();
    a = '1; b = '1; cin = 1'b0; check_one();
    for (int v = 0; v < NUM_VECTORS; v++) begin
      a   = $urandom();
      cin = 1'($urandom());
      case (v % 4)
        0: b = $urandom();
        1: b = ~a;
        default: begin
          b = ~a;
          for (int k = 0; k < 2; k++) begin
            int pos = $urandom_range(N - 1);
            if ($urandom_range(1) == 1) begin a[pos] = 1'b1; b[pos] = 1'b1; end
            else                        begin a[pos] = 1'b0; b[pos] = 1'b0; end
          end
        end
      endcase
      check_one();
    end
    checks++;
    if (n_pred == 0) begin failures++; $display("FAIL predictor never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
