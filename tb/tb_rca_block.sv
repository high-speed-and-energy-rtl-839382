// tb_rca_block: exhaustive check of a 4-bit ripple carry block against the
// integer sum a + b + cin, for every operand pair and carry input.
module tb_rca_block;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_block #(.M(M)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << M); ia++)
      for (int ib = 0; ib < (1 << M); ib++)
        for (int ic = 0; ic < 2; ic++) begin
          logic [M:0] exp_sum;
          a = M'(ia); b = M'(ib); cin = ic[0];
          #1;
          exp_sum = (M+1)'(ia + ib + ic);
          checks++;
          if ({cout, s} !== exp_sum) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%0d got %h exp %h", a, b, cin, {cout, s}, exp_sum);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
